# AES-128 crypto ASIP

A small application-specific processor for AES-128 encryption. It is a
Mano-style accumulator machine (one common bus, a 4096-word memory,
multi-clock instructions issued by a hard-wired control unit) whose
instruction set gives four of its operation codes to AES: **SubBytes,
ShiftRows, MixColumns and AddRoundKey are single instructions**, each of
which walks the 16-byte AES state in memory by itself. Two hardware additions
make those instructions cheap: a 256 x 8 SubBytes ROM with its own address
register (the T pointer), and an 8-bit ALU that multiplies in GF(2^8)
modulo x^8 + x^4 + x^3 + x + 1 in one clock. The key schedule is expanded
off line and handed to the processor as 176 bytes of round keys; a program
of 40 AES instructions (plus I/O loops) then encrypts a block.

The processor is programmable: the same general instructions (load, store,
add, jump, skip-on-flag, indirect load/store, subroutine call, I/O) that
move data in and out can also drive other byte-oriented code.

## Register configuration

Everything moves over a 17-bit common bus; one register transfer takes one
clock.

| Register | Bits | Role |
|---|---|---|
| AR | 12 | memory address |
| PC | 12 | program counter |
| IR | 17 | instruction |
| DR | 17 | data register; ALU operand B (low byte); counts up for ISZ |
| IAR | 12 | indirect address, loaded straight from memory (LIA, SIA) |
| AC1 | 8 | **the** accumulator of the instruction set; takes every ALU result |
| AC0 | 8 | second ALU operand, loaded from the bus (used by AddRoundKey, ADDOP) |
| E, OV | 1 | carry and signed-overflow flags |
| TR0..TR5 | 17 | register bank; TR0/TR1 are the state and round-key pointers of AddRoundKey, TR0..TR3 hold a row or column inside ShiftRows / MixColumns, TR5 is the return address of CALL |
| T pointer | 8 | address of the SubBytes ROM |
| INPR, OUTR | 8 | input and output registers |
| FGI, FGO | 1 | input-ready and output-ready flags |
| S | 1 | start-stop flip-flop |

The ALU (`gf_alu`) takes operand A from AC1, AC0 or INPR and operand B from
DR[7:0]. Narrow registers appear zero-extended on the bus and take the low
bits of it. The memory is outside the core and must answer reads
combinationally, so `DR <- M[AR]` is one clock.

## Instruction set

A word is 17 bits: `[16:12]` operation code, `[11:0]` address.

| Code | Mnemonic | Effect | Execute clocks |
|---|---|---|---|
| 0 | AND a | AC <- AC and M[a] | 2 |
| 1 | ADD a | AC <- AC + M[a]; E <- carry, OV | 2 |
| 2 | LDA a | AC <- M[a] (DR too) | 2 |
| 3 | STA a | M[a] <- AC | 1 |
| 4 | BUN a | PC <- a | 1 |
| 5 | CALL a | TR5 <- PC, PC <- a | 2 |
| 6 | ISZ a | M[a] <- M[a] + 1 (17-bit); skip next if the result is 0 | 3 |
| 7 | SUB a | AC <- AC - M[a]; E <- no-borrow, OV | 2 |
| 8 | LIA a | AC <- M[M[a]] | 3 |
| 9 | SIA a | M[M[a]] <- AC | 2 |
| 10..13 | JPA/JZA/JZE/JPV a | PC <- a if AC[7]=0 / AC=0 / E=0 / OV=1 | 1 |
| 14, 15 | OR a, XOR a | AC <- AC or/xor M[a] | 2 |
| 16 | ARK k | AddRoundKey with the 16-byte round key at k | 98 |
| 17 | SUBB | SubBytes | 48 |
| 18 | SHROWS | ShiftRows | 48 |
| 19 | MIXCOL | MixColumns | 256 |
| 31 | register-reference, operation in `[5:0]` | see below | 1 (INPUT 2) |

Register-reference operations (`[5:0]`): 0 NOP, 1 MULT (AC <- AC x DR in
GF(2^8)), 2 OUTPUT (OUTR <- AC, FGO <- 0), 3 INPUT (AC <- INPR, FGI <- 0;
bit 6 = 0 reads Cipher-in, 1 reads Key input), 4 CMA, 5 ADDAD (AC <- AC + DR),
6 SHR, 7 SHL (E gets the bit shifted out, 0 shifted in), 8 ROR, 9 ROL,
10 CLRA, 11 CLRV, 12 CLRE, 13 CME, 14 RET (PC <- TR5), 15 MOVAD (DR <- AC),
16 MOVDA (AC <- DR), 17 ORAD, 18 INCA, 19 DECA, 20 ADDOP (AC <- AC0 + DR),
21 SKO, 22 SKI (skip if FGO / FGI is 1), 23 HALT (S <- 0). Unused codes do
nothing.

Every instruction is preceded by three fetch clocks: `AR <- PC`;
`IR <- M[AR], PC <- PC + 1`; `AR <- IR(0-11)`. The operation list is the
published one; the numeric encoding, the operand of ADDOP (AC0 + DR), TR5 as
return-address register and the flag rules are this implementation's.

## How the AES instructions run

The state is 16 words at `STATE_BASE` (default `12'hF00`), one byte per
word, byte (row r, column c) at `STATE_BASE + r + 4c` — the usual AES input
order. The control unit (`control_unit`) counts the execute clocks of an
instruction with an 8-bit micro-step counter MC and decodes the transfers
from the operation code and MC; nothing is stored in a microcode memory.

**AddRoundKey** (98 clocks). Two set-up clocks, `TR1 <- AR` (the round-key
address from the instruction) and `AR, TR0 <- STATE_BASE`, then six
transfers per byte, the sequence given in the published design:

    DR  <- M[AR]            state byte
    AR  <- TR1
    AC0 <- M[AR]            key byte
    AC1 <- AC0 xor DR
    AR  <- TR0
    M[AR] <- AC1;  AR, TR0, TR1 <- +1

AC1 is overwritten; afterwards AC0 holds key byte 15 and DR state byte 15.

**SubBytes** (48 clocks, 3 per byte): `AR <- address of byte i`;
`T pointer <- M[AR]`; `M[AR] <- ROM[T pointer]`. The ROM (`sbox_rom`) is
filled at elaboration by computing, for every x, the GF(2^8) inverse (as
x^254, with 0 mapped to 0) followed by the AES affine transform with
constant 63h — the two steps of SubBytes — rather than by pasting the table.

**ShiftRows** (48 clocks). For rows 1, 2, 3: read the four bytes of the row
into TR0..TR3 (address, then load: 2 clocks each), then write them back with
byte c taken from TR[(c + row) mod 4] (2 clocks each). Row 0 is not touched.

**MixColumns** (256 clocks, 64 per column). Read the column into TR0..TR3
(8 clocks). Then each output byte is built in AC1 with the one-clock
multiplier, using {03}s = {02}s xor s:

    s'_r = {02}·(s_r xor s_r+1) xor s_r+1 xor s_r+2 xor s_r+3      (indices mod 4)

as `DR <- TR[r]; AC <- DR; DR <- TR[r+1]; AC ^= DR; DR <- {02}; AC <- AC x DR;
DR <- TR[r+1]; AC ^= DR; DR <- TR[r+2]; AC ^= DR; DR <- TR[r+3]; AC ^= DR;
AR <- address; M[AR] <- AC` (14 clocks), which is the general MULT
instruction's datapath driven by the control unit.

After any AES instruction only TR4 and TR5 of the bank are preserved.

### Clock counts against the published figures

Only the AddRoundKey transfers were published; the other sequences are this
design's. The published per-instruction clock counts (second register
configuration) and the ones here, both without the fetch clocks:

| Instruction | Published | This RTL |
|---|---|---|
| SubBytes | 48 | 48 |
| ShiftRows | 110 | 48 |
| MixColumns | 712 | 256 |
| AddRoundKey | 114 | 98 |
| One AES-128 block (11 ARK, 10 SUBB, 10 SHROWS, 9 MIXCOL) | 9242 | 4342 (4462 with fetch) |

The published total is exactly the sum of its per-instruction counts over
the ten rounds, and it is the same sum that is used above. The published
gate estimate (about 1188 gates) is a rough count from the number of
transfers and is not comparable with the synthesized size.

## Ports and handshakes

`aes_asip` (the core) has the external interface of the published design:
`clk`, `rst` (synchronous, active high), `key_in[7:0]`, `cipher_in[7:0]`,
`out_port[7:0]`, the flags, and the memory buses `address_bus[11:0]`,
`data_bus_out[16:0]`, `data_bus_in[16:0]`, `rw_m` (1 = write) and `en_m`
(1 = any access). The published FGI and FGO are two-way pins; here the
outside sets them with one-clock pulses on `fgi_set` (a new byte is on the
input ports) and `fgo_set` (the byte on `out_port` was taken) and reads them
on `fgi` / `fgo`. INPUT clears FGI and OUTPUT clears FGO; FGO resets to 1,
FGI to 0. An input device must hold its byte until FGI falls. `start` (while
stopped) sets S and clears PC; `running` is S; `fetch` marks the first
clock of each instruction.

`aes_asip_system` (the top) adds the 4096 x 17 memory (`mem_unit`) and a
host port: while `running` is 0, `host_we`/`host_addr`/`host_wdata` write
the memory and `host_rdata` shows the word at `host_addr`. Load a program at
address 0, pulse `start`, wait for `running` to fall.

Parameters: `ADDR_W = 12`, `DATA_W = 17`, `STATE_BASE = 12'hF00`. The
datapath assumes the 8-bit ALU and a 12-bit address; only `STATE_BASE` is
meant to be changed.

## A program

The system testbench assembles this one (addresses are its own choice):

    in:   SKI; BUN in; INPUT(cipher); SIA ptr; ISZ ptr; ISZ cnt; BUN in      16 bytes to the state
    key:  SKI; BUN key; INPUT(key);   SIA kp;  ISZ kp;  ISZ kc;  BUN key     176 round-key bytes
          ARK 800h
          9 x { SUBB; SHROWS; MIXCOL; ARK 800h+16i }
          SUBB; SHROWS; ARK 8A0h
    out:  LIA op; w: SKO; BUN w; OUTPUT; ISZ op; ISZ oc; BUN out         16 bytes out
          HALT

For the second and third blocks the nine middle rounds run as the loop of
the AES flow instead, with a round subroutine at 0C0h:

          ARK 800h
    rnd:  CALL 0C0h; ISZ rc; BUN rnd                                     rc starts at -9
          SUBB; SHROWS; ARK 8A0h
    0C0h: SUBB; SHROWS; MIXCOL; k: ARK 810h; 16 x ISZ k; RET

The 16 ISZs on the ARK word itself step its address to the next round key.

Counters start at minus the byte count (17-bit two's complement) so that
ISZ skips the loop-back jump at the end. Pointers are 12-bit memory words:
the 8-bit accumulator cannot hold an address, so they are stepped with ISZ.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.

| Testbench | What it checks |
|---|---|
| `tb_aes_asip_system` | three full encryptions through the ports at the default parameters, including the FIPS-197 example (key 000102..0f, plaintext 00112233..ff, ciphertext 69c4e0d86a7b0430d8cdb78070b4c55a) and two random blocks against a reference model; the clock count of every AES instruction; that the SKI and SKO polling loops really waited, ISZ skipped, LIA/SIA ran, the round subroutine was called and returned 18 times, HALT and restart worked |
| `tb_aes_asip` | every general instruction and flag rule, one pass of ARK/SUBB/SHROWS/MIXCOL on a random state against the reference model, their clock counts, OUTR/FGO/FGI |
| `tb_control_unit` | fetch transfers, fetch-to-fetch length of all 32 opcodes and all register operations, conditional transfers, the AddRoundKey transfers clock by clock, transfer counts of each AES instruction, HALT |
| `tb_gf_alu` | all ALU operations and flags on random operands, {57}x{83} = {c1} |
| `tb_sbox_rom` | all 256 ROM entries against the published table (`tb/sbox_table2.hex`) |
| `tb_reg_bank`, `tb_mem_unit` | random traffic against a model |

`tb/aes_ref_pkg.sv` is the reference AES-128 (key expansion, the four
transformations, encryption). To run one, from the project root (the S-box
test reads `tb/sbox_table2.hex` relative to it):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/aes_asip_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_asip_system.sv \
        --top-module tb_aes_asip_system -o sim
    ./obj_dir/sim

Verilator finds the modules under the testbench in `rtl/` by name; only
the packages are listed. The system test takes a fraction of a second.

## Where this departs from, or fills in, the published design

* Instruction encoding, the fetch sequence, the SubBytes / ShiftRows /
  MixColumns transfer sequences and hence their clock counts (table above).
* The published accumulator sign test reads `AC(31)`; the accumulator here
  is 8 bits, as the published ALU is, so JPA tests bit 7.
* The published CALL takes its target from `IR(5-16)`, BUN from `IR(0-11)`;
  all instructions here use `IR(0-11)`.
* The published "ADDOP: AC <- OP1 + OP2" does not say what OP1 and OP2 are;
  here it is AC0 + DR.
* The published design adds an "off-line key-expansion memory" without
  describing it. Its own AddRoundKey transfers read the key from the main
  memory, so the round keys live there; the expansion itself happens
  outside the processor.
* Host port, `start` input, the split of FGI/FGO into set pulses and flag
  outputs, the INPR port select bit, reset values, combinational memory
  read.
* Only encryption is described and built; there is no decryption.
