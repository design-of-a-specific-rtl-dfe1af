// Shared types and constants of the AES-128 crypto ASIP.
//
// The processor is an accumulator machine on a 17-bit common bus with a
// 4096-word memory. An instruction word is 17 bits: bits [16:12] hold the
// operation code and bits [11:0] a memory address. Codes 0..15 are the
// memory-reference general instructions, 16..19 the four AES instructions
// (the specific instructions) and code 31 marks a register-reference
// instruction whose operation is chosen by bits [5:0]. The instruction list
// follows the processor's published instruction set; the numeric encoding is
// this design's own choice. Also here: the ALU operations, the common-bus
// sources and the control word that the control unit hands to the datapath.
package aes_asip_pkg;

  localparam int unsigned WORD_W = 17;   // common bus, memory word, DR, IR, TRx
  localparam int unsigned NUM_TR = 6;    // register bank TR0..TR5

  // Role of the bank registers (this design's allocation).
  localparam int unsigned TR_STATE = 0;  // AddRoundKey state pointer
  localparam int unsigned TR_KEY   = 1;  // AddRoundKey round-key pointer
  localparam int unsigned TR_RET   = 5;  // CALL / RET return address

  // Bits [16:12] of an instruction.
  typedef enum logic [4:0] {
    OP_AND    = 5'd0,   // AC <- AC and M[AR]
    OP_ADD    = 5'd1,   // AC <- AC + M[AR], E <- Cout
    OP_LDA    = 5'd2,   // AC <- M[AR]
    OP_STA    = 5'd3,   // M[AR] <- AC
    OP_BUN    = 5'd4,   // PC <- address
    OP_CALL   = 5'd5,   // TR5 <- PC, PC <- address
    OP_ISZ    = 5'd6,   // M[AR] <- M[AR]+1, skip if zero
    OP_SUB    = 5'd7,   // AC <- AC - M[AR]
    OP_LIA    = 5'd8,   // AC <- M[M[AR]]
    OP_SIA    = 5'd9,   // M[M[AR]] <- AC
    OP_JPA    = 5'd10,  // jump if AC sign bit is 0
    OP_JZA    = 5'd11,  // jump if AC = 0
    OP_JZE    = 5'd12,  // jump if E = 0
    OP_JPV    = 5'd13,  // jump if OV = 1
    OP_OR     = 5'd14,  // AC <- AC or M[AR]
    OP_XOR    = 5'd15,  // AC <- AC xor M[AR]
    OP_ARK    = 5'd16,  // AddRoundKey, round key at address
    OP_SUBB   = 5'd17,  // SubBytes
    OP_SHROWS = 5'd18,  // ShiftRows
    OP_MIXCOL = 5'd19,  // MixColumns
    OP_REG    = 5'd31   // register-reference, operation in bits [5:0]
  } opcode_e;

  // Bits [5:0] of a register-reference instruction.
  typedef enum logic [5:0] {
    R_NOP    = 6'd0,
    R_MULT   = 6'd1,    // AC <- AC * DR in GF(2^8)
    R_OUTPUT = 6'd2,    // OUTR <- AC, FGO <- 0
    R_INPUT  = 6'd3,    // AC <- INPR, FGI <- 0 (bit 6 selects the key port)
    R_CMA    = 6'd4,
    R_ADDAD  = 6'd5,    // AC <- AC + DR
    R_SHR    = 6'd6,
    R_SHL    = 6'd7,
    R_ROR    = 6'd8,
    R_ROL    = 6'd9,
    R_CLRA   = 6'd10,
    R_CLRV   = 6'd11,
    R_CLRE   = 6'd12,
    R_CME    = 6'd13,
    R_RET    = 6'd14,   // PC <- TR5
    R_MOVAD  = 6'd15,   // DR <- AC
    R_MOVDA  = 6'd16,   // AC <- DR
    R_ORAD   = 6'd17,   // AC <- AC or DR
    R_INCA   = 6'd18,
    R_DECA   = 6'd19,
    R_ADDOP  = 6'd20,   // AC <- AC0 + DR
    R_SKO    = 6'd21,
    R_SKI    = 6'd22,
    R_HALT   = 6'd23
  } regop_e;

  // INPUT reads the Key input port when this instruction bit is 1.
  localparam int unsigned INPUT_KEY_BIT = 6;

  typedef enum logic [3:0] {
    ALU_PASS_A, ALU_PASS_B, ALU_AND, ALU_OR, ALU_XOR, ALU_ADD, ALU_SUB,
    ALU_INC, ALU_DEC, ALU_CMA, ALU_SHR, ALU_SHL, ALU_ROR, ALU_ROL,
    ALU_MUL, ALU_ZERO
  } alu_op_e;

  // ALU operand A: AC1 (the accumulator of the instruction set), AC0 or INPR.
  typedef enum logic [1:0] { A_AC1, A_AC0, A_INPR } alu_a_e;

  // Sources of the 17-bit common bus.
  typedef enum logic [3:0] {
    BUS_NONE, BUS_MEM, BUS_AR, BUS_PC, BUS_DR, BUS_AC1, BUS_IR, BUS_TR,
    BUS_ROM, BUS_CONST
  } bus_sel_e;

  // Control word: every register transfer of one clock.
  typedef struct packed {
    bus_sel_e            bus_sel;
    logic [2:0]          bus_tr;     // which TR drives the bus
    logic [WORD_W-1:0]   bus_const;  // immediate from the control unit
    logic                addr_iar;   // memory address from IAR instead of AR
    logic                mem_we;     // M[addr] <- bus
    logic                mem_rd;     // memory is read this clock
    logic                ld_ar, inc_ar;
    logic                ld_pc, inc_pc;
    logic                ld_dr, inc_dr;
    logic                ld_ir, ld_iar, ld_ac0, ld_outr, ld_inpr, ld_tptr;
    logic [NUM_TR-1:0]   ld_tr, inc_tr;
    logic                ld_ac1;     // AC1 <- ALU
    alu_op_e             alu_op;
    alu_a_e              alu_a;
    logic                ld_e, ld_ov, clr_e, cme, clr_ov;
    logic                clr_fgi, clr_fgo;
    logic                inpr_key;   // INPR loads from the Key input port
  } ctrl_t;

  // Flags the control unit branches on.
  typedef struct packed {
    logic ac_zero;
    logic ac_sign;
    logic e;
    logic ov;
    logic fgi;
    logic fgo;
    logic dr_zero;   // DR = 0 (ISZ tests it after the increment)
  } flags_t;

  // Multiplication in GF(2^8) modulo m(x) = x^8 + x^4 + x^3 + x + 1.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

endpackage
