// Control unit of the AES ASIP: start-stop flip-flop, sequence counter and
// the decoder that issues the register transfers of every instruction.
//
// Each register transfer takes one clock. An instruction is fetched in three
// clocks (T0: AR <- PC; T1: IR <- M[AR], PC <- PC + 1; T2: AR <- IR(0-11))
// and then executed in clocks counted by the micro-step counter MC, which
// restarts at 0 for every instruction. The decoder is combinational: from IR,
// the phase, MC and the flags it builds the control word ctrl (bus source,
// register loads and increments, ALU operation, memory strobes) for the
// current clock, and says whether this is the instruction's last clock.
//
// Execute clocks (after the three fetch clocks):
//   LDA ADD SUB AND OR XOR: 2   STA BUN JPA JZA JZE JPV: 1   CALL: 2
//   ISZ LIA: 3   SIA: 2   INPUT: 2   other register-reference: 1
//   SubBytes: 48  (16 bytes x 3: AR <- byte address, T pointer <- M[AR],
//                  M[AR] <- ROM)
//   ShiftRows: 48 (rows 1..3: read the row into TR0..TR3, write it back
//                  rotated left by the row number, 2 clocks per byte)
//   MixColumns: 256 (per column: 8 clocks to read it into TR0..TR3, then for
//                  each row r, with s the column bytes, indices mod 4,
//                  s'_r = {02}*(s_r ^ s_r+1) ^ s_r+1 ^ s_r+2 ^ s_r+3
//                  in 14 clocks using the one-clock GF(2^8) multiply)
//   AddRoundKey: 98 (2 set-up clocks, then the six published transfers per
//                  byte: DR <- M[AR]; AR <- TR1; AC0 <- M[AR];
//                  AC1 <- AC0 xor DR; AR <- TR0;
//                  M[AR] <- AC1, AR, TR0, TR1 ++)
// Only the AddRoundKey sequence is given in full by the processor's
// description; the other sequences, the clock counts that follow from them
// and the encoding are this design's own. The AES state occupies 16
// consecutive words at STATE_BASE, byte (row r, column c) at STATE_BASE+r+4c.
// AddRoundKey takes the address of its 16-byte round key from the
// instruction; the other three AES instructions ignore the address field.
//
// start (while stopped) sets S and clears PC through the bus; HALT clears S.
// While S is 0 the control word is idle. Reset clears S.
//
// Some bits of the control word are never set by this instruction set and
// reduce to constants in synthesis: the upper bits of the immediate, the
// increment strobes of the bank registers other than TR0 and TR1, and a few
// other strobes. They are kept so that the control word describes every
// transfer the datapath can make, and a new instruction needs no datapath
// change.
module control_unit
  import aes_asip_pkg::*;
#(
  parameter int unsigned DATA_W     = 17,
  parameter logic [11:0] STATE_BASE = 12'hF00
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [DATA_W-1:0] ir,
  input  flags_t            flags,
  output ctrl_t             ctrl,
  output logic              running,
  output logic              fetch      // first fetch clock of an instruction
);

  typedef enum logic [1:0] { PH_FETCH0, PH_FETCH1, PH_DECODE, PH_EXEC } phase_e;

  phase_e     phase;
  logic [7:0] mc;
  logic       last;   // last execute clock of the current instruction
  logic       halt;

  opcode_e opcode;
  regop_e  regop;
  assign opcode = opcode_e'(ir[16:12]);
  assign regop  = regop_e'(ir[5:0]);
  assign fetch  = running && phase == PH_FETCH0;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      phase   <= PH_FETCH0;
      mc      <= '0;
    end else if (!running) begin
      phase <= PH_FETCH0;
      mc    <= '0;
      if (start) running <= 1'b1;
    end else begin
      unique case (phase)
        PH_FETCH0: phase <= PH_FETCH1;
        PH_FETCH1: phase <= PH_DECODE;
        PH_DECODE: begin
          phase <= PH_EXEC;
          mc    <= '0;
        end
        PH_EXEC: begin
          if (last) begin
            phase <= PH_FETCH0;
            mc    <= '0;
            if (halt) running <= 1'b0;
          end else begin
            mc <= mc + 1'b1;
          end
        end
        default: phase <= PH_FETCH0;
      endcase
    end
  end

  // Address of state byte (row r, column c).
  function automatic logic [DATA_W-1:0] state_addr(input logic [1:0] r, input logic [1:0] c);
    return DATA_W'(STATE_BASE) + DATA_W'(r) + DATA_W'({c, 2'b00});
  endfunction

  // Bus <- constant
  function automatic void put_const(ref ctrl_t c, input logic [DATA_W-1:0] v);
    c.bus_sel   = BUS_CONST;
    c.bus_const = v;
  endfunction

  // Bus <- TRk
  function automatic void put_tr(ref ctrl_t c, input logic [2:0] k);
    c.bus_sel = BUS_TR;
    c.bus_tr  = k;
  endfunction

  // Bus <- M[AR]
  function automatic void put_mem(ref ctrl_t c);
    c.bus_sel = BUS_MEM;
    c.mem_rd  = 1'b1;
  endfunction

  // AC1 <- ALU(op)
  function automatic void alu(ref ctrl_t c, input alu_op_e op, input alu_a_e a);
    c.ld_ac1 = 1'b1;
    c.alu_op = op;
    c.alu_a  = a;
  endfunction

  always_comb begin
    ctrl_t c;
    logic [7:0] byte_i, sub, u, j, k6;
    logic [1:0] row, col, r2;

    c      = '0;
    c.bus_sel = BUS_NONE;
    c.alu_op  = ALU_PASS_A;
    c.alu_a   = A_AC1;
    last   = 1'b0;
    halt   = 1'b0;
    byte_i = '0;
    sub    = '0;
    u      = '0;
    j      = '0;
    k6     = '0;
    row    = '0;
    col    = '0;
    r2     = '0;

    if (!running) begin
      if (start) begin           // PC <- 0
        put_const(c, '0);
        c.ld_pc = 1'b1;
      end
    end else begin
      unique case (phase)
        PH_FETCH0: begin         // AR <- PC
          c.bus_sel = BUS_PC;
          c.ld_ar   = 1'b1;
        end
        PH_FETCH1: begin         // IR <- M[AR], PC <- PC + 1
          put_mem(c);
          c.ld_ir  = 1'b1;
          c.inc_pc = 1'b1;
        end
        PH_DECODE: begin         // AR <- IR(0-11)
          c.bus_sel = BUS_IR;
          c.ld_ar   = 1'b1;
        end
        default: begin           // execute
          unique case (opcode)
            OP_AND, OP_ADD, OP_SUB, OP_OR, OP_XOR, OP_LDA: begin
              if (mc == 0) begin
                put_mem(c);
                c.ld_dr = 1'b1;
              end else begin
                last = 1'b1;
                unique case (opcode)
                  OP_AND:  alu(c, ALU_AND, A_AC1);
                  OP_OR:   alu(c, ALU_OR, A_AC1);
                  OP_XOR:  alu(c, ALU_XOR, A_AC1);
                  OP_LDA:  alu(c, ALU_PASS_B, A_AC1);
                  OP_ADD, OP_SUB: begin
                    alu(c, opcode == OP_ADD ? ALU_ADD : ALU_SUB, A_AC1);
                    c.ld_e  = 1'b1;
                    c.ld_ov = 1'b1;
                  end
                  default: ;
                endcase
              end
            end
            OP_STA: begin
              c.bus_sel = BUS_AC1;
              c.mem_we  = 1'b1;
              last      = 1'b1;
            end
            OP_BUN, OP_JPA, OP_JZA, OP_JZE, OP_JPV: begin
              c.bus_sel = BUS_AR;
              last      = 1'b1;
              unique case (opcode)
                OP_BUN: c.ld_pc = 1'b1;
                OP_JPA: c.ld_pc = !flags.ac_sign;
                OP_JZA: c.ld_pc = flags.ac_zero;
                OP_JZE: c.ld_pc = !flags.e;
                OP_JPV: c.ld_pc = flags.ov;
                default: ;
              endcase
            end
            OP_CALL: begin
              if (mc == 0) begin     // TR5 <- PC
                c.bus_sel       = BUS_PC;
                c.ld_tr[TR_RET] = 1'b1;
              end else begin         // PC <- AR
                c.bus_sel = BUS_AR;
                c.ld_pc   = 1'b1;
                last      = 1'b1;
              end
            end
            OP_ISZ: begin
              if (mc == 0) begin
                put_mem(c);
                c.ld_dr = 1'b1;
              end else if (mc == 1) begin
                c.inc_dr = 1'b1;
              end else begin
                c.bus_sel = BUS_DR;
                c.mem_we  = 1'b1;
                c.inc_pc  = flags.dr_zero;
                last      = 1'b1;
              end
            end
            OP_LIA, OP_SIA: begin
              if (mc == 0) begin     // IAR <- M[AR]
                put_mem(c);
                c.ld_iar = 1'b1;
              end else if (opcode == OP_SIA) begin   // M[IAR] <- AC
                c.addr_iar = 1'b1;
                c.bus_sel  = BUS_AC1;
                c.mem_we   = 1'b1;
                last       = 1'b1;
              end else if (mc == 1) begin            // DR <- M[IAR]
                c.addr_iar = 1'b1;
                put_mem(c);
                c.ld_dr    = 1'b1;
              end else begin                         // AC <- DR
                alu(c, ALU_PASS_B, A_AC1);
                last = 1'b1;
              end
            end
            OP_ARK: begin
              if (mc == 0) begin                 // TR1 <- AR (round key)
                c.bus_sel       = BUS_AR;
                c.ld_tr[TR_KEY] = 1'b1;
              end else if (mc == 1) begin        // AR, TR0 <- state base
                put_const(c, DATA_W'(STATE_BASE));
                c.ld_ar           = 1'b1;
                c.ld_tr[TR_STATE] = 1'b1;
              end else begin
                k6 = (mc - 8'd2) % 8'd6;
                unique case (k6)
                  8'd0: begin put_mem(c); c.ld_dr = 1'b1; end
                  8'd1: begin put_tr(c, 3'(TR_KEY)); c.ld_ar = 1'b1; end
                  8'd2: begin put_mem(c); c.ld_ac0 = 1'b1; end
                  8'd3: alu(c, ALU_XOR, A_AC0);
                  8'd4: begin put_tr(c, 3'(TR_STATE)); c.ld_ar = 1'b1; end
                  default: begin
                    c.bus_sel          = BUS_AC1;
                    c.mem_we           = 1'b1;
                    c.inc_ar           = 1'b1;
                    c.inc_tr[TR_STATE] = 1'b1;
                    c.inc_tr[TR_KEY]   = 1'b1;
                    last               = (mc == 8'd97);
                  end
                endcase
              end
            end
            OP_SUBB: begin
              byte_i = mc / 8'd3;
              unique case (mc % 8'd3)
                8'd0: begin
                  put_const(c, DATA_W'(STATE_BASE) + DATA_W'(byte_i));
                  c.ld_ar = 1'b1;
                end
                8'd1: begin put_mem(c); c.ld_tptr = 1'b1; end
                default: begin
                  c.bus_sel = BUS_ROM;
                  c.mem_we  = 1'b1;
                  last      = (mc == 8'd47);
                end
              endcase
            end
            OP_SHROWS: begin
              row = 2'(mc[7:4] + 4'd1);
              sub = {4'd0, mc[3:0]};
              col = sub[2:1];
              if (!sub[0]) begin
                put_const(c, state_addr(row, col));
                c.ld_ar = 1'b1;
              end else if (!sub[3]) begin    // TRc <- M[AR]
                put_mem(c);
                c.ld_tr[{1'b0, col}] = 1'b1;
              end else begin                 // M[AR] <- TR(c+row)
                put_tr(c, {1'b0, 2'(col + row)});
                c.mem_we = 1'b1;
                last     = (mc == 8'd47);
              end
            end
            OP_MIXCOL: begin
              col = mc[7:6];
              sub = {2'd0, mc[5:0]};
              if (sub < 8'd8) begin
                row = sub[2:1];
                if (!sub[0]) begin
                  put_const(c, state_addr(row, col));
                  c.ld_ar = 1'b1;
                end else begin
                  put_mem(c);
                  c.ld_tr[{1'b0, row}] = 1'b1;
                end
              end else begin
                u   = sub - 8'd8;
                row = 2'(u / 8'd14);
                j   = u % 8'd14;
                r2  = row + 2'd1;
                unique case (j)
                  8'd0:  begin put_tr(c, {1'b0, row}); c.ld_dr = 1'b1; end
                  8'd1:  alu(c, ALU_PASS_B, A_AC1);
                  8'd2:  begin put_tr(c, {1'b0, r2}); c.ld_dr = 1'b1; end
                  8'd3:  alu(c, ALU_XOR, A_AC1);
                  8'd4:  begin put_const(c, DATA_W'(8'h02)); c.ld_dr = 1'b1; end
                  8'd5:  alu(c, ALU_MUL, A_AC1);
                  8'd6:  begin put_tr(c, {1'b0, r2}); c.ld_dr = 1'b1; end
                  8'd7:  alu(c, ALU_XOR, A_AC1);
                  8'd8:  begin put_tr(c, {1'b0, 2'(row + 2'd2)}); c.ld_dr = 1'b1; end
                  8'd9:  alu(c, ALU_XOR, A_AC1);
                  8'd10: begin put_tr(c, {1'b0, 2'(row + 2'd3)}); c.ld_dr = 1'b1; end
                  8'd11: alu(c, ALU_XOR, A_AC1);
                  8'd12: begin put_const(c, state_addr(row, col)); c.ld_ar = 1'b1; end
                  default: begin
                    c.bus_sel = BUS_AC1;
                    c.mem_we  = 1'b1;
                    last      = (mc == 8'd255);
                  end
                endcase
              end
            end
            OP_REG: begin
              last = 1'b1;
              unique case (regop)
                R_MULT:  alu(c, ALU_MUL, A_AC1);
                R_OUTPUT: begin
                  c.bus_sel = BUS_AC1;
                  c.ld_outr = 1'b1;
                  c.clr_fgo = 1'b1;
                end
                R_INPUT: begin
                  if (mc == 0) begin
                    c.ld_inpr    = 1'b1;
                    c.inpr_key   = ir[INPUT_KEY_BIT];
                    last         = 1'b0;
                  end else begin
                    alu(c, ALU_PASS_A, A_INPR);
                    c.clr_fgi = 1'b1;
                  end
                end
                R_CMA:   alu(c, ALU_CMA, A_AC1);
                R_ADDAD: begin alu(c, ALU_ADD, A_AC1); c.ld_e = 1'b1; c.ld_ov = 1'b1; end
                R_SHR:   begin alu(c, ALU_SHR, A_AC1); c.ld_e = 1'b1; end
                R_SHL:   begin alu(c, ALU_SHL, A_AC1); c.ld_e = 1'b1; end
                R_ROR:   alu(c, ALU_ROR, A_AC1);
                R_ROL:   alu(c, ALU_ROL, A_AC1);
                R_CLRA:  alu(c, ALU_ZERO, A_AC1);
                R_CLRV:  c.clr_ov = 1'b1;
                R_CLRE:  c.clr_e = 1'b1;
                R_CME:   c.cme = 1'b1;
                R_RET: begin
                  put_tr(c, 3'(TR_RET));
                  c.ld_pc = 1'b1;
                end
                R_MOVAD: begin
                  c.bus_sel = BUS_AC1;
                  c.ld_dr   = 1'b1;
                end
                R_MOVDA: alu(c, ALU_PASS_B, A_AC1);
                R_ORAD:  alu(c, ALU_OR, A_AC1);
                R_INCA:  begin alu(c, ALU_INC, A_AC1); c.ld_e = 1'b1; c.ld_ov = 1'b1; end
                R_DECA:  begin alu(c, ALU_DEC, A_AC1); c.ld_e = 1'b1; c.ld_ov = 1'b1; end
                R_ADDOP: begin alu(c, ALU_ADD, A_AC0); c.ld_e = 1'b1; c.ld_ov = 1'b1; end
                R_SKO:   c.inc_pc = flags.fgo;
                R_SKI:   c.inc_pc = flags.fgi;
                R_HALT:  halt = 1'b1;
                default: ;   // NOP and unused codes
              endcase
            end
            default: last = 1'b1;   // unused operation codes act as NOP
          endcase
        end
      endcase
    end
    ctrl = c;
  end

  // An instruction never runs past the micro-step counter.
  a_mc_bound: assert property (@(posedge clk) disable iff (rst)
    (running && phase == PH_EXEC && mc == 8'd255) |-> last);

endmodule
