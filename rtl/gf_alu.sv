// 8-bit ALU of the AES ASIP, with multiplication in GF(2^8) in one clock.
//
// Purely combinational. Operand A comes from AC1, AC0 or INPR (chosen in the
// datapath), operand B is the low byte of DR. Besides the logic, add,
// subtract, increment, decrement, complement, shift and rotate operations of
// an accumulator machine, ALU_MUL multiplies A and B modulo
// m(x) = x^8 + x^4 + x^3 + x + 1, the operation that lets MixColumns run in
// few clocks. The operation set and the one-clock multiplier follow the
// processor's instruction set; the flag rules are this design's own:
//   e_out  carry out of ADD/INC, "no borrow" of SUB/DEC (as A + ~B + 1),
//          the bit shifted out by SHR/SHL, otherwise e_in unchanged;
//   ov_out signed (two's complement) overflow of ADD/SUB/INC/DEC, else 0.
// The datapath decides whether E and OV are written.
module gf_alu
  import aes_asip_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  alu_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          e_in,
  output logic [W-1:0]  y,
  output logic          e_out,
  output logic          ov_out
);

  // GF(2^8) product of a and b, shift-and-add with reduction by 0x1B.
  logic [7:0] prod;
  always_comb begin
    logic [7:0] x;
    prod = '0;
    x    = a[7:0];
    for (int i = 0; i < 8; i++) begin
      if (b[i]) prod ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
  end

  logic [W:0] sum;

  always_comb begin
    sum    = '0;
    y      = a;
    e_out  = e_in;
    ov_out = 1'b0;
    unique case (op)
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_ADD: begin
        sum    = {1'b0, a} + {1'b0, b};
        y      = sum[W-1:0];
        e_out  = sum[W];
        ov_out = (a[W-1] == b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        sum    = {1'b0, a} + {1'b0, ~b} + 1'b1;
        y      = sum[W-1:0];
        e_out  = sum[W];
        ov_out = (a[W-1] != b[W-1]) && (y[W-1] != a[W-1]);
      end
      ALU_INC: begin
        sum    = {1'b0, a} + 1'b1;
        y      = sum[W-1:0];
        e_out  = sum[W];
        ov_out = !a[W-1] && y[W-1];
      end
      ALU_DEC: begin
        sum    = {1'b0, a} + {1'b0, {W{1'b1}}};
        y      = sum[W-1:0];
        e_out  = sum[W];
        ov_out = a[W-1] && !y[W-1];
      end
      ALU_CMA:    y = ~a;
      ALU_SHR: begin
        y     = {1'b0, a[W-1:1]};
        e_out = a[0];
      end
      ALU_SHL: begin
        y     = {a[W-2:0], 1'b0};
        e_out = a[W-1];
      end
      ALU_ROR:    y = {a[0], a[W-1:1]};
      ALU_ROL:    y = {a[W-2:0], a[W-1]};
      ALU_MUL:    y = W'(prod);
      ALU_ZERO:   y = '0;
      default:    y = a;
    endcase
  end

endmodule
