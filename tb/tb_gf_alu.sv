// Test of the 8-bit ALU: every operation on 3000 random operand pairs plus
// the FIPS-197 multiplication example {57}*{83} = {c1}, compared with values
// computed here (the product by carry-less multiplication and reduction by
// x^8 + x^4 + x^3 + x + 1, the flags from 9-bit arithmetic).
module tb_gf_alu;
  import aes_asip_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       e_in, e_out, ov_out;

  gf_alu dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [7:0] clmul_mod(input logic [7:0] x, input logic [7:0] z);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (z[i]) p ^= 15'(x) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11B << (i - 8);
    return p[7:0];
  endfunction

  task automatic expect_out(input logic [7:0] ey, input logic ee, input logic eov, input string what);
    #1;
    checks++;
    if (y !== ey || e_out !== ee || ov_out !== eov) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h e=%b: y=%h e=%b ov=%b, expected %h %b %b",
               what, op.name(), a, b, e_in, y, e_out, ov_out, ey, ee, eov);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] s;
    int sa, sb, sr;
    op = ALU_MUL; a = 8'h57; b = 8'h83; e_in = 0;
    expect_out(8'hC1, 0, 0, "FIPS-197 {57}*{83}");
    for (int n = 0; n < 3000; n++) begin
      a = 8'($urandom); b = 8'($urandom); e_in = 1'($urandom);
      sa = int'($signed(a)); sb = int'($signed(b));
      op = ALU_PASS_A; expect_out(a, e_in, 0, "pass a");
      op = ALU_PASS_B; expect_out(b, e_in, 0, "pass b");
      op = ALU_AND;    expect_out(a & b, e_in, 0, "and");
      op = ALU_OR;     expect_out(a | b, e_in, 0, "or");
      op = ALU_XOR;    expect_out(a ^ b, e_in, 0, "xor");
      s = 9'(a) + 9'(b); sr = sa + sb;
      op = ALU_ADD;    expect_out(s[7:0], s[8], sr > 127 || sr < -128, "add");
      s = 9'(a) + 9'(8'(~b)) + 9'd1; sr = sa - sb;
      op = ALU_SUB;    expect_out(s[7:0], a >= b, sr > 127 || sr < -128, "sub");
      op = ALU_INC;    expect_out(a + 8'd1, a == 8'hFF, a == 8'h7F, "inc");
      op = ALU_DEC;    expect_out(a - 8'd1, a != 8'h00, a == 8'h80, "dec");
      op = ALU_CMA;    expect_out(~a, e_in, 0, "cma");
      op = ALU_SHR;    expect_out(a >> 1, a[0], 0, "shr");
      op = ALU_SHL;    expect_out(a << 1, a[7], 0, "shl");
      op = ALU_ROR;    expect_out({a[0], a[7:1]}, e_in, 0, "ror");
      op = ALU_ROL;    expect_out({a[6:0], a[7]}, e_in, 0, "rol");
      op = ALU_MUL;    expect_out(clmul_mod(a, b), e_in, 0, "mul");
      op = ALU_ZERO;   expect_out(8'h00, e_in, 0, "zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
