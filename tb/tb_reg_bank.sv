// Test of the register bank: 2000 clocks of random loads and increments on
// all six registers against a model kept here; a load must win over an
// increment and reset must clear every register.
module tb_reg_bank;
  localparam int N = 6;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] ld = '0, inc = '0;
  logic [16:0] d = '0;
  logic [N-1:0][16:0] q;
  logic [16:0] model [N];

  reg_bank dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < N; i++) model[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] != model[i]) begin
          failures++;
          $display("FAIL: TR%0d = %h expected %h", i, q[i], model[i]);
        end
      end
      ld  = N'($urandom) & N'($urandom);
      inc = N'($urandom);
      d   = 17'($urandom);
      if (n % 50 == 7) d = 17'h1FFFF;          // wrap-around on increment
      for (int i = 0; i < N; i++)
        if (ld[i]) model[i] = d;
        else if (inc[i]) model[i] = model[i] + 17'd1;
    end
    @(negedge clk) rst = 1'b1; ld = '0; inc = '0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] != 0) begin failures++; $display("FAIL: reset TR%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
