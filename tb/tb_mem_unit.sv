// Test of the 4096 x 17 memory: fills every word, then 4000 random
// accesses (writes with and without enable, reads) against a model kept
// here; read data must follow the address in the same clock.
module tb_mem_unit;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [11:0] addr = '0;
  logic [16:0] wdata = '0, rdata;
  logic [16:0] model [4096];

  mem_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 12'(a); wdata = 17'($urandom);
      model[a] = wdata;
    end
    @(negedge clk) en = 1'b0; we = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = 12'($urandom);
      #1 check(rdata == model[addr], $sformatf("read %03h", addr));
      en = 1'($urandom); we = 1'($urandom); wdata = 17'($urandom);
      if (en && we) model[addr] = wdata;
    end
    @(negedge clk) en = 1'b0; we = 1'b0;
    for (int a = 0; a < 4096; a += 37) begin
      addr = 12'(a);
      #1 check(rdata == model[a], $sformatf("final read %03h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
