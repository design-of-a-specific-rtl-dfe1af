// Test of the SubBytes ROM: all 256 entries against the published
// substitution table (read from sbox_table2.hex, 16 rows of 16 bytes, entry
// 16*x+y in row x, column y), in random address order, each read one clock
// after the T pointer is loaded; also checks that the pointer holds its value
// while tptr_ld is low and that reset clears it.
module tb_sbox_rom;
  logic       clk = 1'b0, rst = 1'b1, tptr_ld = 1'b0;
  logic [7:0] tptr_d = '0, dout;
  logic [7:0] table2 [256];

  sbox_rom dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [256];
    $readmemh("tb/sbox_table2.hex", table2);
    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(dout == table2[0], "reset pointer is 0");
    foreach (order[k]) begin
      @(negedge clk);
      tptr_ld = 1'b1; tptr_d = 8'(order[k]);
      @(negedge clk);
      tptr_ld = 1'b0; tptr_d = 8'($urandom);
      check(dout == table2[order[k]], $sformatf("S(%02h) = %02h, expected %02h", order[k], dout, table2[order[k]]));
      @(negedge clk);
      check(dout == table2[order[k]], "pointer holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
