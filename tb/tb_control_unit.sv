// Test of the control unit on its own: the testbench plays the instruction
// register and the flags. It checks the start transfer (PC <- 0), the three
// fetch transfers, the number of clocks every operation code takes from
// fetch to fetch (3 + the execute clocks listed in the unit's header), the
// flag-dependent transfers of the jumps, ISZ, SKI and SKO, the first byte
// of AddRoundKey transfer by transfer, how many memory writes and other key
// transfers each AES instruction issues, and that HALT clears S.
module tb_control_unit;
  import aes_asip_pkg::*;

  logic   clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [16:0] ir = '0;
  flags_t flags = '0;
  ctrl_t  ctrl;
  logic   running, fetch;

  control_unit dut (.*);
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

  // Runs one instruction from its first fetch clock to the next fetch and
  // returns its length; counts a few transfers on the way.
  int n_we, n_ldpc, n_incpc, n_mul, n_tptr, n_trld, n_inctr0, n_c02;
  task automatic run_one(input logic [16:0] w, output int len);
    // at a negedge where fetch = 1
    n_c02 = 0; n_we = 0; n_ldpc = 0; n_incpc = 0; n_mul = 0; n_tptr = 0; n_trld = 0; n_inctr0 = 0;
    len = 0;
    check(ctrl.bus_sel == BUS_PC && ctrl.ld_ar, "T0: AR <- PC");
    @(negedge clk); len++;
    ir = 'x;
    check(ctrl.bus_sel == BUS_MEM && ctrl.mem_rd && ctrl.ld_ir && ctrl.inc_pc, "T1: IR <- M[AR], PC++");
    @(negedge clk); len++;
    ir = w;   // IR is loaded at the end of T1
    check(ctrl.bus_sel == BUS_IR && ctrl.ld_ar, "T2: AR <- IR");
    do begin
      @(negedge clk); len++;
      if (!fetch) begin
        n_we     += int'(ctrl.mem_we);
        n_ldpc   += int'(ctrl.ld_pc);
        n_incpc  += int'(ctrl.inc_pc);
        n_mul    += int'(ctrl.ld_ac1 && ctrl.alu_op == ALU_MUL);
        n_tptr   += int'(ctrl.ld_tptr);
        n_trld   += $countones(ctrl.ld_tr);
        n_inctr0 += int'(ctrl.inc_tr[0]);
        n_c02    += int'(ctrl.bus_sel == BUS_CONST && ctrl.ld_dr && ctrl.bus_const == 17'h2);
      end
    end while (!fetch && running);
  endtask

  function automatic int exec_len(input logic [16:0] w);
    unique case (opcode_e'(w[16:12]))
      OP_AND, OP_ADD, OP_SUB, OP_OR, OP_XOR, OP_LDA, OP_CALL, OP_SIA: return 2;
      OP_ISZ, OP_LIA: return 3;
      OP_ARK:    return 98;
      OP_SUBB, OP_SHROWS: return 48;
      OP_MIXCOL: return 256;
      OP_REG:    return (w[5:0] == R_INPUT) ? 2 : 1;
      default:   return 1;
    endcase
  endfunction

  initial begin
    int len;
    logic [16:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!running && !fetch, "stopped after reset");
    start = 1'b1;
    #1 check(ctrl.ld_pc && ctrl.bus_sel == BUS_CONST && ctrl.bus_const == '0, "start: PC <- 0");
    @(negedge clk) start = 1'b0;
    check(running && fetch, "start sets S");

    // every operation code, flags clear
    for (int op = 0; op < 32; op++) begin
      if (op == OP_REG) continue;
      w = {5'(op), 12'h5A5};
      run_one(w, len);
      check(len == 3 + exec_len(w), $sformatf("opcode %0d takes %0d clocks, expected %0d", op, len, 3 + exec_len(w)));
    end
    // every register operation except HALT
    for (int rop = 0; rop < 23; rop++) begin
      w = {OP_REG, 6'd0, 6'(rop)};
      run_one(w, len);
      check(len == 3 + exec_len(w), $sformatf("register op %0d takes %0d clocks", rop, len));
    end

    // conditional transfers
    flags = '0;
    run_one({OP_JZA, 12'h0}, len); check(n_ldpc == 0, "JZA not taken");
    run_one({OP_JPA, 12'h0}, len); check(n_ldpc == 1, "JPA taken on sign 0");
    run_one({OP_JZE, 12'h0}, len); check(n_ldpc == 1, "JZE taken on E 0");
    run_one({OP_JPV, 12'h0}, len); check(n_ldpc == 0, "JPV not taken");
    run_one({OP_ISZ, 12'h0}, len); check(n_incpc == 0, "ISZ no skip");
    run_one({OP_REG, 6'd0, 6'(R_SKI)}, len); check(n_incpc == 0, "SKI no skip");
    flags = '1;
    run_one({OP_JZA, 12'h0}, len); check(n_ldpc == 1, "JZA taken");
    run_one({OP_JPA, 12'h0}, len); check(n_ldpc == 0, "JPA not taken on sign 1");
    run_one({OP_JZE, 12'h0}, len); check(n_ldpc == 0, "JZE not taken on E 1");
    run_one({OP_JPV, 12'h0}, len); check(n_ldpc == 1, "JPV taken");
    run_one({OP_ISZ, 12'h0}, len); check(n_incpc == 1, "ISZ skip");
    run_one({OP_REG, 6'd0, 6'(R_SKO)}, len); check(n_incpc == 1, "SKO skip");
    run_one({OP_BUN, 12'h0}, len); check(n_ldpc == 1, "BUN");
    flags = '0;

    // AES instructions: transfer counts
    run_one({OP_SUBB, 12'h0}, len);
    check(n_we == 16 && n_tptr == 16, "SubBytes: 16 T-pointer loads and 16 writes");
    run_one({OP_SHROWS, 12'h0}, len);
    check(n_we == 12 && n_trld == 12, "ShiftRows: 12 bytes moved");
    run_one({OP_MIXCOL, 12'h0}, len);
    check(n_we == 16 && n_mul == 16 && n_trld == 16 && n_c02 == 16,
          "MixColumns: 16 multiplies by a {02} loaded into DR, 16 writes");
    run_one({OP_ARK, 12'h0}, len);
    check(n_we == 16 && n_inctr0 == 16, "AddRoundKey: 16 writes, TR0 stepped 16 times");

    // AddRoundKey, first byte transfer by transfer
    begin
      @(negedge clk); @(negedge clk);
      ir = {OP_ARK, 12'h123};
      @(negedge clk);
      check(ctrl.bus_sel == BUS_AR && ctrl.ld_tr[1], "ARK: TR1 <- AR");
      @(negedge clk);
      check(ctrl.bus_sel == BUS_CONST && ctrl.bus_const == 17'hF00 && ctrl.ld_ar && ctrl.ld_tr[0], "ARK: AR, TR0 <- state");
      @(negedge clk);
      check(ctrl.bus_sel == BUS_MEM && ctrl.ld_dr, "ARK MC1: DR <- MEM(AR)");
      @(negedge clk);
      check(ctrl.bus_sel == BUS_TR && ctrl.bus_tr == 1 && ctrl.ld_ar, "ARK MC2: AR <- TR1");
      @(negedge clk);
      check(ctrl.bus_sel == BUS_MEM && ctrl.ld_ac0, "ARK MC3: AC0 <- MEM(AR)");
      @(negedge clk);
      check(ctrl.ld_ac1 && ctrl.alu_op == ALU_XOR && ctrl.alu_a == A_AC0, "ARK MC4: AC1 <- AC0 xor DR");
      @(negedge clk);
      check(ctrl.bus_sel == BUS_TR && ctrl.bus_tr == 0 && ctrl.ld_ar, "ARK MC5: AR <- TR0");
      @(negedge clk);
      check(ctrl.mem_we && ctrl.bus_sel == BUS_AC1 && ctrl.inc_ar && ctrl.inc_tr[0] && ctrl.inc_tr[1],
            "ARK MC6: MEM(AR) <- AC1, AR, TR0, TR1 ++");
      while (!fetch) @(negedge clk);
    end

    // HALT
    run_one({OP_REG, 6'd0, 6'(R_HALT)}, len);
    check(!running, "HALT clears S");
    repeat (3) @(negedge clk);
    check(!running && ctrl == '0 || (!running && !ctrl.ld_pc && !ctrl.mem_we), "idle while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
