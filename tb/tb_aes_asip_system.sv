// End-to-end test of the AES-128 crypto ASIP with its memory, at the
// default parameters.
//
// The host port loads a program that reads 16 plaintext bytes from the
// Cipher-in port and the 176 bytes of the off-line expanded key schedule
// from the Key input port (each byte handed over with the FGI handshake),
// stores them through pointers with SIA and ISZ, runs the ten AES-128 rounds
// with the four AES instructions, writes the ciphertext out through OUTR with
// the FGO handshake and halts. The input and output devices wait random
// numbers of clocks, so the program's SKI / SKO polling loops really wait.
// Three blocks are encrypted: the FIPS-197 example (key 000102..0f,
// plaintext 00112233..ff, ciphertext 69c4e0d8..c55a) with the rounds written
// out, and two random ones with the rounds as a loop around a CALLed round
// subroutine, all compared with the reference model. Checked as well: the clocks each AES
// instruction takes, the final state left in memory, and that each
// mechanism (each AES instruction, both polling waits, the ISZ skip,
// indirect load and store, CALL and RET, HALT and restart) happened.
module tb_aes_asip_system;
  import aes_asip_pkg::*;
  import aes_ref_pkg::*;

  localparam logic [11:0] STATE = 12'hF00;   // default STATE_BASE
  localparam logic [11:0] KEYS  = 12'h800;
  // variables
  localparam logic [11:0] V_PTR  = 12'h100;
  localparam logic [11:0] V_CNT  = 12'h101;
  localparam logic [11:0] V_PTRK = 12'h102;
  localparam logic [11:0] V_CNTK = 12'h103;
  localparam logic [11:0] V_PTRO = 12'h104;
  localparam logic [11:0] V_CNTO = 12'h105;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  logic        running, fgi, fgo, fetch;
  logic [7:0]  cipher_in = '0, key_in = '0, out_port;
  logic        fgi_set = 1'b0, fgo_set = 1'b0;
  logic        host_we = 1'b0;
  logic [11:0] host_addr = '0;
  logic [16:0] host_wdata = '0, host_rdata;

  aes_asip_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- assembler ----------------
  logic [16:0] prog [$];
  function automatic logic [16:0] mref(input opcode_e op, input logic [11:0] a);
    return {op, a};
  endfunction
  function automatic logic [16:0] rref(input regop_e r, input bit keyport = 0);
    return {OP_REG, 5'd0, keyport, r};
  endfunction

  task automatic host_write(input logic [11:0] a, input logic [16:0] d);
    @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // looped = 0: the ten rounds written out; looped = 1: the round loop of
  // the AES flow (rounds 1..Nr-1 by CALL of a round subroutine, counted with
  // ISZ). The subroutine's AddRoundKey word is stepped to the next round key
  // by 16 ISZs on the instruction itself.
  localparam logic [11:0] SUB_ROUND = 12'h0C0;
  localparam logic [11:0] V_CNTR    = 12'h106;

  task automatic build_program(input bit looped);
    int l_in, l_key, l_out, l_w, l_loop;
    prog.delete();
    // read plaintext into the state
    l_in = prog.size();
    prog.push_back(rref(R_SKI));
    prog.push_back(mref(OP_BUN, 12'(l_in)));
    prog.push_back(rref(R_INPUT, 0));
    prog.push_back(mref(OP_SIA, V_PTR));
    prog.push_back(mref(OP_ISZ, V_PTR));
    prog.push_back(mref(OP_ISZ, V_CNT));
    prog.push_back(mref(OP_BUN, 12'(l_in)));
    // read the expanded key schedule
    l_key = prog.size();
    prog.push_back(rref(R_SKI));
    prog.push_back(mref(OP_BUN, 12'(l_key)));
    prog.push_back(rref(R_INPUT, 1));
    prog.push_back(mref(OP_SIA, V_PTRK));
    prog.push_back(mref(OP_ISZ, V_PTRK));
    prog.push_back(mref(OP_ISZ, V_CNTK));
    prog.push_back(mref(OP_BUN, 12'(l_key)));
    // ten rounds
    prog.push_back(mref(OP_ARK, KEYS));
    if (!looped) begin
      for (int r = 1; r < 10; r++) begin
        prog.push_back(mref(OP_SUBB, 12'h0));
        prog.push_back(mref(OP_SHROWS, 12'h0));
        prog.push_back(mref(OP_MIXCOL, 12'h0));
        prog.push_back(mref(OP_ARK, KEYS + 12'(16 * r)));
      end
    end else begin
      l_loop = prog.size();
      prog.push_back(mref(OP_CALL, SUB_ROUND));
      prog.push_back(mref(OP_ISZ, V_CNTR));
      prog.push_back(mref(OP_BUN, 12'(l_loop)));
    end
    prog.push_back(mref(OP_SUBB, 12'h0));
    prog.push_back(mref(OP_SHROWS, 12'h0));
    prog.push_back(mref(OP_ARK, KEYS + 12'd160));
    // write the ciphertext out
    l_out = prog.size();
    prog.push_back(mref(OP_LIA, V_PTRO));
    l_w = prog.size();
    prog.push_back(rref(R_SKO));
    prog.push_back(mref(OP_BUN, 12'(l_w)));
    prog.push_back(rref(R_OUTPUT));
    prog.push_back(mref(OP_ISZ, V_PTRO));
    prog.push_back(mref(OP_ISZ, V_CNTO));
    prog.push_back(mref(OP_BUN, 12'(l_out)));
    prog.push_back(rref(R_HALT));
    if (looped) begin
      while (prog.size() < int'(SUB_ROUND)) prog.push_back(rref(R_NOP));
      prog.push_back(mref(OP_SUBB, 12'h0));
      prog.push_back(mref(OP_SHROWS, 12'h0));
      prog.push_back(mref(OP_MIXCOL, 12'h0));
      prog.push_back(mref(OP_ARK, KEYS + 12'd16));           // at SUB_ROUND + 3
      repeat (16) prog.push_back(mref(OP_ISZ, SUB_ROUND + 12'd3));
      prog.push_back(rref(R_RET));
    end
  endtask

  // Loads the program and its pointer / counter variables (counters count
  // up from minus the byte count; ISZ skips when they reach 0).
  task automatic load_image();
    for (int i = 0; i < prog.size(); i++) host_write(12'(i), prog[i]);
    host_write(V_PTR,  17'(STATE));
    host_write(V_CNT,  -17'sd16);
    host_write(V_PTRK, 17'(KEYS));
    host_write(V_CNTK, -17'sd176);
    host_write(V_PTRO, 17'(STATE));
    host_write(V_CNTO, -17'sd16);
    host_write(V_CNTR, -17'sd9);
  endtask

  // ---------------- devices ----------------
  logic [7:0] in_bytes [$];
  logic [7:0] out_bytes [$];
  int in_idx;
  bit dev_on = 0;

  // Input device: presents the next byte, raises FGI, waits for the program
  // to clear it. Plaintext on Cipher-in, key schedule on Key input.
  always @(posedge clk) begin
    fgi_set <= 1'b0;
    if (dev_on && !fgi && !fgi_set && in_idx < in_bytes.size() && ($urandom % 32 == 0)) begin
      if (in_idx < 16) begin
        cipher_in <= in_bytes[in_idx];
        key_in    <= 8'($urandom);
      end else begin
        key_in    <= in_bytes[in_idx];
        cipher_in <= 8'($urandom);
      end
      fgi_set <= 1'b1;
      in_idx  <= in_idx + 1;
    end
  end

  // Output device: takes the byte when FGO falls, acknowledges later.
  bit out_pending = 0;
  always @(posedge clk) begin
    fgo_set <= 1'b0;
    if (dev_on && !fgo && !out_pending && !fgo_set) begin
      out_bytes.push_back(out_port);
      out_pending <= 1'b1;
    end else if (out_pending && ($urandom % 8 == 0)) begin
      fgo_set     <= 1'b1;
      out_pending <= 1'b0;
    end
  end

  // ---------------- mechanism and timing monitor ----------------
  int n_ark = 0, n_subb = 0, n_shr = 0, n_mix = 0, n_ski_wait = 0, n_sko_wait = 0;
  int n_isz_skip = 0, n_lia = 0, n_sia = 0, n_halt = 0, n_start = 0, n_call = 0, n_ret = 0;
  int bad_timing = 0;
  longint last_fetch = -1;
  logic [11:0] pc_before;

  always @(posedge clk) begin
    if (fetch) begin
      if (last_fetch >= 0) begin
        automatic longint d = cyc - last_fetch;
        automatic logic [16:0] ir = dut.u_cpu.ir;
        unique case (opcode_e'(ir[16:12]))
          OP_ARK:    begin n_ark++;  if (d != 3 + 98)  bad_timing++; end
          OP_SUBB:   begin n_subb++; if (d != 3 + 48)  bad_timing++; end
          OP_SHROWS: begin n_shr++;  if (d != 3 + 48)  bad_timing++; end
          OP_MIXCOL: begin n_mix++;  if (d != 3 + 256) bad_timing++; end
          OP_LIA:    n_lia++;
          OP_SIA:    n_sia++;
          OP_CALL:   n_call++;
          OP_ISZ:    if (dut.u_cpu.pc != pc_before) n_isz_skip++;
          OP_REG: begin
            if (ir[5:0] == R_SKI && dut.u_cpu.pc == pc_before) n_ski_wait++;
            if (ir[5:0] == R_SKO && dut.u_cpu.pc == pc_before) n_sko_wait++;
            if (ir[5:0] == R_RET) n_ret++;
          end
          default: ;
        endcase
      end
      last_fetch <= cyc;
      pc_before  <= dut.u_cpu.pc + 12'd1;   // PC after the fetch increment
    end
  end

  // ---------------- one encryption ----------------
  task automatic run_block(input block_t pt, input block_t key, input bit looped);
    sched_t w;
    block_t exp, got;
    longint t0;
    w = expand_key(key);
    exp = encrypt(pt, key);
    in_bytes.delete();
    out_bytes.delete();
    for (int i = 0; i < 16; i++) in_bytes.push_back(pt[i]);
    for (int i = 0; i < 176; i++) in_bytes.push_back(w[i]);
    in_idx = 0;
    build_program(looped);
    load_image();
    dev_on = 1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    n_start++;
    t0 = cyc;
    wait (!running);
    n_halt++;
    repeat (20) @(posedge clk);
    dev_on = 0;
    check(out_bytes.size() == 16, $sformatf("16 output bytes (got %0d)", out_bytes.size()));
    for (int i = 0; i < 16; i++) got[i] = (i < out_bytes.size()) ? out_bytes[i] : 8'hxx;
    check(got == exp, $sformatf("ciphertext %032h expected %032h", got, exp));
    for (int i = 0; i < 16; i++) begin
      host_addr = STATE + 12'(i);
      #1;
      check(host_rdata[7:0] == exp[i], $sformatf("state word %0d in memory", i));
    end
    $display("block done in %0d clocks: ct=%032h", cyc - t0, got);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t bytes_of(input logic [127:0] v);
    block_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  initial begin
    block_t pt, key;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // FIPS-197 Appendix C.1 example
    pt  = bytes_of(128'h00112233445566778899aabbccddeeff);
    key = bytes_of(128'h000102030405060708090a0b0c0d0e0f);
    check(encrypt(pt, key) == bytes_of(128'h69c4e0d86a7b0430d8cdb78070b4c55a),
          "reference model reproduces the FIPS-197 example");
    run_block(pt, key, 0);

    for (int n = 0; n < 2; n++) begin
      for (int i = 0; i < 16; i++) begin
        pt[i]  = 8'($urandom);
        key[i] = 8'($urandom);
      end
      run_block(pt, key, 1);
    end

    check(bad_timing == 0, $sformatf("AES instruction clock counts (%0d wrong)", bad_timing));
    check(n_ark == 33 && n_subb == 30 && n_shr == 30 && n_mix == 27,
          $sformatf("AES instruction counts ark=%0d sub=%0d shr=%0d mix=%0d", n_ark, n_subb, n_shr, n_mix));
    check(n_ski_wait > 0, "SKI polling loop waited");
    check(n_sko_wait > 0, "SKO polling loop waited");
    check(n_isz_skip > 0, "ISZ skipped");
    check(n_lia > 0 && n_sia > 0, "indirect load and store used");
    check(n_halt == 3 && n_start == 3, "halt and restart");
    check(n_call == 18 && n_ret == 18, $sformatf("round loop: %0d calls, %0d returns", n_call, n_ret));
    $display("round subroutine calls=%0d returns=%0d", n_call, n_ret);
    $display("mechanisms: ark=%0d subb=%0d shrows=%0d mixcol=%0d ski_wait=%0d sko_wait=%0d isz_skip=%0d lia=%0d sia=%0d halt=%0d",
             n_ark, n_subb, n_shr, n_mix, n_ski_wait, n_sko_wait, n_isz_skip, n_lia, n_sia, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
