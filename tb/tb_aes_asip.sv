// Test of the ASIP core with a memory model attached to its buses.
//
// A program exercises every general instruction and stores each result (or
// a flag turned into 0/1 by a conditional jump) in a result area; the
// testbench compares every stored word with a value it works out itself.
// It then runs AddRoundKey, ADDOP, SubBytes, ShiftRows and MixColumns on a
// random state and compares the state with the reference model, checks the
// clock count of each AES instruction, the OUTR / FGO and FGI behaviour and
// that HALT stops the core.
module tb_aes_asip;
  import aes_asip_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic        running, fgi, fgo, rw_m, en_m, fetch;
  logic [7:0]  key_in = '0, cipher_in = '0, out_port;
  logic        fgi_set = 1'b0, fgo_set = 1'b0;
  logic [11:0] address_bus;
  logic [16:0] data_bus_out, data_bus_in;

  aes_asip dut (.*);

  always #5 clk = ~clk;

  // memory model: combinational read, write at the clock edge
  logic [16:0] mem [4096];
  assign data_bus_in = mem[address_bus];
  always @(posedge clk) if (en_m && rw_m) mem[address_bus] <= data_bus_out;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // data
  localparam logic [11:0] D_A = 12'h200, D_B = 12'h201, D_7F = 12'h202, D_1 = 12'h203,
                          D_57 = 12'h204, D_83 = 12'h205, D_80 = 12'h206, D_0 = 12'h207,
                          D_CNT = 12'h208, D_PTR = 12'h209, D_PTR2 = 12'h20A, D_IND = 12'h210,
                          D_IND2 = 12'h211, KEY = 12'h400, STATE = 12'hF00;
  localparam logic [7:0] A = 8'h3C, B = 8'hD5;

  // ---------------- assembler ----------------
  int pc_i = 0;
  int res_i = 0;
  localparam logic [11:0] RES = 12'h300;
  logic [16:0] expect_q [$];
  logic [11:0] expect_a [$];

  function automatic void emit(input logic [16:0] w);
    mem[pc_i] = w;
    pc_i++;
  endfunction
  function automatic void m(input opcode_e op, input logic [11:0] a);
    emit({op, a});
  endfunction
  function automatic void r(input regop_e op, input bit keyport = 0);
    emit({OP_REG, 5'd0, keyport, op});
  endfunction
  // STA to the next result word, expecting v
  function automatic void sta_expect(input logic [16:0] v);
    m(OP_STA, RES + 12'(res_i));
    expect_a.push_back(RES + 12'(res_i));
    expect_q.push_back(v);
    res_i++;
  endfunction
  // store flag E as 0/1 (destroys AC, keeps the flags)
  function automatic void store_e(input bit v);
    r(R_CLRA);
    m(OP_JZE, 12'(pc_i + 2));
    m(OP_LDA, D_1);
    sta_expect(17'(v));
  endfunction
  // store flag OV as 0/1 (destroys AC, keeps the flags)
  function automatic void store_ov(input bit v);
    r(R_CLRA);
    m(OP_JPV, 12'(pc_i + 2));
    m(OP_BUN, 12'(pc_i + 2));
    m(OP_LDA, D_1);
    sta_expect(17'(v));
  endfunction


  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11B << (i - 8);
    return p[7:0];
  endfunction

  block_t st0, key, exp_state;
  sched_t ks;
  int sub_at;

  task automatic build();
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    mem[D_A] = 17'(A);  mem[D_B] = 17'(B);  mem[D_7F] = 17'h7F; mem[D_1] = 17'h01;
    mem[D_57] = 17'h57; mem[D_83] = 17'h83; mem[D_80] = 17'h80; mem[D_0] = 17'h0;
    mem[D_CNT] = 17'h1FFFE;                  // -2
    mem[D_PTR] = 17'(D_IND); mem[D_PTR2] = 17'(D_IND2); mem[D_IND] = 17'h99;
    for (int i = 0; i < 16; i++) begin
      st0[i] = 8'($urandom); key[i] = 8'($urandom);
      mem[STATE + 12'(i)] = 17'(st0[i]);
      mem[KEY + 12'(i)]   = 17'(key[i]);
    end

    // add / subtract / flags
    m(OP_LDA, D_A); m(OP_ADD, D_B); sta_expect(17'(8'(A + B)));  store_e(1);
    m(OP_LDA, D_A); m(OP_SUB, D_B); sta_expect(17'(8'(A - B)));  store_e(0); store_ov(0);
    m(OP_LDA, D_7F); m(OP_ADD, D_1); sta_expect(17'h80); store_ov(1);
    r(R_CLRV); store_ov(0);
    m(OP_LDA, D_80); m(OP_SUB, D_1); sta_expect(17'h7F); store_ov(1); store_e(1);
    // logic
    m(OP_LDA, D_A); m(OP_AND, D_B); sta_expect(17'(A & B));
    m(OP_LDA, D_A); m(OP_OR,  D_B); sta_expect(17'(A | B));
    m(OP_LDA, D_A); m(OP_XOR, D_B); sta_expect(17'(A ^ B));
    // GF(2^8) multiply
    m(OP_LDA, D_57); r(R_MULT); sta_expect(17'(gmul(8'h57, 8'h57)));
    m(OP_LDA, D_83); r(R_MOVAD); r(R_INPUT, 0); r(R_MULT); sta_expect(17'(gmul(8'h57, 8'h83)));
    // register operations
    m(OP_LDA, D_A); r(R_CMA); sta_expect(17'(8'(~A)));
    m(OP_LDA, D_B); r(R_SHR); sta_expect(17'(B >> 1)); store_e(B[0]);
    m(OP_LDA, D_B); r(R_SHL); sta_expect(17'(8'(B << 1))); store_e(B[7]);
    m(OP_LDA, D_B); r(R_ROR); sta_expect(17'({B[0], B[7:1]}));
    m(OP_LDA, D_B); r(R_ROL); sta_expect(17'({B[6:0], B[7]}));
    m(OP_LDA, D_A); r(R_CLRA); sta_expect(17'h0);
    r(R_DECA); sta_expect(17'hFF);
    r(R_INCA); sta_expect(17'h00); store_e(1);
    m(OP_LDA, D_A); r(R_MOVAD); r(R_CLRA); r(R_INCA); r(R_ORAD); sta_expect(17'(A | 8'h01));
    r(R_ADDAD); sta_expect(17'(8'((A | 8'h01) + A)));
    r(R_MOVDA); sta_expect(17'(A));
    r(R_CLRE); r(R_CME); store_e(1);
    r(R_CME); store_e(0);
    // jumps on AC
    m(OP_LDA, D_7F); m(OP_JPA, 12'(pc_i + 2)); m(OP_LDA, D_0); sta_expect(17'h7F);
    m(OP_LDA, D_80); m(OP_JPA, 12'(pc_i + 2)); m(OP_LDA, D_0); sta_expect(17'h00);
    m(OP_LDA, D_0);  m(OP_JZA, 12'(pc_i + 2)); m(OP_LDA, D_A); sta_expect(17'h00);
    m(OP_LDA, D_B);  m(OP_JZA, 12'(pc_i + 2)); m(OP_LDA, D_A); sta_expect(17'(A));
    m(OP_BUN, 12'(pc_i + 2)); m(OP_LDA, D_A); sta_expect(17'(A));
    // ISZ: -2 -> -1 (no skip), -1 -> 0 (skip)
    m(OP_LDA, D_1);
    m(OP_ISZ, D_CNT); m(OP_LDA, D_B); sta_expect(17'(B));
    m(OP_ISZ, D_CNT); m(OP_LDA, D_A); sta_expect(17'(B));
    // indirect
    m(OP_LIA, D_PTR); sta_expect(17'h99);
    m(OP_LDA, D_A); m(OP_SIA, D_PTR2);
    expect_a.push_back(D_IND2); expect_q.push_back(17'(A));
    // subroutine: CALL / RET
    sub_at = 12'h0F0;
    m(OP_CALL, 12'(sub_at)); sta_expect(17'(A + 8'd1));
    // output and flags
    m(OP_LDA, D_B); r(R_OUTPUT);
    r(R_CLRA); r(R_SKO); r(R_INCA); sta_expect(17'h01);    // FGO = 0: no skip
    r(R_CLRA); r(R_SKI); r(R_INCA); sta_expect(17'h01);    // FGI = 0: no skip
    // AES instructions
    m(OP_ARK, KEY);
    r(R_ADDOP); sta_expect(17'(8'(st0[15] + key[15])));
    m(OP_SUBB, 12'h0);
    m(OP_SHROWS, 12'h0);
    m(OP_MIXCOL, 12'h0);
    r(R_HALT);
    // subroutine body
    pc_i = sub_at;
    m(OP_LDA, D_A); r(R_INCA); r(R_RET);
  endtask

  // clock count of each AES instruction, from fetch to fetch
  int cnt_bad = 0, n_spec = 0;
  longint cyc = 0, last_fetch = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fetch) begin
      if (last_fetch >= 0) begin
        automatic longint d = cyc - last_fetch;
        unique case (opcode_e'(dut.ir[16:12]))
          OP_ARK:    begin n_spec++; if (d != 101) cnt_bad++; end
          OP_SUBB:   begin n_spec++; if (d != 51)  cnt_bad++; end
          OP_SHROWS: begin n_spec++; if (d != 51)  cnt_bad++; end
          OP_MIXCOL: begin n_spec++; if (d != 259) cnt_bad++; end
          default: ;
        endcase
      end
      last_fetch <= cyc;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    cipher_in = 8'h57;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(!running && fgo && !fgi, "reset state");
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(running, "start sets S");
    wait (!running);
    repeat (3) @(posedge clk);
    check(!running, "HALT keeps the core stopped");
    for (int i = 0; i < expect_q.size(); i++)
      check(mem[expect_a[i]] == expect_q[i],
            $sformatf("word %03h = %05h, expected %05h", expect_a[i], mem[expect_a[i]], expect_q[i]));
    ks = '0;
    for (int i = 0; i < 16; i++) ks[i] = key[i];
    exp_state = mix_columns(shift_rows(sub_bytes(add_round_key(st0, ks, 0))));
    for (int i = 0; i < 16; i++)
      check(mem[STATE + 12'(i)] == 17'(exp_state[i]), $sformatf("state byte %0d", i));
    check(out_port == B && !fgo, "OUTPUT drives OUTR and clears FGO");
    check(n_spec == 4 && cnt_bad == 0, $sformatf("AES instruction clocks (%0d of %0d wrong)", cnt_bad, n_spec));
    // FGI handshake
    @(negedge clk) fgi_set = 1'b1;
    @(negedge clk) fgi_set = 1'b0;
    check(fgi, "fgi_set raises FGI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
