// Reference model of AES-128 for the testbenches, written from the
// standard's definition: key expansion, SubBytes (the published substitution
// table), ShiftRows, MixColumns (xtime form) and AddRoundKey. States and keys
// are byte arrays in input order (byte i at row i%4, column i/4).
package aes_ref_pkg;

  typedef logic [15:0][7:0]  block_t;   // [i] = byte i
  typedef logic [175:0][7:0] sched_t;   // 11 round keys, byte 16*r+i

  // Substitution table, entry x at [x].
  localparam logic [255:0][7:0] SBOX = 2048'h16bb54b00f2d99416842e6bf0d89a18cdf2855cee9871e9b948ed9691198f8e1_9e1dc186b95735610ef6034866b53e708a8bbd4b1f74dde8c6b4a61c2e2578ba_08ae7a65eaf4566ca94ed58d6d37c8e779e4959162acd3c25c2406490a3a32e0_db0b5ede14b8ee4688902a22dc4f816073195d643d7ea7c41744975fec130ccd_d2f3ff1021dab6bcf5389d928f40a351a89f3c507f02f94585334d43fbaaefd0_cf584c4a39becb6a5bb1fc20ed00d153842fe329b3d63b52a05a6e1b1a2c8309_75b227ebe28012079a059618c323c7041531d871f1e5a534ccf73f362693fdb7_c072a49cafa2d4adf04759fa7dc982ca76abd7fe2b670130c56f6bf27b777c63;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic sched_t expand_key(input block_t key);
    sched_t w;
    logic [7:0] rcon;
    logic [3:0][7:0] t;
    rcon = 8'h01;
    for (int i = 0; i < 16; i++) w[i] = key[i];
    for (int i = 4; i < 44; i++) begin
      for (int b = 0; b < 4; b++) t[b] = w[4*(i-1)+b];
      if (i % 4 == 0) begin
        t = {t[0], t[3], t[2], t[1]};                       // RotWord
        for (int b = 0; b < 4; b++) t[b] = SBOX[t[b]];        // SubWord
        t[0] = t[0] ^ rcon;
        rcon = xtime(rcon);
      end
      for (int b = 0; b < 4; b++) w[4*i+b] = w[4*(i-4)+b] ^ t[b];
    end
    return w;
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    for (int i = 0; i < 16; i++) s[i] = SBOX[s[i]];
    return s;
  endfunction

  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r + 4*c] = s[r + 4*((c + r) % 4)];
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
      o[4*c]   = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[4*c+1] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[4*c+3] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic block_t add_round_key(input block_t s, input sched_t w, input int r);
    for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    return s;
  endfunction

  function automatic block_t encrypt(input block_t pt, input block_t key);
    sched_t w;
    block_t s;
    w = expand_key(key);
    s = add_round_key(pt, w, 0);
    for (int r = 1; r < 10; r++)
      s = add_round_key(mix_columns(shift_rows(sub_bytes(s))), w, r);
    return add_round_key(shift_rows(sub_bytes(s)), w, 10);
  endfunction

endpackage
