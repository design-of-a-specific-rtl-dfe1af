// SubBytes look-up table (256 x 8) with its T pointer register.
//
// The T pointer is an 8-bit address register loaded from the low byte of the
// common bus; the table output for the current pointer is available
// combinationally in the next clock, so a substitution takes one clock to
// load the pointer and one to put the result on the bus. The table is built
// at elaboration, entry by entry, in the two steps of the AES SubBytes
// transformation: the multiplicative inverse in GF(2^8) modulo
// x^8 + x^4 + x^3 + x + 1 ({00} maps to itself), computed as x^254, then the
// affine transformation y_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i
// with c = 8'h63 (indices mod 8). The ROM, its size and its T pointer follow
// the processor's register configuration; building the contents from the
// field arithmetic rather than from a pasted table is this design's choice.
// The pointer resets to 0.
module sbox_rom
  import aes_asip_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tptr_ld,
  input  logic [7:0] tptr_d,
  output logic [7:0] dout
);

  function automatic logic [7:0] gf_inv(input logic [7:0] x);
    logic [7:0] r, p;
    // x^254 = x^-1 for x != 0, and 0 for x = 0.
    r = 8'h01;
    p = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, p);   // exponent 254 = 0b11111110
      p = gf_mul(p, p);
    end
    return r & {8{x != 8'h00}};
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] build_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(8'(i)));
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = build_table();

  logic [7:0] tptr;

  always_ff @(posedge clk) begin
    if (rst)          tptr <= '0;
    else if (tptr_ld) tptr <= tptr_d;
  end

  assign dout = SBOX[tptr];

endmodule
