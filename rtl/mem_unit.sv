// Main memory of the AES ASIP: 2^ADDR_W words of DATA_W bits (4096 x 17).
//
// It holds the program, its variables, the 16-byte AES state (one byte per
// word) and the round keys expanded off line. Reads are combinational, so the
// processor can move M[AR] into a register in the same clock it drives the
// address; writes happen at the rising clock edge when en and we are both 1.
// The size follows the processor's register configuration; the read timing
// is this design's choice. The array is not reset: it is loaded through the
// system's host port before the processor is started.
module mem_unit #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 17
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
