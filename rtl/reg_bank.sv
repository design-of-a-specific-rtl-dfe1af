// Register bank TR0..TR(N-1) of the AES ASIP.
//
// N registers of DATA_W bits, each loaded from the common bus when its ld
// bit is set and incremented when its inc bit is set (a load wins over an
// increment). Every register drives its own output, and the datapath picks
// one of them onto the bus. The count of six registers and their loading
// from the bus follow the processor's register configuration; the increment
// is what the AddRoundKey transfers need, which step the state pointer TR0
// and the round-key pointer TR1 in the same clock. All registers reset to 0.
module reg_bank #(
  parameter int unsigned N      = 6,
  parameter int unsigned DATA_W = 17
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [N-1:0]               ld,
  input  logic [N-1:0]               inc,
  input  logic [DATA_W-1:0]          d,
  output logic [N-1:0][DATA_W-1:0]   q
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst)         q[i] <= '0;
      else if (ld[i])  q[i] <= d;
      else if (inc[i]) q[i] <= q[i] + 1'b1;
    end
  end

endmodule
