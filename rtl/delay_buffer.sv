// delay_buffer: fixed-length synchronisation delay.
//
// The three feature datapaths of the last stage finish after 7 (energy),
// 27 (phase) and 30 (orientation) cycles; delay lines of this kind hold the
// early results until the slowest one is ready, so that all three features of
// a pixel leave the core in the same cycle. q equals d delayed by D clock
// cycles (D = 0 is a wire). It is written as a register chain; a block-RAM
// FIFO would serve equally well for long delays.
module delay_buffer #(
  parameter int W = 22,
  parameter int D = 23
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[D-1];
  end

endmodule
