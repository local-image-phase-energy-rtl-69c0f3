// add_tree: pipelined binary adder tree.
//
// Sums N signed inputs of IW bits into one signed result of OW bits. The
// inputs are padded with zeros to the next power of two, and each level of
// the tree is one register stage, so the latency is ceil(log2(N)) cycles and a
// new set of operands is accepted every clock. in_valid travels alongside and
// comes out as out_valid with the same latency. The adder trees of the
// energy, orientation and phase datapaths and of the convolvers are instances
// of this module.
module add_tree #(
  parameter int N  = 8,
  parameter int IW = 16,
  parameter int OW = IW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] out
);

  localparam int L  = (N > 1) ? $clog2(N) : 1;
  localparam int NP = 1 << L;

  logic signed [OW-1:0] leaf [NP];
  logic signed [OW-1:0] node [1:NP-1];
  logic        [L-1:0]  vpipe;

  for (genvar j = 0; j < NP; j++) begin : g_leaf
    if (j < N) begin : g_in
      assign leaf[j] = OW'(in[j]);
    end else begin : g_pad
      assign leaf[j] = '0;
    end
  end

  for (genvar j = 1; j < NP; j++) begin : g_node
    if (2 * j >= NP) begin : g_bottom
      always_ff @(posedge clk) node[j] <= leaf[2*j-NP] + leaf[2*j+1-NP];
    end else begin : g_inner
      always_ff @(posedge clk) node[j] <= node[2*j] + node[2*j+1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= L'({vpipe, in_valid});
  end

  assign out       = node[1];
  assign out_valid = vpipe[L-1];

endmodule
