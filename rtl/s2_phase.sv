// s2_phase: local phase datapath of stage S2.
//
// The phase is taken from the sums of the oriented filter outputs over all
// eight orientations, phase = atan2(sum s_i, sum c_i), which needs no
// knowledge of the local orientation and so has no data dependency on the
// orientation datapath. For a one-dimensional signal it equals the phase at
// the dominant orientation. Two pipelined adder trees form the sums and
// cordic_atan takes the argument.
//
// Output: phase, 9 bits two's complement, phase*pi/256 in [-pi, pi).
// Timing: 27 cycles (input register, three adder levels, 23 arctangent
// stages), one pixel per clock.
module s2_phase
  import gauss_coef_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  filt_t         c [NORI],
  input  filt_t         s [NORI],
  output logic          out_valid,
  output logic [AW-1:0] phase
);

  localparam int SMW = FW + 3;

  filt_t c_q [NORI];
  filt_t s_q [NORI];
  logic  q_valid;

  always_ff @(posedge clk) begin
    c_q <= c;
    s_q <= s;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) q_valid <= 1'b0;
    else        q_valid <= in_valid;
  end

  logic                  sc_valid, ss_valid;
  logic signed [SMW-1:0] sum_c, sum_s;

  add_tree #(.N(NORI), .IW(FW), .OW(SMW)) u_tree_c (
    .clk, .rst_n, .in_valid(q_valid), .in(c_q), .out_valid(sc_valid), .out(sum_c));
  add_tree #(.N(NORI), .IW(FW), .OW(SMW)) u_tree_s (
    .clk, .rst_n, .in_valid(q_valid), .in(s_q), .out_valid(ss_valid), .out(sum_s));

  cordic_atan #(.IN_W(SMW), .ITER(20), .OUT_W(AW)) u_atan (
    .clk, .rst_n, .in_valid(sc_valid & ss_valid), .x(sum_c), .y(sum_s),
    .out_valid, .ang(phase));

endmodule
