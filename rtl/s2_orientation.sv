// s2_orientation: local orientation datapath of stage S2.
//
// The orientation is half the argument of the energy-weighted sum of the
// double-angle unit vectors of the eight filter orientations:
//   theta = 1/2 * atan2( sum E_i sin(2 theta_i), sum E_i cos(2 theta_i) ).
// Using the energies E_i = c_i^2 + s_i^2 rather than magnitudes avoids a
// square root; the constant factor of the tensor formulation is left out
// because it does not change the argument. Each E_i (from the energy
// datapath) is multiplied by its 9-bit weight, two pipelined adder trees form
// the sums, and cordic_atan takes the argument.
//
// Output: orient, 9 bits unsigned, theta = orient*pi/512 in [0, pi), counted
// counter-clockwise from the image x axis with rows running down. Halving
// the 9-bit binary angle modulo pi leaves the same bit pattern, read as
// unsigned. Timing: 27 cycles from e_valid (weight multiply, three adder
// levels, 23 arctangent stages); with the three cycles the energy datapath
// needs to form E_i that is 30 cycles from the stage input.
module s2_orientation
  import gauss_coef_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          e_valid,
  input  energy_t       e_ori [NORI],
  output logic          out_valid,
  output logic [AW-1:0] orient
);

  localparam int PRW = EW + 1 + TW;      // signed product
  localparam int SMW = PRW + 3;

  logic signed [PRW-1:0] pc [NORI];
  logic signed [PRW-1:0] ps [NORI];
  logic                  p_valid;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NORI; i++) begin
      pc[i] <= PRW'($signed({1'b0, e_ori[i]}) * COS2T[i]);
      ps[i] <= PRW'($signed({1'b0, e_ori[i]}) * SIN2T[i]);
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) p_valid <= 1'b0;
    else        p_valid <= e_valid;
  end

  logic                  sc_valid, ss_valid;
  logic signed [SMW-1:0] sum_c, sum_s;

  add_tree #(.N(NORI), .IW(PRW), .OW(SMW)) u_tree_c (
    .clk, .rst_n, .in_valid(p_valid), .in(pc), .out_valid(sc_valid), .out(sum_c));
  add_tree #(.N(NORI), .IW(PRW), .OW(SMW)) u_tree_s (
    .clk, .rst_n, .in_valid(p_valid), .in(ps), .out_valid(ss_valid), .out(sum_s));

  cordic_atan #(.IN_W(SMW), .ITER(20), .OUT_W(AW)) u_atan (
    .clk, .rst_n, .in_valid(sc_valid & ss_valid), .x(sum_c), .y(sum_s),
    .out_valid, .ang(orient));

endmodule
