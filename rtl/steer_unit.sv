// steer_unit: oriented quadrature filter for one orientation.
//
// Steerability of the Gaussian-derivative basis gives the even (c) and odd
// (s) response of the filter oriented at theta = ORI*pi/8 as fixed linear
// combinations of the basis responses:
//   c = cos^2*Gxx - 2 cos sin*Gxy + sin^2*Gyy
//   s = cos^3*Hxx - 3 cos^2 sin*Hxy + 3 cos sin^2*Hyx - sin^3*Hyy
// with theta counted counter-clockwise on the image (rows run downwards). The
// weights are 9-bit constants (Q7) from gauss_coef_pkg, held in logic rather
// than memory so that all are used in parallel every cycle. The signs and the
// factor 2 on Gxy follow from expanding the rotated kernels.
//
// Pipeline, 5 stages: input register, weight multiply, pairwise add, final
// add, round (>> 7, half up) with saturation to FW = 11 bits. out_valid follows
// in_valid by 5 cycles; a new pixel is accepted every clock.
module steer_unit
  import gauss_coef_pkg::*;
#(
  parameter int ORI = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  conv_t g [3],
  input  conv_t h [4],
  output logic  out_valid,
  output filt_t c,
  output filt_t s
);

  localparam int PRW = CW + TW;      // product
  localparam int SMW = PRW + 2;      // sum of up to four products

  conv_t                 g_q [3];
  conv_t                 h_q [4];
  logic signed [PRW-1:0] pe  [3];
  logic signed [PRW-1:0] po  [4];
  logic signed [SMW-1:0] e01, e2, o01, o23;
  logic signed [SMW-1:0] esum, osum;
  logic [3:0]            vpipe;

  always_ff @(posedge clk) begin
    g_q <= g;
    h_q <= h;
    for (int k = 0; k < 3; k++) pe[k] <= PRW'(g_q[k] * WEVEN[ORI][k]);
    for (int k = 0; k < 4; k++) po[k] <= PRW'(h_q[k] * WODD[ORI][k]);
    e01  <= SMW'(pe[0]) + SMW'(pe[1]);
    e2   <= SMW'(pe[2]);
    o01  <= SMW'(po[0]) + SMW'(po[1]);
    o23  <= SMW'(po[2]) + SMW'(po[3]);
    esum <= e01 + e2;
    osum <= o01 + o23;
  end

  function automatic filt_t round_sat(input logic signed [SMW-1:0] v);
    logic signed [SMW-1:0] r;
    r = (v + SMW'(1 <<< (TRIG_FRAC - 1))) >>> TRIG_FRAC;
    if (r > SMW'((1 <<< (FW - 1)) - 1))  return filt_t'((1 <<< (FW - 1)) - 1);
    else if (r < -SMW'(1 <<< (FW - 1)))  return filt_t'(-(1 <<< (FW - 1)));
    else                                 return filt_t'(r);
  endfunction

  always_ff @(posedge clk) begin
    c <= round_sat(esum);
    s <= round_sat(osum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[2:0], in_valid};
  end
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= vpipe[3];
  end

endmodule
