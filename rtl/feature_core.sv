// feature_core: real-time local energy, orientation and phase of an image.
//
// A grey-level video stream enters one pixel per clock. Stage S0 filters it
// with a basis of seven separable 9x9 second-order Gaussian-derivative
// kernels and their Hilbert-transform approximations (24 cycles); stage S1
// steers the basis to eight orientations, giving an even/odd quadrature pair
// per orientation (5 cycles); stage S2 reduces the eight pairs to the mean
// local energy, the dominant orientation and the local phase (30 cycles).
// Every stage is fully pipelined, so one feature triple leaves per clock,
// 59 cycles after the newest pixel of its 9x9 window entered; the window
// is centred four rows above and four columns left of that pixel.
//
// Interface: in_valid qualifies in_pix (8 bit); in_sof marks the first pixel
// of a frame and restarts the line-buffer column count. Gaps in in_valid are
// allowed and are carried through the pipeline; there is no back-pressure.
// Outputs: out_energy (22 bit unsigned, mean of c_i^2 + s_i^2), out_orient
// (9 bit unsigned, LSB pi/512, [0, pi)), out_phase (9 bit signed, LSB
// pi/256). Reset (rst_n low, synchronous) clears the valid flags; the image
// data paths and row memories are not reset. IMG_W is the longest image row
// the row memories hold; line_len (1 to IMG_W) is the row length of the
// incoming video and may change between frames.
// The camera, frame grabber and display sides are outside this core.
module feature_core
  import gauss_coef_pkg::*;
#(
  parameter int IMG_W = 1000,
  localparam int LW   = $clog2(IMG_W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [PW-1:0] in_pix,
  input  logic [LW-1:0] line_len,
  output logic          out_valid,
  output logic          out_sof,
  output energy_t       out_energy,
  output logic [AW-1:0] out_orient,
  output logic [AW-1:0] out_phase
);

  logic  s0_valid, s0_sof;
  conv_t g [3];
  conv_t h [4];

  s0_gauss_base #(.IMG_W(IMG_W)) u_s0 (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix, .line_len,
    .out_valid(s0_valid), .out_sof(s0_sof), .g, .h);

  logic  s1_valid, s1_sof;
  filt_t c [NORI];
  filt_t s [NORI];

  s1_oriented_filters u_s1 (
    .clk, .rst_n, .in_valid(s0_valid), .in_sof(s0_sof), .g, .h,
    .out_valid(s1_valid), .out_sof(s1_sof), .c, .s);

  s2_features u_s2 (
    .clk, .rst_n, .in_valid(s1_valid), .in_sof(s1_sof), .c, .s,
    .out_valid, .out_sof, .energy(out_energy), .orient(out_orient),
    .phase(out_phase));

endmodule
