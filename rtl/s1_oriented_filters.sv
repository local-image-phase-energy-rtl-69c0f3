// s1_oriented_filters: stage S1, the bank of oriented quadrature filters.
//
// Eight steer_units, one per orientation theta_i = i*pi/8, turn the seven
// basis responses of stage S0 into eight complex filter outputs per pixel:
// 16 parallel datapaths, eight even (c) and eight odd (s), 11-bit signed.
// Latency is 5 cycles, one pixel per clock; out_sof follows in_sof.
module s1_oriented_filters
  import gauss_coef_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  conv_t g [3],
  input  conv_t h [4],
  output logic  out_valid,
  output logic  out_sof,
  output filt_t c [NORI],
  output filt_t s [NORI]
);

  logic ok [NORI];

  for (genvar i = 0; i < NORI; i++) begin : g_ori
    steer_unit #(.ORI(i)) u_steer (
      .clk, .rst_n, .in_valid, .g, .h,
      .out_valid(ok[i]), .c(c[i]), .s(s[i]));
  end

  assign out_valid = ok[0];

  logic sof_d;
  delay_buffer #(.W(1), .D(S1_LAT)) u_sof (.clk, .d(in_sof & in_valid), .q(sof_d));
  assign out_sof = sof_d & out_valid;

endmodule
