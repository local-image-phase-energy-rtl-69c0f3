// s0_gauss_base: stage S0, the second-order Gaussian-derivative basis.
//
// One pixel enters per clock (in_valid). The line buffer turns it into a
// nine-pixel image column, which seven separable convolvers share: the even
// basis Gxx, Gxy, Gyy (g[0..2]) and the odd Hilbert-transform basis Hxx, Hxy,
// Hyx, Hyy (h[0..3]), 11-bit signed each. The stage is pipelined over LAT = 24
// register stages, as in the architecture: the arithmetic itself takes 14
// (line-buffer read and two 9-tap passes) and the remaining 10 are balancing
// registers on the outputs, so the whole core keeps the stage latencies of
// 24 / 5 / 30. out_valid and out_sof follow in_valid and in_sof of the newest
// pixel of the 9x9 window by LAT cycles; the window is centred four rows above
// and four columns left of that pixel. There is no back-pressure.
module s0_gauss_base
  import gauss_coef_pkg::*;
#(
  parameter int IMG_W = 1000,
  parameter int LAT   = S0_LAT,
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
  output conv_t         g [3],
  output conv_t         h [4]
);

  localparam int ARITH = 14;
  localparam int PAD   = LAT - ARITH;

  logic          col_valid, col_sof;
  logic [PW-1:0] col [TAPS];

  line_buffer #(.PW(PW), .IMG_W(IMG_W), .NROWS(TAPS - 1)) u_lb (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix, .line_len,
    .col_valid, .col_sof, .col);

  conv_t cv    [NBAS];
  logic  cv_ok [NBAS];

  for (genvar b = 0; b < NBAS; b++) begin : g_conv
    sep_conv #(.KID(b)) u_conv (
      .clk, .rst_n, .col_valid, .col,
      .out_valid(cv_ok[b]), .out(cv[b]));
  end

  // Frame-start tag travels beside the convolvers (13 cycles).
  logic sof_c;
  delay_buffer #(.W(1), .D(ARITH - 1)) u_sof (
    .clk, .d(col_sof & col_valid), .q(sof_c));

  // Balancing registers up to the stage latency.
  logic [NBAS*CW-1:0] packed_c, packed_d;
  always_comb
    for (int b = 0; b < NBAS; b++) packed_c[b*CW +: CW] = cv[b];

  delay_buffer #(.W(NBAS*CW), .D(PAD)) u_pad (.clk, .d(packed_c), .q(packed_d));

  logic [1:0] vs_d;
  logic       v_c;
  assign v_c = cv_ok[0];
  delay_buffer #(.W(2), .D(PAD)) u_padv (.clk, .d({v_c, sof_c & v_c}), .q(vs_d));

  always_comb begin
    for (int b = 0; b < 3; b++) g[b] = conv_t'(packed_d[b*CW +: CW]);
    for (int b = 0; b < 4; b++) h[b] = conv_t'(packed_d[(b+3)*CW +: CW]);
  end

  // The valid flag must not start at a random value after reset.
  logic [PAD:0] rst_sh;
  always_ff @(posedge clk) begin
    if (!rst_n) rst_sh <= '0;
    else        rst_sh <= {rst_sh[PAD-1:0], 1'b1};
  end
  assign out_valid = vs_d[1] & rst_sh[PAD];
  assign out_sof   = vs_d[0] & rst_sh[PAD];

endmodule
