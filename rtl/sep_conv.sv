// sep_conv: one 9x9 separable convolver of the Gaussian-derivative basis.
//
// The 2-D kernel K(x,y) = kv(y)*kh(x) (tables in gauss_coef_pkg, selected by
// KID) is applied as two 9-tap passes. The vertical pass multiplies the nine
// pixels of an image column from the shared line buffer by kv and sums them
// in a pipelined tree; the result is rounded to MW bits (Q12 sum >> VSH, i.e.
// 4 fractional bits of a grey level). The horizontal pass shifts these column
// sums into a 9-entry window, only when a valid one arrives, multiplies by kh,
// sums, and rounds by HSH bits with saturation to the 11-bit output width.
// With the defaults one output LSB is one grey level of filter response;
// for 8-bit pixels the largest possible response of any of the seven kernels
// is 703, so the saturation only guards other settings of HSH.
//
// The result is the correlation out(r,c) = sum I(r+dy, c+dx)*K(dx,dy),
// dx,dy = -4..4, centred four rows above and four columns left of the newest
// pixel. Latency from col_valid to out_valid is 13 cycles: multiply, 4 tree
// levels, round, window shift, multiply, 4 tree levels, round/saturate. The
// separable structure, nine taps, 13-bit coefficients and 11-bit outputs are
// the architecture's own; the intermediate width and the scaling are this
// design's choice. The vertical sum cannot overflow MW: |sum| <= 255*9258
// and 2.36e6 >> 8 < 2^15.
module sep_conv
  import gauss_coef_pkg::*;
#(
  parameter int KID = 0,
  parameter int MW  = 16,
  parameter int VSH = 8,
  parameter int HSH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              col_valid,
  input  logic [PW-1:0]     col [TAPS],
  output logic              out_valid,
  output conv_t             out
);

  localparam int VPW = PW + 1 + KW;           // one product, vertical
  localparam int VSW = VPW + 4;               // vertical sum
  localparam int HPW = MW + KW;               // one product, horizontal
  localparam int HSW = HPW + 4;               // horizontal sum

  // ---- vertical pass ----
  logic                  vp_valid;
  logic signed [VPW-1:0] vprod [TAPS];

  always_ff @(posedge clk) begin
    for (int k = 0; k < TAPS; k++)
      vprod[k] <= VPW'($signed({1'b0, col[k]}) * KV[KID][k]);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) vp_valid <= 1'b0;
    else        vp_valid <= col_valid;
  end

  logic                  vs_valid;
  logic signed [VSW-1:0] vsum;

  add_tree #(.N(TAPS), .IW(VPW), .OW(VSW)) u_vtree (
    .clk, .rst_n, .in_valid(vp_valid), .in(vprod),
    .out_valid(vs_valid), .out(vsum));

  logic                 mid_valid;
  logic signed [MW-1:0] mid;
  always_ff @(posedge clk) begin
    mid <= MW'((vsum + VSW'(1 <<< (VSH - 1))) >>> VSH);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) mid_valid <= 1'b0;
    else        mid_valid <= vs_valid;
  end

  // ---- horizontal pass ----
  logic                 win_valid;
  logic signed [MW-1:0] win [TAPS];
  always_ff @(posedge clk) begin
    if (mid_valid) begin
      for (int k = 0; k < TAPS - 1; k++) win[k] <= win[k+1];
      win[TAPS-1] <= mid;
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= mid_valid;
  end

  logic                  hp_valid;
  logic signed [HPW-1:0] hprod [TAPS];
  always_ff @(posedge clk) begin
    for (int k = 0; k < TAPS; k++)
      hprod[k] <= HPW'(win[k] * KH[KID][k]);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) hp_valid <= 1'b0;
    else        hp_valid <= win_valid;
  end

  logic                  hs_valid;
  logic signed [HSW-1:0] hsum;
  add_tree #(.N(TAPS), .IW(HPW), .OW(HSW)) u_htree (
    .clk, .rst_n, .in_valid(hp_valid), .in(hprod),
    .out_valid(hs_valid), .out(hsum));

  // ---- round and saturate ----
  localparam int RW = HSW - HSH;
  logic signed [RW-1:0] hr;
  assign hr = RW'((hsum + HSW'(1 <<< (HSH - 1))) >>> HSH);

  localparam logic signed [RW-1:0] MAXV = RW'((1 <<< (CW - 1)) - 1);
  localparam logic signed [RW-1:0] MINV = -RW'(1 <<< (CW - 1));

  always_ff @(posedge clk) begin
    if (hr > MAXV)      out <= conv_t'(MAXV);
    else if (hr < MINV) out <= conv_t'(MINV);
    else                out <= conv_t'(hr);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= hs_valid;
  end

endmodule
