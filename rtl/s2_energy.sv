// s2_energy: local energy datapath of stage S2.
//
// For each of the eight orientations the energy of the complex filter output
// is E_i = c_i^2 + s_i^2 (22 bits unsigned); a pipelined binary adder tree
// sums the eight values and a shift by three gives the mean, the local energy
// (truncated, 22 bits). The per-orientation energies e_ori are also output for
// the orientation datapath.
//
// Timing: 7 stages in all - input register, squares, c^2+s^2, three adder
// levels, shift. e_ori/e_valid are valid 3 cycles and mean/out_valid 7 cycles
// after in_valid. One pixel per clock.
module s2_energy
  import gauss_coef_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  filt_t   c [NORI],
  input  filt_t   s [NORI],
  output logic    e_valid,
  output energy_t e_ori [NORI],
  output logic    out_valid,
  output energy_t mean
);

  localparam int SQW = 2 * FW - 1;           // one square, unsigned
  localparam int TIW = EW + 1;               // tree input, signed
  localparam int TOW = TIW + 3;              // tree output

  filt_t          c_q [NORI];
  filt_t          s_q [NORI];
  logic [SQW-1:0] c2  [NORI];
  logic [SQW-1:0] s2  [NORI];
  logic [1:0]     vpipe;

  always_ff @(posedge clk) begin
    c_q <= c;
    s_q <= s;
    for (int i = 0; i < NORI; i++) begin
      c2[i]    <= SQW'(c_q[i] * c_q[i]);
      s2[i]    <= SQW'(s_q[i] * s_q[i]);
      e_ori[i] <= EW'(c2[i]) + EW'(s2[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe   <= '0;
      e_valid <= 1'b0;
    end else begin
      vpipe   <= {vpipe[0], in_valid};
      e_valid <= vpipe[1];
    end
  end

  logic signed [TIW-1:0] tin [NORI];
  always_comb
    for (int i = 0; i < NORI; i++) tin[i] = $signed({1'b0, e_ori[i]});

  logic                  t_valid;
  logic signed [TOW-1:0] tsum;
  add_tree #(.N(NORI), .IW(TIW), .OW(TOW)) u_tree (
    .clk, .rst_n, .in_valid(e_valid), .in(tin),
    .out_valid(t_valid), .out(tsum));

  always_ff @(posedge clk) begin
    mean <= EW'(tsum >>> 3);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= t_valid;
  end

endmodule
