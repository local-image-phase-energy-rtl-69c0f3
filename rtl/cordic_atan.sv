// cordic_atan: pipelined four-quadrant arctangent, atan2(y, x).
//
// Used by the orientation and the phase datapaths. First both inputs are
// shifted by a common amount (left or right) so that the larger magnitude
// fills the ATIN = 21-bit input word; a common scale factor does not change
// the angle, and this keeps small vectors accurate. Then a radix-2 CORDIC in
// vectoring mode, 24 bits wide, rotates the vector onto the positive x axis:
// a first step turns vectors with x < 0 by pi, and ITER micro-rotations by
// atan(2^-i) drive y to zero while the angle register accumulates the
// rotation. The angle is a 24-bit binary angle (2^24 = one turn); the output
// is it rounded to OUT_W bits, so with OUT_W = 9 one LSB is 2*pi/512.
// atan2(0, 0) gives 0.
//
// Timing: ITER + 3 cycles (normalise, pre-rotate, ITER iterations, round),
// one result per clock. The arctangent as a CORDIC core with 21-bit inputs
// and a 24-bit datapath is the architecture's; the normalisation and the
// iteration count (chosen so that the phase and orientation paths take 27 and
// 30 cycles) are this design's choice.
module cordic_atan
  import gauss_coef_pkg::*;
#(
  parameter int IN_W  = 35,
  parameter int ITER  = 20,
  parameter int OUT_W = AW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  output logic                   out_valid,
  output logic       [OUT_W-1:0] ang
);

  localparam int TOPB = ATIN - 2;            // target magnitude bit
  localparam int EXW  = IN_W + ATIN;         // room for the shifts

  // ---- normalisation ----
  logic [IN_W-1:0] mag;
  int              msb;
  logic signed [EXW-1:0] xs, ys;
  logic signed [ATIN-1:0] xn, yn;

  always_comb begin
    // OR of the two magnitudes: its leading one is the larger one's
    mag = (x[IN_W-1] ? IN_W'(-x) : IN_W'(x)) | (y[IN_W-1] ? IN_W'(-y) : IN_W'(y));
    msb = -1;
    for (int b = 0; b < IN_W; b++)
      if (mag[b]) msb = b;
    xs = EXW'(x);
    ys = EXW'(y);
    if (msb < 0) begin
      xs = '0;
      ys = '0;
    end else if (msb > TOPB) begin
      xs = xs >>> (msb - TOPB);
      ys = ys >>> (msb - TOPB);
    end else begin
      xs = xs <<< (TOPB - msb);
      ys = ys <<< (TOPB - msb);
    end
  end

  logic [ITER+1:0] zero;     // (0, 0) input, travels with the vector

  always_ff @(posedge clk) begin
    xn <= ATIN'(xs);
    yn <= ATIN'(ys);
    zero <= {zero[ITER:0], (msb < 0)};
  end

  // ---- CORDIC ----
  logic signed [ATW-1:0] xr [ITER+1];
  logic signed [ATW-1:0] yr [ITER+1];
  logic        [ATW-1:0] zr [ITER+1];

  always_ff @(posedge clk) begin
    if (xn < 0) begin
      xr[0] <= -ATW'(xn);
      yr[0] <= -ATW'(yn);
      zr[0] <= ATW'(1) << (ATW - 1);         // pi
    end else begin
      xr[0] <= ATW'(xn);
      yr[0] <= ATW'(yn);
      zr[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    always_ff @(posedge clk) begin
      if (yr[i] >= 0) begin
        xr[i+1] <= xr[i] + (yr[i] >>> i);
        yr[i+1] <= yr[i] - (xr[i] >>> i);
        zr[i+1] <= zr[i] + ATAN_TAB[i];
      end else begin
        xr[i+1] <= xr[i] - (yr[i] >>> i);
        yr[i+1] <= yr[i] + (xr[i] >>> i);
        zr[i+1] <= zr[i] - ATAN_TAB[i];
      end
    end
  end

  localparam int DROP = ATW - OUT_W;
  always_ff @(posedge clk) begin
    if (zero[ITER+1]) ang <= '0;
    else              ang <= OUT_W'((zr[ITER] + (ATW'(1) << (DROP - 1))) >> DROP);
  end

  logic [ITER+2:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[ITER+1:0], in_valid};
  end
  assign out_valid = vpipe[ITER+2];

endmodule
