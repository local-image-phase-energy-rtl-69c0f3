// tb_s0_gauss_base: stage S0 (line buffer and seven separable convolvers).
//
// Streams three random 20-row frames of width 16 with random idle cycles and
// compares the seven basis responses of every pixel whose 9x9 window lies
// inside its frame with the reference model, whose kernel taps are
// recomputed from the Gaussian-derivative formulas. The latency must be 24
// cycles from the newest pixel of the window.
module tb_s0_gauss_base;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::conv_t;

  localparam int W = 16, H = 20, NF = 3, LAT = 24;

  logic       clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = 0;
  logic [4:0] line_len = 5'(W);
  logic       out_valid, out_sof;
  conv_t      g [3];
  conv_t      h [4];

  s0_gauss_base #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { int f; int r; int c; longint t; } tag_t;
  tag_t pend [$], q [$];
  int frames [NF][W*H];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tag_t t;
    longint v;
    int     got;
    cycle++;
    if (rst_n && out_valid) begin
      t = q.pop_front();
      checks++;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (out_sof != (t.r == 0 && t.c == 0)) begin
        failures++;
        $display("out_sof wrong at f%0d (%0d,%0d)", t.f, t.r, t.c);
      end
      if (t.r >= 8 && t.c >= 8) begin
        img = new[W*H];
        foreach (frames[t.f][k]) img[k] = frames[t.f][k];
        img_w = W;
        for (int b = 0; b < 7; b++) begin
          v   = conv_raw(b, t.r, t.c);
          got = (b < 3) ? int'(g[b]) : int'(h[b-3]);
          checks++;
          if (got != sat(v, 11)) begin
            failures++;
            $display("kernel %0d f%0d (%0d,%0d): %0d expected %0d", b, t.f, t.r, t.c, got, sat(v, 11));
          end
        end
      end
    end
    if (in_valid) begin
      t = pend.pop_front();
      t.t = cycle;
      q.push_back(t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < W*H; k++) frames[f][k] = (f == 2) ? ((k % 3 == 0) ? 255 : 0) : $urandom % 256;
    for (int f = 0; f < NF; f++) begin
      int n = 0;
      while (n < W*H) begin
        if ($urandom % 4 == 0) begin
          in_valid <= 0;
          in_sof   <= 0;
        end else begin
          in_valid <= 1;
          in_sof   <= (n == 0);
          in_pix   <= 8'(frames[f][n]);
          pend.push_back('{f: f, r: n / W, c: n % W, t: 0});
          n++;
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
