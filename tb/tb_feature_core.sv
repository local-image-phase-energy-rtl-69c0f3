// tb_feature_core: end-to-end test of the feature core at a short line
// length (IMG_W = 24).
//
// Several frames are streamed with random idle cycles: random noise,
// oriented sinusoidal gratings near the filters' peak frequency, and
// high-contrast stripes. One frame is cut
// short in the middle of a row so that the next frame start must re-align
// the line-buffer column count, and two frames use a 17-pixel row set
// through line_len. Every output is matched to its input pixel
// (latency must be 59 cycles); for pixels whose 9x9 window lies inside the
// frame, energy must match the reference model exactly and orientation and
// phase within one LSB. The mechanisms of the design are counted and each
// must occur: row-length changes, input gaps, frame re-alignment, phase in all
// four quadrants, arctangent input scaled down and scaled up.
module tb_feature_core;
  import tb_ref_pkg::*;

  localparam int W   = 24;
  localparam int H   = 18;
  localparam int LAT = 59;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        in_valid = 0, in_sof = 0;
  logic [7:0]  in_pix = 0;
  logic [4:0]  line_len = 5'(W);
  logic        out_valid, out_sof;
  logic [21:0] out_energy;
  logic [8:0]  out_orient, out_phase;

  feature_core #(.IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // expected outputs, one per input pixel
  typedef struct { int frame; int r; int c; longint t; bit sof; } tag_t;
  tag_t q [$];
  tag_t pend [$];        // driven, not yet sampled

  // Input monitor: samples the pixel interface on the same edge as the core.
  always @(posedge clk) begin
    tag_t t;
    cycle++;
    if (rst_n && out_valid) check_output();
    if (in_valid) begin
      t = pend.pop_front();
      t.t = cycle;
      q.push_back(t);
    end
  end

  localparam int NF = 8;
  int   frames [NF][W*H];    // image of each frame
  int   fw [NF];             // its row length

  // mechanism counters
  int n_width = 0, n_gap = 0, n_realign = 0, n_sat = 0, n_down = 0, n_up = 0, n_checked = 0;
  int quad [4] = '{0, 0, 0, 0};

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- output checker ----
  task automatic check_output();
    begin
      tag_t  t;
      feat_t f;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        t = q.pop_front();
        if (cycle - t.t != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - t.t, LAT);
        end
        if (out_sof != t.sof) begin
          failures++;
          $display("out_sof mismatch frame %0d", t.frame);
        end
        if (t.r >= 8 && t.c >= 8) begin
          img = new[W*H];
          foreach (frames[t.frame][k]) img[k] = frames[t.frame][k];
          img_w = fw[t.frame];
          f = feat_ref(t.r, t.c);
          n_checked++;
          if (f.n_sat > 0) n_sat++;
          if (f.ox >= 1048576.0 || f.ox <= -1048576.0 || f.oy >= 1048576.0 || f.oy <= -1048576.0) n_down++;
          if (f.px != 0 || f.py != 0) begin
            n_up++;
            quad[{f.py < 0, f.px < 0}]++;
          end
          checks += 3;
          if (longint'(out_energy) != f.energy) begin
            failures++;
            $display("energy f%0d (%0d,%0d): %0d expected %0d", t.frame, t.r, t.c, out_energy, f.energy);
          end
          if (adist(int'(out_orient), f.orient) > 1 && (f.ox != 0.0 || f.oy != 0.0)) begin
            failures++;
            $display("orient f%0d (%0d,%0d): %0d expected %0d", t.frame, t.r, t.c, out_orient, f.orient);
          end
          if (adist(int'(out_phase), f.phase) > 1) begin
            failures++;
            $display("phase f%0d (%0d,%0d): %0d expected %0d", t.frame, t.r, t.c, out_phase, f.phase);
          end
        end
      end
    end
  endtask

  // ---- image generators ----
  function automatic int clip8(real v);
    int p = $rtoi(v);
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction

  function automatic void make_frame(int kind, int fi);
    real phi, f0, ph0;
    phi = ($urandom % 360) * PI / 180.0;
    f0  = 0.15 + ($urandom % 100) / 1000.0;
    ph0 = ($urandom % 360) * PI / 180.0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < fw[fi]; c++)
        case (kind)
          0: frames[fi][r*fw[fi] + c] = $urandom % 256;
          1: frames[fi][r*fw[fi] + c] = clip8(128.0 + 110.0 * $cos(2.0 * PI * f0 * (c * $cos(phi) + r * $sin(phi)) + ph0)
                                 + ($urandom % 9) - 4);
          2: frames[fi][r*fw[fi] + c] = ((c / 2) % 2 == 0) ? 255 : 0;
          default: frames[fi][r*fw[fi] + c] = ((r + c) % 5 < 2) ? 250 : 10;
        endcase
  endfunction

  task automatic send_frame(int fidx, int npix);
    // one assignment per signal per cycle
    int n = 0;
    while (n < npix) begin
      if ($urandom % 5 == 0) begin
        n_gap++;
        in_valid <= 0;
        in_sof   <= 0;
      end else begin
        in_valid <= 1;
        in_sof   <= (n == 0);
        in_pix   <= 8'(frames[fidx][n]);
        pend.push_back('{frame: fidx, r: n / fw[fidx], c: n % fw[fidx], t: 0, sof: (n == 0)});
        n++;
      end
      @(posedge clk);
    end
  endtask

  initial begin
    int kinds [$] = '{0, 1, 2, 1, 3, 1, 0, 1};
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (kinds[k]) begin
      // frames 4 and 5 use a shorter row; the row length is changed while
      // the core is idle between frames
      fw[k] = (k == 4 || k == 5) ? 17 : W;
      make_frame(kinds[k], k);
      if (k == 4 || k == 6) begin
        in_valid <= 0;
        in_sof   <= 0;
        repeat (LAT + 2) @(posedge clk);
        line_len <= 5'(fw[k]);
        n_width++;
        @(posedge clk);
      end
      if (k == 2) begin
        // cut this frame short mid-row; the next frame must re-align
        send_frame(k, 9 * fw[k] + 7);
        n_realign++;
      end else begin
        send_frame(k, fw[k] * H);
      end
    end
    in_valid <= 0;
    in_sof   <= 0;
    repeat (LAT + 10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", q.size());
    end
    $display("checked pixels %0d, widths %0d, gaps %0d, realign %0d, saturated (never expected) %0d, atan scaled down %0d, up %0d, quadrants %0d/%0d/%0d/%0d",
             n_checked, n_width, n_gap, n_realign, n_sat, n_down, n_up, quad[0], quad[1], quad[2], quad[3]);
    checks++;
    if (n_gap == 0 || n_realign == 0 || n_width == 0 || n_down == 0 || n_up == 0 ||
        quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
