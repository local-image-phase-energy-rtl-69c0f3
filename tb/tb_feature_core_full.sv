// tb_feature_core_full: complete frames through the feature core at its
// default parameters (rows of up to 1000 pixels): first one 1000 x 1000
// frame, then one 512 x 512 frame with line_len set to 512.
//
// The test image is a synthetic zone plate (rings whose spatial frequency
// grows with the radius, so every orientation and a range of scales occur)
// with a little noise, streamed with occasional idle cycles. Every input must
// produce one output 59 cycles later; for a sample of about 25,000 interior
// pixels spread over the two frames, energy must match the reference model
// exactly and orientation and phase within one LSB.
module tb_feature_core_full;
  import tb_ref_pkg::*;

  localparam int W = 1000, H = 1000, LAT = 59, STRIDE = 49;

  logic        clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [7:0]  in_pix = 0;
  logic [9:0]  line_len = 10'(W);
  logic        out_valid, out_sof;
  logic [21:0] out_energy;
  logic [8:0]  out_orient, out_phase;

  feature_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_checked = 0;
  longint cycle = 0;
  int n_in = 0, n_out = 0;
  int fw = W;            // row length of the frame in flight
  longint t_in [$];

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    feat_t f;
    int    r, c;
    cycle++;
    if (rst_n && out_valid) begin
      r = n_out / fw;
      c = n_out % fw;
      checks++;
      if (cycle - t_in.pop_front() != LAT || out_sof != (n_out == 0)) begin
        failures++;
        $display("pixel %0d: latency or frame flag wrong", n_out);
      end
      if (r >= 8 && c >= 8 && (n_out % STRIDE == 0)) begin
        f = feat_ref(r, c);
        n_checked++;
        checks += 3;
        if (longint'(out_energy) != f.energy ||
            adist(int'(out_orient), f.orient) > 1 ||
            adist(int'(out_phase), f.phase) > 1) begin
          failures++;
          if (failures < 20)
            $display("(%0d,%0d): E %0d/%0d O %0d/%0d P %0d/%0d", r, c, out_energy, f.energy,
                     out_orient, f.orient, out_phase, f.phase);
        end
      end
      n_out++;
    end
    if (in_valid) begin
      t_in.push_back(cycle);
      n_in++;
    end
  end

  // Zone plate of w x h pixels centred in the frame, into the model's image.
  function automatic void make_frame(int w, int h);
    real rr, nz;
    img   = new[w * h];
    img_w = w;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        rr = (real'(r) - h / 2.0) ** 2 + (real'(c) - w / 2.0) ** 2;
        nz = real'(int'($urandom % 11) - 5);
        img[r*w + c] = $rtoi(128.0 + 100.0 * $cos(PI * rr / (4.0 * w)) + nz);
      end
  endfunction

  // Streams img, then waits until the last output has left.
  task automatic run_frame(int w, int h);
    for (int n = 0; n < w * h; ) begin
      if ($urandom % 16 == 0) begin
        in_valid <= 0;
        in_sof   <= 0;
      end else begin
        in_valid <= 1;
        in_sof   <= (n == 0);
        in_pix   <= 8'(img[n]);
        n++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    in_sof   <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (n_out != w * h) begin
      failures++;
      $display("%0d outputs for %0d inputs", n_out, n_in);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    make_frame(W, H);
    run_frame(W, H);
    // second frame: 512 x 512, row length changed while the core is idle
    n_out    = 0;
    n_in     = 0;
    fw       = 512;
    line_len <= 10'(512);
    make_frame(512, 512);
    @(posedge clk);
    run_frame(512, 512);
    $display("checked %0d pixels", n_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
