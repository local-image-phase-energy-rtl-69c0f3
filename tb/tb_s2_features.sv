// tb_s2_features: stage S2 with its synchronisation buffers.
//
// Random oriented filter outputs with random idle cycles and occasional
// frame-start flags. Energy (exact), orientation and phase (within one LSB)
// of each input must all leave in the same cycle, 30 cycles after the input,
// with out_sof following in_sof.
module tb_s2_features;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::*;

  localparam int LAT = 30;

  logic       clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  filt_t      c [8];
  filt_t      s [8];
  logic       out_valid, out_sof;
  energy_t    energy;
  logic [8:0] orient, phase;

  s2_features dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { longint e [8]; longint m; longint x; longint y; bit sof; longint t; } tag_t;
  tag_t q [$];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tag_t t;
    real  sx, sy;
    int   eo;
    cycle++;
    if (rst_n && out_valid) begin
      t = q.pop_front();
      eo = orient_ref(t.e, sx, sy);
      checks += 5;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (out_sof != t.sof) begin
        failures++;
        $display("out_sof wrong");
      end
      if (longint'(energy) != t.m) begin
        failures++;
        $display("energy %0d expected %0d", energy, t.m);
      end
      if (adist(int'(orient), eo) > 1) begin
        failures++;
        $display("orientation %0d expected %0d", orient, eo);
      end
      if (adist(int'(phase), ang9(real'(t.x), real'(t.y))) > 1) begin
        failures++;
        $display("phase %0d expected %0d", phase, ang9(real'(t.x), real'(t.y)));
      end
    end
    if (in_valid) begin
      t.m = 0;
      t.x = 0;
      t.y = 0;
      for (int i = 0; i < 8; i++) begin
        t.e[i] = longint'(c[i]) * c[i] + longint'(s[i]) * s[i];
        t.m += t.e[i];
        t.x += c[i];
        t.y += s[i];
      end
      t.m = t.m / 8;
      t.sof = in_sof;
      t.t = cycle;
      q.push_back(t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
        in_sof   <= 0;
      end else begin
        in_valid <= 1;
        in_sof   <= ($urandom % 40 == 0);
        for (int k = 0; k < 8; k++) begin
          c[k] <= (i % 2 == 0) ? filt_t'($urandom) : filt_t'(int'($urandom % 41) - 20);
          s[k] <= (i % 2 == 0) ? filt_t'($urandom) : filt_t'(int'($urandom % 41) - 20);
        end
      end
      @(posedge clk);
    end
    in_valid <= 0;
    in_sof   <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
