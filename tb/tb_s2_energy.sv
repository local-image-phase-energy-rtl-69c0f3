// tb_s2_energy: energy datapath of stage S2.
//
// Random oriented filter outputs (including the extreme values -1024 and
// 1023) with random idle cycles. The per-orientation energies c^2 + s^2 must
// appear 3 cycles and their mean (sum / 8, truncated) 7 cycles after the
// input.
module tb_s2_energy;
  import gauss_coef_pkg::*;

  logic    clk = 0, rst_n = 0, in_valid = 0;
  filt_t   c [8];
  filt_t   s [8];
  logic    e_valid, out_valid;
  energy_t e_ori [8];
  energy_t mean;

  s2_energy dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { longint e [8]; longint m; longint t; } tag_t;
  tag_t qe [$], qm [$];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tag_t t;
    cycle++;
    if (rst_n && e_valid) begin
      t = qe.pop_front();
      checks++;
      if (cycle - t.t != 3) begin
        failures++;
        $display("e_ori latency %0d", cycle - t.t);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (longint'(e_ori[i]) != t.e[i]) begin
          failures++;
          $display("e_ori[%0d] %0d expected %0d", i, e_ori[i], t.e[i]);
        end
      end
    end
    if (rst_n && out_valid) begin
      t = qm.pop_front();
      checks += 2;
      if (cycle - t.t != 7) begin
        failures++;
        $display("mean latency %0d", cycle - t.t);
      end
      if (longint'(mean) != t.m) begin
        failures++;
        $display("mean %0d expected %0d", mean, t.m);
      end
    end
    if (in_valid) begin
      t.m = 0;
      for (int i = 0; i < 8; i++) begin
        t.e[i] = longint'(c[i]) * c[i] + longint'(s[i]) * s[i];
        t.m += t.e[i];
      end
      t.m = t.m / 8;
      t.t = cycle;
      qe.push_back(t);
      qm.push_back(t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 600; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
      end else begin
        in_valid <= 1;
        for (int k = 0; k < 8; k++) begin
          c[k] <= (i < 20) ? -11'sd1024 : filt_t'($urandom);
          s[k] <= (i < 20) ? 11'sd1023  : filt_t'($urandom);
        end
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (qe.size() != 0 || qm.size() != 0) begin
      failures++;
      $display("outputs missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
