// tb_s1_oriented_filters: stage S1, the bank of eight oriented filters.
//
// The stage receives random basis responses, full
// 11-bit range, with random idle cycles. Even and odd outputs must equal the
// steering sums with weights recomputed from cos and sin, rounded and
// saturated, 5 cycles after the input; out_sof must follow in_sof.
module tb_s1_oriented_filters;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::*;

  localparam int LAT = 5;

  logic  clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, out_valid, out_sof;
  conv_t g [3];
  conv_t h [4];
  logic  ok [8];
  filt_t c  [8];
  filt_t s  [8];

  s1_oriented_filters dut (.clk, .rst_n, .in_valid, .in_sof, .g, .h, .out_valid, .out_sof, .c, .s);
  always_comb for (int i = 0; i < 8; i++) ok[i] = out_valid;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;
  longint cycle = 0;
  typedef struct { int g [3]; int h [4]; longint t; bit sof; } tag_t;
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
    cycle++;
    if (rst_n && ok[0]) begin
      t = q.pop_front();
      checks++;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      checks++;
      if (out_sof != t.sof) begin
        failures++;
        $display("out_sof wrong");
      end
      for (int i = 0; i < 8; i++) begin
        checks += 2;
        if (steer_c(i, t.g) == 1023 || steer_c(i, t.g) == -1024) n_sat++;
        if (int'(c[i]) != steer_c(i, t.g) || int'(s[i]) != steer_s(i, t.h)) begin
          failures++;
          $display("ori %0d: c %0d/%0d s %0d/%0d", i, c[i], steer_c(i, t.g), s[i], steer_s(i, t.h));
        end
      end
    end
    if (in_valid) begin
      for (int k = 0; k < 3; k++) t.g[k] = g[k];
      for (int k = 0; k < 4; k++) t.h[k] = h[k];
      t.t = cycle;
      t.sof = in_sof;
      q.push_back(t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 800; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
        in_sof   <= 0;
      end else begin
        in_valid <= 1;
        in_sof   <= (i % 50 == 1);
        for (int k = 0; k < 3; k++) g[k] <= (i < 100) ? ((k == 1) ? -11'sd1024 : 11'sd1023) : conv_t'($urandom);
        for (int k = 0; k < 4; k++) h[k] <= conv_t'($urandom);
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_sat == 0) begin
      failures++;
      $display("%0d outputs missing, %0d saturated", q.size(), n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
