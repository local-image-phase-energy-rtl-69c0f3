// tb_s2_phase: phase datapath of stage S2.
//
// Random even and odd filter outputs (full range, small values, and all-zero
// sets) with random idle cycles. The 9-bit phase must be within one LSB of
// atan2(sum s_i, sum c_i) and appear 27 cycles after the input.
module tb_s2_phase;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::filt_t;

  localparam int LAT = 27;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  filt_t      c [8];
  filt_t      s [8];
  logic       out_valid;
  logic [8:0] phase;

  s2_phase dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int quad [4] = '{0, 0, 0, 0};
  longint cycle = 0;
  typedef struct { longint x; longint y; longint t; } tag_t;
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
    int   ex;
    cycle++;
    if (rst_n && out_valid) begin
      t = q.pop_front();
      ex = ang9(real'(t.x), real'(t.y));
      checks += 2;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (adist(int'(phase), ex) > 1) begin
        failures++;
        $display("phase %0d expected %0d (x %0d y %0d)", phase, ex, t.x, t.y);
      end
    end
    if (in_valid) begin
      t.x = 0;
      t.y = 0;
      for (int i = 0; i < 8; i++) begin
        t.x += c[i];
        t.y += s[i];
      end
      t.t = cycle;
      q.push_back(t);
      quad[{t.y < 0, t.x < 0}]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
      end else begin
        in_valid <= 1;
        for (int k = 0; k < 8; k++) begin
          case (i % 4)
            0, 1: begin c[k] <= filt_t'($urandom); s[k] <= filt_t'($urandom); end
            2:    begin c[k] <= filt_t'(int'($urandom % 7) - 3); s[k] <= filt_t'(int'($urandom % 7) - 3); end
            default: begin c[k] <= '0; s[k] <= '0; end
          endcase
        end
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0 || quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) begin
      failures++;
      $display("%0d outputs missing or a quadrant not reached", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
