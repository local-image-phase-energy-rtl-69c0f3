// tb_s2_orientation: orientation datapath of stage S2.
//
// Random sets of eight orientation energies (22 bit, from small to full
// scale, plus sets concentrated on one orientation) with random idle cycles.
// The 9-bit orientation must be within one LSB of half the argument of
// sum E_i * exp(j*2*theta_i), computed with cos and sin weights recomputed
// in the testbench, and must appear 27 cycles after the energies (30 after
// the stage input, since the energies take 3 cycles to form).
module tb_s2_orientation;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::energy_t;

  localparam int LAT = 27;

  logic       clk = 0, rst_n = 0, e_valid = 0;
  energy_t    e_ori [8];
  logic       out_valid;
  logic [8:0] orient;

  s2_orientation dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { longint e [8]; longint t; } tag_t;
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
    real  sx, sy;
    cycle++;
    if (rst_n && out_valid) begin
      t = q.pop_front();
      ex = orient_ref(t.e, sx, sy);
      checks += 2;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (adist(int'(orient), ex) > 1) begin
        failures++;
        $display("orientation %0d expected %0d", orient, ex);
      end
    end
    if (e_valid) begin
      for (int i = 0; i < 8; i++) t.e[i] = e_ori[i];
      t.t = cycle;
      q.push_back(t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      if ($urandom % 4 == 0) begin
        e_valid <= 0;
      end else begin
        e_valid <= 1;
        for (int k = 0; k < 8; k++)
          case (i % 3)
            0:       e_ori[k] <= energy_t'($urandom);
            1:       e_ori[k] <= energy_t'($urandom % 64);
            default: e_ori[k] <= (k == (i / 3) % 8) ? energy_t'($urandom) : energy_t'($urandom % 1000);
          endcase
      end
      @(posedge clk);
    end
    e_valid <= 0;
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
