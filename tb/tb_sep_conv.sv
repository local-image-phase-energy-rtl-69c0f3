// tb_sep_conv: one separable 9x9 convolver, all seven kernels.
//
// Seven instances (kernel ids 0..6) receive the same stream of random
// nine-pixel columns with random idle cycles, including bright/dark column
// patterns that drive the responses towards their extremes. Each output
// must match the reference two-pass convolution of the last nine columns,
// whose taps are recomputed from the kernel formulas, and must appear 13
// cycles after its newest column.
module tb_sep_conv;
  import tb_ref_pkg::*;
  import gauss_coef_pkg::conv_t;

  localparam int LAT = 13;

  logic       clk = 0, rst_n = 0, col_valid = 0;
  logic [7:0] col [9];
  logic       ok  [7];
  conv_t      out [7];

  for (genvar b = 0; b < 7; b++) begin : g_k
    sep_conv #(.KID(b)) dut (.clk, .rst_n, .col_valid, .col, .out_valid(ok[b]), .out(out[b]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int cols [$][9];                    // every accepted column
  typedef struct { int n; longint t; } tag_t;
  tag_t q [$];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tag_t   t;
    int     cc [9];
    longint mids [9];
    cycle++;
    if (rst_n && ok[0]) begin
      t = q.pop_front();
      checks++;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (t.n >= 8)
        for (int b = 0; b < 7; b++) begin
          for (int j = 0; j < 9; j++) begin
            cc = cols[t.n - 8 + j];
            mids[j] = vpass(b, cc);
          end
          checks++;
          if (int'(out[b]) != sat(hpass_raw(b, mids), 11) || ok[b] != 1'b1) begin
            failures++;
            $display("kernel %0d column %0d: %0d expected %0d", b, t.n, out[b], sat(hpass_raw(b, mids), 11));
          end
        end
    end
    if (col_valid) begin
      for (int k = 0; k < 9; k++) cc[k] = col[k];
      cols.push_back(cc);
      q.push_back('{n: cols.size() - 1, t: cycle});
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 600; i++) begin
      if ($urandom % 4 == 0) begin
        col_valid <= 0;
      end else begin
        col_valid <= 1;
        for (int k = 0; k < 9; k++)
          case ((i / 100) % 3)
            0:       col[k] <= 8'($urandom);
            1:       col[k] <= (k % 3 == i % 3) ? 8'd255 : 8'd0;
            default: col[k] <= ((i / 3) % 2 == 0) ? 8'd255 : 8'd0;
          endcase
      end
      @(posedge clk);
    end
    col_valid <= 0;
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
