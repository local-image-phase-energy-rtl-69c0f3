// tb_line_buffer: row store of stage S0.
//
// Streams random frames of width 12 with random idle cycles, one of them cut
// short mid-row, and checks that one cycle after each accepted pixel the
// nine column outputs hold the same column of the current and the eight
// previous rows of the frame (for rows 8 and later), and that col_sof
// follows in_sof.
module tb_line_buffer;

  localparam int W = 12, H = 14;

  logic       clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [7:0] in_pix = 0;
  logic [3:0] line_len = 4'(W);
  logic       col_valid, col_sof;
  logic [7:0] col [9];

  line_buffer #(.PW(8), .IMG_W(W), .NROWS(8)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int frm [W*H];
  typedef struct { int r; int c; bit sof; } tag_t;
  tag_t pend [$], q [$];
  longint cycle = 0;
  int nexp = 0;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    tag_t t;
    cycle++;
    if (rst_n && col_valid) begin
      checks++;
      if (q.size() != 1) begin
        failures++;
        $display("column output without a pixel one cycle before");
      end else begin
        t = q.pop_front();
        if (col_sof != t.sof) begin
          failures++;
          $display("col_sof wrong");
        end
        if (t.r >= 8)
          for (int k = 0; k < 9; k++) begin
            checks++;
            if (int'(col[k]) != frm[(t.r - 8 + k) * W + t.c]) begin
              failures++;
              $display("(%0d,%0d) row tap %0d: %0d expected %0d", t.r, t.c, k, col[k], frm[(t.r-8+k)*W + t.c]);
            end
          end
      end
    end else if (q.size() != 0) begin
      checks++;
      failures++;
      q.delete();
      $display("missing column output");
    end
    if (in_valid) q.push_back(pend.pop_front());
  end

  task automatic stream(int npix);
    int n = 0;
    while (n < npix) begin
      if ($urandom % 3 == 0) begin
        in_valid <= 0;
        in_sof   <= 0;
      end else begin
        in_valid <= 1;
        in_sof   <= (n == 0);
        in_pix   <= 8'(frm[n]);
        pend.push_back('{r: n / W, c: n % W, sof: (n == 0)});
        n++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    in_sof   <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      foreach (frm[k]) frm[k] = $urandom % 256;
      stream((f == 0) ? 9 * W + 5 : W * H);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
