// tb_cordic_atan: pipelined four-quadrant arctangent.
//
// Random vectors over a wide range of magnitudes (from a few LSBs to the
// full 35-bit input, so the input scaling shifts both up and down), the four
// axes, and the zero vector, with random idle cycles. The 9-bit angle must be
// within one LSB (2*pi/512) of atan2 and appear 23 cycles after the input.
module tb_cordic_atan;
  import tb_ref_pkg::*;

  localparam int IN_W = 35, LAT = 23;

  logic                   clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0] x = 0, y = 0;
  logic                   out_valid;
  logic [8:0]             ang;

  cordic_atan #(.IN_W(IN_W), .ITER(20), .OUT_W(9)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_up = 0, n_down = 0;
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
    int   e;
    cycle++;
    if (rst_n && out_valid) begin
      t = q.pop_front();
      e = ang9(real'(t.x), real'(t.y));
      checks += 2;
      if (cycle - t.t != LAT) begin
        failures++;
        $display("latency %0d", cycle - t.t);
      end
      if (adist(int'(ang), e) > 1) begin
        failures++;
        $display("atan2(%0d, %0d): %0d expected %0d", t.y, t.x, ang, e);
      end
    end
    if (in_valid) begin
      t.x = x;
      t.y = y;
      t.t = cycle;
      q.push_back(t);
      if ((t.x < 0 ? -t.x : t.x) >= (1 << 19) || (t.y < 0 ? -t.y : t.y) >= (1 << 19)) n_down++;
      else n_up++;
    end
  end

  function automatic longint rnd(int bits);
    longint v = {$urandom, $urandom};
    v = v >>> (64 - bits);          // signed value of 'bits' bits
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
      end else begin
        in_valid <= 1;
        case (i % 8)
          0: begin x <= IN_W'(rnd(1 + $urandom % IN_W)); y <= IN_W'(rnd(1 + $urandom % IN_W)); end
          1: begin x <= IN_W'(rnd(4)); y <= IN_W'(rnd(4)); end
          2: begin x <= '0; y <= IN_W'(rnd(20)); end
          3: begin x <= IN_W'(rnd(20)); y <= '0; end
          4: begin x <= '0; y <= '0; end
          5: begin x <= {1'b1, {(IN_W-1){1'b0}}}; y <= IN_W'(rnd(IN_W)); end
          default: begin x <= IN_W'(rnd(IN_W)); y <= IN_W'(rnd(IN_W)); end
        endcase
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_up == 0 || n_down == 0) begin
      failures++;
      $display("%0d outputs missing, scaled up %0d, down %0d", q.size(), n_up, n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
