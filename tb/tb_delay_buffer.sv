// tb_delay_buffer: synchronisation delay line.
//
// Two instances, 23 and 3 cycles deep (the energy and phase delays of stage
// S2), receive a new random word every cycle; each output must equal the
// input of exactly D cycles earlier.
module tb_delay_buffer;

  logic        clk = 0;
  logic [21:0] d = 0;
  logic [21:0] q23;
  logic [8:0]  q3;

  delay_buffer #(.W(22), .D(23)) dut23 (.clk, .d, .q(q23));
  delay_buffer #(.W(9),  .D(3))  dut3  (.clk, .d(d[8:0]), .q(q3));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [21:0] hist [$];

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    hist.push_front(d);        // hist[k] = input k cycles before this edge
    if (hist.size() > 24) begin
      checks += 2;
      if (q23 != hist[23]) begin
        failures++;
        $display("D=23: %h expected %h", q23, hist[23]);
      end
      if (q3 != hist[3][8:0]) begin
        failures++;
        $display("D=3: %h expected %h", q3, hist[3][8:0]);
      end
      void'(hist.pop_back());
    end
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      d <= 22'($urandom);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
