// tb_clock_gate -- checks the gated clock against the rule "gclk follows clk
// in cycles whose enable was high at the preceding falling edge, and stays low
// otherwise": it samples both clocks in the middle of each half period with a
// random enable that changes at random points of the low phase, counts the
// rising edges of gclk and checks there are no pulses narrower than a half
// period. The clock starts high, so that the first falling edge (at 5 ns)
// loads the enable flip-flop from its unknown power-up value; gated-clock
// edges before then are not counted.
module tb_clock_gate;
  logic clk = 1, en = 0, gclk;
  clock_gate dut (.*);

  int checks = 0, failures = 0, cycles = 0, rises = 0, expect_rises = 0;
  realtime last_edge = 0;
  always @(posedge gclk) begin
    if ($realtime > 5.0) rises++;
    last_edge = $realtime;
  end
  always @(negedge gclk) if ($realtime > 5.0) begin
    checks++;
    if ($realtime - last_edge < 5.0) failures++;   // narrower than half a period
  end

  initial begin
    repeat (20000) #10;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en_at_fall;
    #5;                                       // clk rises at 10, 30, ...
    for (int t = 0; t < 2000; t++) begin
      // falling edge at 20t + 0 (t > 0): sample the enable here
      clk = 0;
      #1 en_at_fall = en;
      #2 en = 1'($urandom);                   // enable changes during the low phase
      #2 checks++; if (gclk !== 1'b0) failures++;
      #5 clk = 1;                              // rising edge
      if (en_at_fall) expect_rises++;
      #5 checks++; if (gclk !== en_at_fall) failures++;
      #5;
      cycles++;
    end
    checks++; if (rises != expect_rises) failures++;
    $display("cycles %0d, gated rising edges %0d (expected %0d)", cycles, rises, expect_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
