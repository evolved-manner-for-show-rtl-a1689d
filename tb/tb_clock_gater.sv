// tb_clock_gater: self-checking test of the latch-and-AND clock gate.
//
// The enable is changed at random in the low phase and, as a disturbance,
// again in the high phase. Checked: gclk is low in every low phase, a pulse
// appears exactly when the enable was high before the rising edge, and a
// change of the enable while the clock is high does not alter the pulse.
module tb_clock_gater;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0;
  int   failures = 0;
  int   pulses = 0;
  int   skipped = 0;

  clock_gater dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit expected;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      #1;
      check(gclk == 1'b0, "gclk high during low phase");
      en = 1'($urandom_range(0, 1));
      #2;
      en = 1'($urandom_range(0, 1));   // last value before the edge counts
      expected = en;
      @(posedge clk);
      #1;
      check(gclk == expected, "gclk pulse does not follow enable");
      if (expected) pulses++; else skipped++;
      en = ~en;                       // disturbance while the clock is high
      #2;
      check(gclk == expected, "gclk changed during high phase");
    end
    check(pulses > 0 && skipped > 0, "both passed and gated pulses seen");
    $display("pulses passed=%0d gated=%0d", pulses, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
