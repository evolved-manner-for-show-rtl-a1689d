// tb_agff: self-checking test of the auto-gated flip-flop.
//
// Random data with both quiet and busy stretches is applied to two
// instances (reset value 0 and 1). Checked against a plain reference
// register: q after every edge, x = d ^ q, the reset value, and that the
// internal gated clock pulses exactly at the edges where d differed from q.
module tb_agff;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0;
  logic q0, x0, q1, x1;
  logic ref_q0, ref_q1;
  int   checks = 0;
  int   failures = 0;
  int   want_pulses0 = 0;
  int   got_pulses0 = 0;
  int   edges = 0;

  agff #(.RESET_VALUE(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .d(d), .q(q0), .x(x0));
  agff #(.RESET_VALUE(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1), .x(x1));

  always #5 clk = ~clk;

  always @(posedge dut0.gclk) if (rst_n) got_pulses0++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #1 rst_n = 1'b0;            // asynchronous reset needs an edge
    repeat (2) @(negedge clk);
    check(q0 == 1'b0 && q1 == 1'b1, "reset values");
    ref_q0 = 1'b0;
    ref_q1 = 1'b1;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      // Quiet stretches (toggle 1 in 20) alternate with busy ones (1 in 2).
      if (((i / 100) % 2) == 0) begin
        if ($urandom_range(0, 19) == 0) d = ~d;
      end else begin
        d = 1'($urandom_range(0, 1));
      end
      #1;
      check(x0 == (d ^ q0) && x1 == (d ^ q1), "toggle indicator");
      if (d != ref_q0) want_pulses0++;
      @(posedge clk);
      ref_q0 = d;
      ref_q1 = d;
      edges++;
      @(negedge clk);
      check(q0 == ref_q0 && q1 == ref_q1, "q differs from reference register");
    end
    check(got_pulses0 == want_pulses0, "gated clock pulses only when d != q");
    check(want_pulses0 < edges, "some clock pulses were suppressed");
    // Asynchronous reset in mid-run.
    d = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(q0 == 1'b0 && q1 == 1'b1, "asynchronous reset");
    $display("edges=%0d pulses=%0d expected=%0d", edges, got_pulses0, want_pulses0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
