// tb_lacg_enable: self-checking test of the look-ahead enable.
//
// Sparse random toggle indicators are applied to a K = 6 instance. Checked:
// en is high after reset, en after each edge equals the OR of the
// indicators sampled at that edge, and the enable flip-flop's own clock
// pulses only at the edges where en changes.
module tb_lacg_enable;
  localparam int unsigned K = 6;
  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [K-1:0] x = '0;
  logic         en;
  logic         en_ref;
  int           checks = 0;
  int           failures = 0;
  int           en_pulses = 0;
  int           want_en_pulses = 0;
  int           ones = 0;
  int           zeros = 0;

  lacg_enable #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .x(x), .en(en));

  always #5 clk = ~clk;

  always @(posedge dut.u_en_ff.gclk) if (rst_n) en_pulses++;

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
    check(en == 1'b1, "enable set by reset");
    en_ref = 1'b1;
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      for (int b = 0; b < int'(K); b++) begin
        x[b] = ($urandom_range(0, 15) == 0);
      end
      if (i % 50 < 10) x = '0;          // quiet stretches
      @(posedge clk);
      if ((|x) != en_ref) want_en_pulses++;
      en_ref = |x;
      @(negedge clk);
      check(en == en_ref, "enable is not the OR of the last edge's toggles");
      if (en) ones++; else zeros++;
    end
    check(ones > 0 && zeros > 0, "enable seen both high and low");
    check(en_pulses == want_en_pulses, "enable flip-flop clocked only on change");
    $display("en high=%0d low=%0d enable-ff pulses=%0d", ones, zeros, en_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
