// tb_lacg_reg: self-checking test of a jointly gated pair of targets.
//
// The testbench holds four plain source registers s and exports their toggle
// indicators (next ^ present). The two targets of a WIDTH = 2, K = 4
// lacg_reg compute t0 = s0 ^ s1 ^ s2 and t1 = s1 & s3 from the sources, as a
// logic cone would. Checked against reference registers of the same
// functions: q after every edge, the enable (some source toggled at the
// previous edge), and that the gated clock pulses exactly when enabled.
// Source toggling alternates between sparse and dense stretches.
module tb_lacg_reg;
  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic [3:0] s_d = '0;
  logic [3:0] s_q = '0;
  logic [3:0] src_x;
  logic [1:0] t_d, q, x;
  logic [1:0] q_ref;
  logic       en, gclk;
  logic       en_ref;
  int         checks = 0;
  int         failures = 0;
  int         gated = 0;
  int         passed = 0;
  int         pulses = 0;
  int         want_pulses = 0;

  assign src_x = s_d ^ s_q;
  assign t_d   = {s_q[1] & s_q[3], s_q[0] ^ s_q[1] ^ s_q[2]};

  lacg_reg #(.WIDTH(2), .K(4)) dut (
    .clk(clk), .rst_n(rst_n), .src_x(src_x), .d(t_d),
    .q(q), .x(x), .en(en), .gclk(gclk)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) s_q <= s_d;

  always @(posedge gclk) if (rst_n) pulses++;

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
    check(q == 2'b00 && en == 1'b1, "reset state");
    rst_n  = 1'b1;
    en_ref = 1'b1;
    q_ref  = 2'b00;
    for (int i = 0; i < 1200; i++) begin
      for (int b = 0; b < 4; b++) begin
        if (((i / 60) % 2) == 0) begin
          if ($urandom_range(0, 24) == 0) s_d[b] = ~s_d[b];
        end else begin
          s_d[b] = 1'($urandom_range(0, 1));
        end
      end
      #1;
      check(x == (t_d ^ q), "target toggle indicators");
      check(en == en_ref, "look-ahead enable");
      if (en_ref) want_pulses++;
      if (en_ref) passed++; else gated++;
      @(posedge clk);
      q_ref  = t_d;            // a plain register would load this
      en_ref = |src_x;         // sources toggling at this edge
      @(negedge clk);
      check(q == q_ref, "target differs from plain register");
    end
    check(pulses == want_pulses, "gated clock pulses exactly when enabled");
    check(gated > 0 && passed > 0, "both gated and passed edges seen");
    $display("edges gated=%0d passed=%0d", gated, passed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
