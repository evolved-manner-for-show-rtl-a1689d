// tb_lacg_top: end-to-end test of the look-ahead gated adder path at its
// default size (16-bit operands, p = 0.03, joint gating on).
//
// The operands change bit by bit with a low toggling rate, in stretches of
// quiet, sparse and dense activity, and with one asynchronous reset in
// mid-run. Independently of the design the testbench works out, with real
// arithmetic, the break-even fan-in of the power model and from it how each
// sum bit is gated (jointly with its neighbour, on its own, or not at all).
// Checked at every cycle: sum equals a plain-register model (a + b two edges
// later) and each bit's enable equals "some source in its cone toggled at
// the previous edge" (1 for ungated bits). Counted, and required to occur:
// suppressed edges of jointly and of individually gated targets, enabled
// edges of both, ungated targets, suppressed edges of source flip-flops and
// of enable flip-flops, and the reset.
module tb_lacg_top;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned NT    = WIDTH + 1;
  localparam real         P     = 0.03;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic [WIDTH-1:0] a = '0;
  logic [WIDTH-1:0] b = '0;
  logic [WIDTH:0]   sum;
  logic [WIDTH:0]   sum_en;

  lacg_top dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .sum_en(sum_en));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int joint_gated = 0, joint_passed = 0;
  int single_gated = 0, single_passed = 0;
  int plain_edges = 0;
  int src_suppressed = 0;
  int enff_suppressed = 0;
  int resets = 0;

  // Gating style of each sum bit: 0 ungated, 1 individual, 2 joint.
  int unsigned style [NT];
  int unsigned cone  [NT];   // highest source bit the bit's enable watches

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic real saving(int unsigned k);
    real keep;
    keep = (1.0 - P) ** k;
    return keep * (36.9 + 25.7 + 3.1) - P * (2.9 + k * 3.1)
           - (36.9 / 3.0 - 1.7 + 25.7 + 3.1);
  endfunction

  function automatic int unsigned hi_of(int unsigned j);
    return (j < WIDTH) ? j : WIDTH - 1;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [WIDTH-1:0] a_q, b_q;      // model of the source registers
    logic [WIDTH:0]   sum_ref;
    logic [WIDTH-1:0] tog_a, tog_b;  // source toggles at the last edge
    int unsigned      kmax;
    int unsigned      mode;
    bit               en_exp;

    // Break-even fan-in, worked out with real arithmetic.
    kmax = 0;
    for (int unsigned k = 1; k <= 64; k++) if (saving(k) > 0.0) kmax = k;
    check(kmax == 15, "break-even fan-in at p = 0.03 is 15");
    for (int unsigned j = 0; j < NT; j++) begin
      int unsigned jl;
      jl = j | 1;
      if (jl < NT && 2 * (hi_of(jl) + 1) <= kmax) begin
        style[j] = 2;
        cone[j]  = hi_of(jl);
      end else if (2 * (hi_of(j) + 1) <= kmax) begin
        style[j] = 1;
        cone[j]  = hi_of(j);
      end else begin
        style[j] = 0;
        cone[j]  = hi_of(j);
      end
    end

    for (int pass = 0; pass < 2; pass++) begin
      rst_n = 1'b0;
      @(negedge clk);
      @(negedge clk);
      check(sum == '0, "sum cleared by reset");
      check(sum_en == '1, "enables set by reset");
      rst_n = 1'b1;
      a_q = '0;
      b_q = '0;
      sum_ref = '0;
      tog_a = '1;
      tog_b = '1;
      for (int i = 0; i < 3000; i++) begin
        // Inputs for the coming edge; activity pattern changes every 100 cycles.
        mode = (i / 100) % 3;
        for (int unsigned n = 0; n < WIDTH; n++) begin
          int unsigned r;
          r = (mode == 0) ? 200 : (mode == 1) ? 33 : 4;
          if ($urandom_range(0, r - 1) == 0) a[n] = ~a[n];
          if ($urandom_range(0, r - 1) == 0) b[n] = ~b[n];
        end
        // Enables as they stand before the edge.
        for (int unsigned j = 0; j < NT; j++) begin
          if (style[j] == 0) en_exp = 1'b1;
          else begin
            en_exp = 1'b0;
            for (int unsigned n = 0; n <= cone[j]; n++) en_exp |= tog_a[n] | tog_b[n];
          end
          check(sum_en[j] == en_exp, $sformatf("enable of sum bit %0d", j));
          case (style[j])
            0: plain_edges++;
            1: if (en_exp) single_passed++; else single_gated++;
            default: if (en_exp) joint_passed++; else joint_gated++;
          endcase
        end
        for (int unsigned n = 0; n < WIDTH; n++) begin
          if (a[n] == a_q[n]) src_suppressed++;
          if (b[n] == b_q[n]) src_suppressed++;
        end
        if (dut.g_pair[0].g_joint.u_grp.u_enable.u_en_ff.x == 1'b0) enff_suppressed++;
        @(posedge clk);
        sum_ref = {1'b0, a_q} + {1'b0, b_q};
        tog_a = a ^ a_q;
        tog_b = b ^ b_q;
        a_q = a;
        b_q = b;
        @(negedge clk);
        check(sum == sum_ref, "sum differs from plain-register model");
      end
      resets++;
    end

    check(joint_gated > 0 && joint_passed > 0, "joint gating gated and passed");
    check(single_gated > 0 && single_passed > 0, "individual gating gated and passed");
    check(plain_edges > 0, "ungated targets present");
    check(src_suppressed > 0, "source auto-gating happened");
    check(enff_suppressed > 0, "enable flip-flop self-gating happened");
    check(resets == 2, "mid-run reset exercised");
    $display("kmax=%0d joint gated/passed=%0d/%0d single gated/passed=%0d/%0d plain=%0d",
             kmax, joint_gated, joint_passed, single_gated, single_passed, plain_edges);
    $display("source edges suppressed=%0d enable-ff edges suppressed=%0d resets=%0d",
             src_suppressed, enff_suppressed, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
