// tb_lacg_breakeven: checks the gating decision of the power model over the
// whole (k, p) plane of the break-even curve, and the gated path built with
// a different toggling probability.
//
// Part 1 sweeps k = 1..20 and p = 0.005..0.400 and compares the fixed-point
// decision of lacg_pkg with the same model evaluated in real arithmetic in
// the testbench; a disagreement is allowed only within 0.05 fF of break-even
// (fixed-point rounding). It also checks the break-even fan-in at p = 0.03
// (k = 15) and that the break-even p falls as k grows.
// Part 2 builds an 8-bit lacg_top for p = 0.10, where break-even is k = 4:
// sum bits 0 and 1 (fan-in 4) must be jointly gated and every other bit
// ungated, and the sum must stay correct.
module tb_lacg_breakeven;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic real saving(real p, int unsigned k);
    return ((1.0 - p) ** k) * (36.9 + 25.7 + 3.1) - p * (2.9 + k * 3.1)
           - (36.9 / 3.0 - 1.7 + 25.7 + 3.1);
  endfunction

  localparam int unsigned W = 8;
  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [W-1:0] a = '0, b = '0;
  logic [W:0]   sum, sum_en;

  lacg_top #(.WIDTH(W), .P_TOGGLE_PERMILLE(100)) dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .sum(sum), .sum_en(sum_en)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned last_p;
    int          gated_edges = 0;
    logic [W-1:0] a_q = '0, b_q = '0;
    logic [W:0]   sum_ref;

    // Part 1: the (k, p) plane.
    last_p = 1000;
    for (int unsigned k = 1; k <= 20; k++) begin
      int unsigned be_p = 0;   // largest p (per-mille) that still saves
      for (int unsigned pm = 5; pm <= 400; pm += 5) begin
        real s;
        bit  model;
        s = saving(real'(pm) / 1000.0, k);
        model = lacg_pkg::worth_gating(pm, k);
        if (s > 0.05 || s < -0.05) check(model == (s > 0.0), $sformatf("decision at k=%0d p=%0d/1000", k, pm));
        if (model) be_p = pm;
      end
      check(be_p <= last_p, $sformatf("break-even p not falling at k=%0d", k));
      last_p = be_p;
      $display("k=%0d break-even p ~ %0d/1000", k, be_p);
    end
    check(lacg_pkg::breakeven_k(30) == 15, "break-even fan-in 15 at p = 0.03");
    check(lacg_pkg::breakeven_k(100) == 4, "break-even fan-in 4 at p = 0.10");

    // Part 2: an 8-bit path built for p = 0.10.
    #1 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      for (int n = 0; n < int'(W); n++) begin
        if ($urandom_range(0, 9) == 0) a[n] = ~a[n];
        if ($urandom_range(0, 9) == 0) b[n] = ~b[n];
      end
      check(sum_en[W:2] == '1, "bits past break-even stay ungated");
      check(sum_en[0] == sum_en[1], "bits 0 and 1 share one enable");
      if (!sum_en[0]) gated_edges++;
      @(posedge clk);
      sum_ref = {1'b0, a_q} + {1'b0, b_q};
      a_q = a;
      b_q = b;
      @(negedge clk);
      check(sum == sum_ref, "sum differs from plain-register model");
    end
    check(gated_edges > 0, "joint pair gated at least once");
    $display("joint pair gated edges=%0d", gated_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
