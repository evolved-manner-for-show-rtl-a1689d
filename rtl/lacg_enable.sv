// lacg_enable: look-ahead clock enable for one target group.
//
// A target flip-flop can only change at clock edge n+1 if at least one of
// the K source flip-flops in its logic cone toggled at edge n. The toggle
// indicators x[i] (d ^ q of each source, high during the cycle before the
// source toggles) are ORed by a K-input OR tree, and the result is stored
// one cycle ahead in the enable flip-flop. Its output en is therefore
// "some source toggled at the last edge" and stays valid for the whole
// following cycle, which is the cycle the target's gater needs it in. The
// whole cycle ending at edge n is available for the OR tree and its wires,
// instead of only the setup window of the target.
//
// The enable flip-flop is itself auto-gated: it is clocked only when its
// value changes, so its clock load mostly goes away when sources are quiet.
// OR tree, one-cycle enable flip-flop and its self-gating follow the method.
// Choices of this design: the enable flip-flop is positive-edge and the
// target's own gater latch (clock_gater, transparent while clk is low)
// presents en from the falling edge on, which gives the same sequencing as
// an oppositely clocked enable flop; reset sets en so that the first edge
// after reset always clocks the targets.
//
// Ports: clk, rst_n (asynchronous, active low), x[K-1:0] (source toggle
// indicators), en (enable for the next rising edge of clk).
// Timing: en after edge n = OR of x sampled just before edge n.
module lacg_enable #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] x,
  output logic         en
);

  logic any_toggle;

  // K-way OR; synthesis maps the reduction onto a tree of small OR gates.
  assign any_toggle = |x;

  agff #(.RESET_VALUE(1'b1)) u_en_ff (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (any_toggle),
    .q     (en),
    .x     ()          // the enable's own toggle indicator drives nothing else
  );

endmodule
