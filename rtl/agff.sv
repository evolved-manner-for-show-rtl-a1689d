// agff: auto-gated flip-flop.
//
// A positive-edge D flip-flop that clocks itself only when its next value
// differs from its present one. The internal XOR x = d ^ q is the toggle
// indicator; it drives the flip-flop's own clock gate and is also brought
// out, because the look-ahead enables of other flip-flops are built from it.
// The flip-flop is functionally a plain register: a suppressed pulse would
// only have reloaded the value already held.
//
// Ports: clk (clock, may itself be a gated clock), rst_n (asynchronous,
// active low, loads RESET_VALUE), d, q, x (d ^ q, "this flip-flop toggles
// at the next clock edge it receives").
// Timing: q takes d at a rising edge of clk when d != q; x is combinational.
// The self-gating by the XOR follows the method; the asynchronous reset and
// its value are this design's choice.
module agff #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic x
);

  logic gclk;

  assign x = d ^ q;

  clock_gater u_gater (
    .clk  (clk),
    .en   (x),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end

endmodule
