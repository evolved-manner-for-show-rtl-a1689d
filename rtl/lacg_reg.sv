// lacg_reg: a group of WIDTH target flip-flops under look-ahead clock gating.
//
// The group shares one look-ahead enable (lacg_enable, built from the K
// source toggle indicators of the union of the targets' logic cones), one
// clock gate and one gated clock. WIDTH = 1 is individual gating of a
// single target; WIDTH = 2 is the joint gating of two targets whose OR trees
// are merged into one over the union of their sources. Each target bit is
// an auto-gated flip-flop on the gated clock, so a pulse that does reach it
// still does not reload a bit whose value would not change; each bit's own
// toggle indicator is brought out so the targets can act as sources of a
// further stage.
//
// Ports: clk, rst_n (asynchronous, active low), src_x[K-1:0] (toggle
// indicators of the sources), d/q/x[WIDTH-1:0] (target data in, data out,
// toggle indicator), en (the look-ahead enable gating the next edge),
// gclk (the group's gated clock).
// Timing: q behaves as a plain register of d, provided d depends only on the
// K sources whose indicators drive src_x and on constants. Structure follows
// the method; WIDTH up to 2 is what the method covers, larger WIDTH is
// allowed but not part of it.
module lacg_reg #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned K     = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [K-1:0]     src_x,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] x,
  output logic             en,
  output logic             gclk
);

  lacg_enable #(.K(K)) u_enable (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (src_x),
    .en    (en)
  );

  clock_gater u_gater (
    .clk  (clk),
    .en   (en),
    .gclk (gclk)
  );

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    agff u_ff (
      .clk   (gclk),
      .rst_n (rst_n),
      .d     (d[i]),
      .q     (q[i]),
      .x     (x[i])
    );
  end

endmodule
