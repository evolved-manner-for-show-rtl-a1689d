// lacg_top: a register-to-register path under look-ahead clock gating.
//
// Two source registers a_q and b_q (WIDTH auto-gated flip-flops each) load
// the inputs a and b every cycle. Their outputs feed a logic cone, here a
// WIDTH-bit adder, whose WIDTH+1 result bits are the target flip-flops sum.
// Sum bit j depends on source bits 0..j of both operands, so its fan-in is
// k_j = 2(j+1) (the carry-out bit sees all 2*WIDTH sources).
//
// Each target is clocked only at edges where one of its sources toggled at
// the edge before: the sources' toggle indicators (d ^ q) are ORed per
// target, stored one cycle ahead and used to gate the target's clock.
// Whether a target is gated at all is decided at elaboration by the
// break-even rule of lacg_pkg: with the toggling probability
// P_TOGGLE_PERMILLE, only fan-ins whose net capacitance saving is positive
// are gated; the others keep an ungated plain flip-flop. When JOINT is set,
// neighbouring targets 2m and 2m+1 share one merged OR tree and one gater if
// the fan-in of the merged cone still saves power; a target whose pair does
// not qualify is gated on its own if its own fan-in qualifies.
//
// What follows the method: auto-gated sources, per-target OR of source
// toggles registered one cycle ahead, the gater, the break-even rule and
// joint gating of two targets. This design's own choices: the adder as the
// logic cone, the pairing of neighbouring bits, WIDTH, and the asynchronous
// active-low reset that clears all registers.
//
// Ports: clk, rst_n, a, b (operands, registered at every edge), sum (target
// register, equal to a_q + b_q of the cycle before, i.e. a + b two edges
// after they are applied), sum_en (per target bit: the enable that gates
// its next clock edge; constant 1 for targets left ungated).
// Timing: a and b sampled at edge n appear in sum after edge n+1.
module lacg_top #(
  parameter int unsigned WIDTH             = 16,
  parameter int unsigned P_TOGGLE_PERMILLE = lacg_pkg::P_TOGGLE_PERMILLE_DEFAULT,
  parameter bit          JOINT             = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum,
  output logic [WIDTH:0]   sum_en
);

  localparam int unsigned NT = WIDTH + 1;  // number of target flip-flops

  // Highest source bit in the cone of target bit j.
  function automatic int unsigned cone_hi(int unsigned j);
    return (j < WIDTH) ? j : WIDTH - 1;
  endfunction

  // Fan-in (number of source flip-flops) of target bit j.
  function automatic int unsigned fan_in(int unsigned j);
    return 2 * (cone_hi(j) + 1);
  endfunction

  // Source toggle indicators; those of bits that only feed ungated targets
  // are left unused.
  logic [WIDTH-1:0] a_q, a_x;
  logic [WIDTH-1:0] b_q, b_x;
  logic [WIDTH:0]   sum_d;

  // Source registers: auto-gated flip-flops on the free-running clock.
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_src
    agff u_a (.clk(clk), .rst_n(rst_n), .d(a[i]), .q(a_q[i]), .x(a_x[i]));
    agff u_b (.clk(clk), .rst_n(rst_n), .d(b[i]), .q(b_q[i]), .x(b_x[i]));
  end

  // Logic cone between sources and targets.
  assign sum_d = {1'b0, a_q} + {1'b0, b_q};

  // Target flip-flops, grouped in pairs.
  for (genvar m = 0; m < int'((NT + 1) / 2); m++) begin : g_pair
    localparam int unsigned J0     = 2 * m;
    localparam bit          HAS_J1 = (2 * m + 1) < NT;
    localparam int unsigned JL     = HAS_J1 ? J0 + 1 : J0;
    localparam int unsigned HI_L   = cone_hi(JL);

    if (JOINT && HAS_J1 && lacg_pkg::worth_gating(P_TOGGLE_PERMILLE, fan_in(JL)))
    begin : g_joint
      // Cone of bit J0 is contained in that of J0+1: the union is the latter.
      logic grp_en;

      lacg_reg #(.WIDTH(2), .K(fan_in(JL))) u_grp (
        .clk   (clk),
        .rst_n (rst_n),
        .src_x ({a_x[HI_L:0], b_x[HI_L:0]}),
        .d     (sum_d[JL:J0]),
        .q     (sum[JL:J0]),
        .x     (),
        .en    (grp_en),
        .gclk  ()
      );
      assign sum_en[JL:J0] = {2{grp_en}};
    end else begin : g_split
      for (genvar j = J0; j <= JL; j++) begin : g_bit
        localparam int unsigned HI = cone_hi(j);

        if (lacg_pkg::worth_gating(P_TOGGLE_PERMILLE, fan_in(j))) begin : g_gated
          lacg_reg #(.WIDTH(1), .K(fan_in(j))) u_one (
            .clk   (clk),
            .rst_n (rst_n),
            .src_x ({a_x[HI:0], b_x[HI:0]}),
            .d     (sum_d[j]),
            .q     (sum[j]),
            .x     (),
            .en    (sum_en[j]),
            .gclk  ()
          );
        end else begin : g_plain
          // Fan-in past break-even: gating would cost more than it saves.
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) sum[j] <= 1'b0;
            else        sum[j] <= sum_d[j];
          end
          assign sum_en[j] = 1'b1;
        end
      end
    end
  end

endmodule
