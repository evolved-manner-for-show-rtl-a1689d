// lacg_pkg: constants and elaboration-time functions shared by the
// look-ahead clock gating (LACG) modules.
//
// The package holds the per-flip-flop power model used to decide whether a
// target flip-flop is worth gating. A target flip-flop driven by a logic
// cone of k source flip-flops, each toggling with probability p per cycle,
// saves (in dynamic capacitance, "cdyn")
//
//   dC = (1-p)^k * (C_FF+CLK + C_FF + C_o)
//        - p * (C_X + k*C_o)
//        - (C_FF+CLK/3 - C_Aint + C_FF + C_o)
//
// The capacitances are the 22 nm library figures the method was evaluated
// with (femtofarads, stored here in tenths of a femtofarad). The model, the
// numbers and the rule "gate only where dC > 0" follow the method; the
// fixed-point evaluation (p in per-mille, (1-p)^k scaled by 10^6) is this
// implementation's own. With p = 0.03 the break-even fan-in is k = 15.
// Everything here is evaluated at elaboration; nothing becomes hardware.
package lacg_pkg;

  // Library capacitances, in units of 0.1 fF.
  localparam longint C_FF     = 257;  // clock input of a flip-flop
  localparam longint C_CLK    = 335;  // clock driver and wire
  localparam longint C_FF_CLK = 369;  // flip-flop plus its clock share
  localparam longint C_X      = 29;   // internal XOR gate
  localparam longint C_O      = 31;   // one OR-tree input with its wire
  localparam longint C_A_INT  = 17;   // internal AND gater

  // Default data-to-clock toggling probability, per-mille (0.03).
  localparam int unsigned P_TOGGLE_PERMILLE_DEFAULT = 30;

  // Largest fan-in the break-even search looks at.
  localparam int unsigned K_SEARCH_MAX = 64;

  localparam longint SCALE = 64'sd1000000;

  // (1-p)^k scaled by SCALE, p given in per-mille.
  function automatic longint pow_keep(int unsigned p_permille, int unsigned k);
    longint acc;
    acc = SCALE;
    for (int unsigned i = 0; i < k; i++) begin
      acc = (acc * (64'sd1000 - longint'(p_permille))) / 1000;
    end
    return acc;
  endfunction

  // Net cdyn saving of gating one target flip-flop, in units of
  // 0.1 fF * 10^-6. Positive means gating pays off.
  function automatic longint cdyn_saving(int unsigned p_permille, int unsigned k);
    longint gain;
    longint toggle_cost;
    longint fixed_cost;
    gain        = pow_keep(p_permille, k) * (C_FF_CLK + C_FF + C_O);
    toggle_cost = longint'(p_permille) * 64'sd1000 * (C_X + longint'(k) * C_O);
    fixed_cost  = SCALE * (C_FF_CLK / 3 - C_A_INT + C_FF + C_O);
    return gain - toggle_cost - fixed_cost;
  endfunction

  // True when a target with fan-in k should be look-ahead gated.
  function automatic bit worth_gating(int unsigned p_permille, int unsigned k);
    return cdyn_saving(p_permille, k) > 0;
  endfunction

  // Largest fan-in that still saves power at toggling probability p
  // (0 if even k = 1 loses power).
  function automatic int unsigned breakeven_k(int unsigned p_permille);
    int unsigned kmax;
    kmax = 0;
    for (int unsigned k = 1; k <= K_SEARCH_MAX; k++) begin
      if (worth_gating(p_permille, k)) kmax = k;
    end
    return kmax;
  endfunction

endpackage
