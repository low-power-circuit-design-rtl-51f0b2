// ncl_thv: a vector of W NCL threshold gates with hysteresis, given their conditions.
//
// Gate i sets its output when set_c[i] is high (its threshold is met) and clears it when
// any_c[i] is low (none of its inputs is asserted); otherwise it holds. The caller works
// out both conditions from the gate inputs, so one instance stands for a whole row of
// TH22, TH44 or larger THnn gates (the dual-rail XOR and S-box use it that way).
// No clock and no reset: the gates clear when a NULL wavefront reaches them.
// The latch is the gate's hysteresis.
module ncl_thv #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] set_c,
  input  logic [W-1:0] any_c,
  output logic [W-1:0] z
);

  always_latch begin
    for (int unsigned i = 0; i < W; i++)
      if (set_c[i] || !any_c[i]) z[i] = set_c[i];
  end

endmodule
