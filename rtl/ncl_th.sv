// ncl_th: one NCL threshold gate with hysteresis, THmn with optional input weights.
//
// The gate has N inputs a[N-1:0] and threshold M. Input i carries weight WEIGHTS[4*i +: 4]
// (1 for a plain gate). The output is asserted once the weighted count of asserted inputs
// reaches M, and it then stays asserted (hysteresis) until every input is deasserted again;
// between those two events the gate holds its value. That is the NCL gate behaviour
// (TH12 = OR, TH22 = Muller C-element, TH44 = 4-input C-element, TH34w22 = weighted).
//
// rst forces the output to RESET_VALUE: RESET_VALUE = 0 is the "n" (reset-to-NULL) gate
// used in NCL registers, 1 the "d" gate; tie rst low for a gate without reset.
// Timing: the gate is level sensitive and has no clock; the state is held by a latch,
// which is the gate's hysteresis, not an accident of coding.
module ncl_th #(
  parameter int unsigned N           = 2,
  parameter int unsigned M           = 2,
  parameter logic [31:0] WEIGHTS     = {8{4'd1}},  // up to 8 inputs, 4-bit weight each
  parameter bit          RESET_VALUE = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic         rst,
  output logic         z
);

  int unsigned sum;
  logic        set_c;
  logic        clr_c;
  logic        state;   // the gate's held output

  always_comb begin
    sum = 0;
    for (int unsigned i = 0; i < N; i++)
      if (a[i]) sum = sum + int'(WEIGHTS[4*i +: 4]);
    set_c = (sum >= M);
    clr_c = (a == '0);
  end

  always_latch begin
    if (rst)                 state = RESET_VALUE;
    else if (set_c || clr_c) state = set_c;
  end

  assign z = state;

  initial begin
    assert (N >= 1 && N <= 8) else $error("ncl_th: N must be 1..8");
    assert (M >= 1)           else $error("ncl_th: M must be at least 1");
  end

endmodule
