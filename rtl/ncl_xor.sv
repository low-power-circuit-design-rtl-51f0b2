// ncl_xor: W dual-rail NCL exclusive-OR gates, z = a ^ b bit by bit.
//
// Per bit, four TH22 gates (C-elements with hysteresis) detect the four input
// combinations, and two TH12 gates (OR) gather them onto the output rails:
//   z1 = TH12(TH22(a1,b0), TH22(a0,b1)),  z0 = TH12(TH22(a0,b0), TH22(a1,b1)).
// An output rail rises only when both inputs are DATA, and falls only when both are NULL
// (hysteresis of the TH22 gates), so the gate is input-complete in both directions.
// Ports: a1/a0, b1/b0 input rails, z1/z0 output rails. No clock, no reset.
// The dual-rail XOR is a standard NCL element; this TH22/TH12 mapping is a choice of this
// implementation (a TH24comp-based mapping would behave the same).
module ncl_xor #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a0,
  input  logic [W-1:0] b1,
  input  logic [W-1:0] b0,
  output logic [W-1:0] z1,
  output logic [W-1:0] z0
);

  logic [W-1:0] m10, m01, m00, m11;  // TH22 outputs, one per input combination

  ncl_thv #(.W(W)) u_m10 (.set_c(a1 & b0), .any_c(a1 | b0), .z(m10));
  ncl_thv #(.W(W)) u_m01 (.set_c(a0 & b1), .any_c(a0 | b1), .z(m01));
  ncl_thv #(.W(W)) u_m00 (.set_c(a0 & b0), .any_c(a0 | b0), .z(m00));
  ncl_thv #(.W(W)) u_m11 (.set_c(a1 & b1), .any_c(a1 | b1), .z(m11));

  assign z1 = m10 | m01;
  assign z0 = m00 | m11;

endmodule
