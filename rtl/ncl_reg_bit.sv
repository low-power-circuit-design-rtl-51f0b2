// ncl_reg_bit: a dual-rail NCL register bit.
//
// Each rail passes through a TH22 gate with reset to 0 (TH22n) whose second input is the
// acknowledge/request Ki from the next stage: with Ki = 1 ("request for DATA") a DATA value
// on d is passed to q, with Ki = 0 ("request for NULL") a NULL on d is passed. Ko is the NOR
// of the two output rails: 1 when q is NULL (ready for DATA), 0 when q holds DATA.
// rst forces q to NULL, which drives Ko to 1.
// Ports: d1/d0 input rails, ki, rst, q1/q0 output rails, ko. No clock.
// In a pipeline, Ko reaches the previous stage's Ki and comes back through that stage's
// data (and in the last stage Ko is the bit's own Ki): lint tools report that path as
// circular logic. It is the NCL handshake loop and is intended.
module ncl_reg_bit (
  input  logic d1,
  input  logic d0,
  input  logic ki,
  input  logic rst,
  output logic q1,
  output logic q0,
  output logic ko
);

  ncl_th #(.N(2), .M(2), .RESET_VALUE(1'b0)) u_th1 (.a({d1, ki}), .rst(rst), .z(q1));
  ncl_th #(.N(2), .M(2), .RESET_VALUE(1'b0)) u_th0 (.a({d0, ki}), .rst(rst), .z(q0));

  assign ko = ~(q1 | q0);

endmodule
