// ncl_reg_first: the first NCL register of the pipeline, without completion detection.
//
// WIDTH dual-rail register bits (TH22 gates with reset to NULL) share the Ki of the next
// register. No round stands before this register, so nothing needs its Ko and it has no
// completion tree. The producer in front of it sees the Ko of the second register (the
// same signal as this register's Ki): it applies DATA while that is 1 and NULL while it is 0.
// rst loads NULL. Ports: d1/d0 input rails, ki, rst, q1/q0 output rails. No clock.
// Holding plaintext and key together (256 bits) is this implementation's choice.
module ncl_reg_first #(
  parameter int unsigned WIDTH = 256
) (
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d0,
  input  logic             ki,
  input  logic             rst,
  output logic [WIDTH-1:0] q1,
  output logic [WIDTH-1:0] q0
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ncl_th #(.N(2), .M(2), .RESET_VALUE(1'b0)) u_th1 (.a({d1[i], ki}), .rst(rst), .z(q1[i]));
    ncl_th #(.N(2), .M(2), .RESET_VALUE(1'b0)) u_th0 (.a({d0[i], ki}), .rst(rst), .z(q0[i]));
  end

endmodule
