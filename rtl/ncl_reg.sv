// ncl_reg: WIDTH-bit NCL register with completion detection.
//
// WIDTH dual-rail register bits (ncl_reg_bit) share one Ki from the next stage. Their
// per-bit Ko signals go through a TH44 completion tree (ncl_completion), whose output is the
// register's Ko: it falls to 0 once every bit holds DATA and rises to 1 once every bit is
// NULL again. Ko drives the Ki of the register before it, which is the whole handshake of an
// NCL pipeline: a register accepts DATA only while the next one asks for DATA, and NULL only
// while the next one asks for NULL, so two DATA wavefronts are always separated by a NULL.
// rst loads NULL into every bit, so Ko rises to 1 (request for DATA).
// Ports: d1/d0 input rails, ki, rst, q1/q0 output rails, ko. No clock.
module ncl_reg #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d0,
  input  logic             ki,
  input  logic             rst,
  output logic [WIDTH-1:0] q1,
  output logic [WIDTH-1:0] q0,
  output logic             ko
);

  logic [WIDTH-1:0] ko_bit;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ncl_reg_bit u_bit (
      .d1 (d1[i]),
      .d0 (d0[i]),
      .ki (ki),
      .rst(rst),
      .q1 (q1[i]),
      .q0 (q0[i]),
      .ko (ko_bit[i])
    );
  end

  ncl_completion #(.N(WIDTH)) u_cd (
    .ki_bits(ko_bit),
    .ko     (ko)
  );

endmodule
