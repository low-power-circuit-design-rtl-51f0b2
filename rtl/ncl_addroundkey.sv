// ncl_addroundkey: the AES AddRoundKey transformation in dual-rail NCL, y = s ^ k.
//
// 128 dual-rail XOR gates (ncl_xor), one per bit of state and round key. Each output bit is
// DATA only when both its state bit and key bit are DATA, and NULL only when both are NULL.
// Ports: s1/s0 state rails, k1/k0 round-key rails, y1/y0 result rails. No clock, no reset.
module ncl_addroundkey (
  input  logic [127:0] s1,
  input  logic [127:0] s0,
  input  logic [127:0] k1,
  input  logic [127:0] k0,
  output logic [127:0] y1,
  output logic [127:0] y0
);

  ncl_xor #(.W(128)) u_xor (
    .a1(s1), .a0(s0),
    .b1(k1), .b0(k0),
    .z1(y1), .z0(y0)
  );

endmodule
