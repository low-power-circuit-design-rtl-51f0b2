// ncl_round_final: the final AES round (round 10) in dual-rail NCL.
//
// SubBytes, ShiftRows and AddRoundKey with the tenth round key, which KeyExpansion forms
// from the key handed on by round 9; there is no MixColumns. The result is the ciphertext.
// ShiftRows needs no gates in dual rail: ncl_pkg::shift_rows reroutes both rails alike.
// Ports: s1/s0 state rails in, k1/k0 key rails in, y1/y0 ciphertext rails out.
// No clock, no reset.
module ncl_round_final (
  input  logic [127:0] s1,
  input  logic [127:0] s0,
  input  logic [127:0] k1,
  input  logic [127:0] k0,
  output logic [127:0] y1,
  output logic [127:0] y0
);

  logic [127:0] sb1, sb0, sr1, sr0, rk1, rk0;

  ncl_subbytes   u_sb (.s1(s1),  .s0(s0),  .y1(sb1), .y0(sb0));
  // ShiftRows: a byte permutation, applied to both rails alike (wiring only).
  assign sr1 = ncl_pkg::shift_rows(sb1);
  assign sr0 = ncl_pkg::shift_rows(sb0);
  ncl_keyexp #(.RND(10)) u_ke (.k1(k1), .k0(k0), .y1(rk1), .y0(rk0));
  ncl_addroundkey u_ark (.s1(sr1), .s0(sr0), .k1(rk1), .k0(rk0), .y1(y1), .y0(y0));

endmodule
