// ncl_round_init: the initial AES round in dual-rail NCL.
//
// The plaintext is combined with the cipher key by AddRoundKey (ncl_addroundkey). The key
// itself is handed on unchanged, next to the new state, so that round 1 can expand it.
// Ports: p1/p0 plaintext rails, k1/k0 key rails, s1/s0 state out, ko1/ko0 key out.
// No clock, no reset: the outputs follow the DATA and NULL wavefronts of the inputs.
module ncl_round_init (
  input  logic [127:0] p1,
  input  logic [127:0] p0,
  input  logic [127:0] k1,
  input  logic [127:0] k0,
  output logic [127:0] s1,
  output logic [127:0] s0,
  output logic [127:0] ko1,
  output logic [127:0] ko0
);

  ncl_addroundkey u_ark (.s1(p1), .s0(p0), .k1(k1), .k0(k0), .y1(s1), .y0(s0));

  assign ko1 = k1;
  assign ko0 = k0;

endmodule
