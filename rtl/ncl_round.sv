// ncl_round: one of the nine middle AES rounds (rounds 1 to 9) in dual-rail NCL.
//
// The state goes through SubBytes, ShiftRows, MixColumns and AddRoundKey; in parallel,
// KeyExpansion (ncl_keyexp) turns the incoming round key into the key of round RND, which
// feeds AddRoundKey and is also handed on to the next round with the new state.
// ShiftRows needs no gates in dual rail: ncl_pkg::shift_rows reroutes both rails alike.
// Ports: s1/s0 state rails in, k1/k0 key rails in, y1/y0 state out, ky1/ky0 key out.
// No clock, no reset: combinational dual-rail logic between two NCL registers.
module ncl_round #(
  parameter int unsigned RND = 1   // round number, 1..9
) (
  input  logic [127:0] s1,
  input  logic [127:0] s0,
  input  logic [127:0] k1,
  input  logic [127:0] k0,
  output logic [127:0] y1,
  output logic [127:0] y0,
  output logic [127:0] ky1,
  output logic [127:0] ky0
);

  logic [127:0] sb1, sb0, sr1, sr0, mc1, mc0;

  ncl_subbytes   u_sb (.s1(s1),  .s0(s0),  .y1(sb1), .y0(sb0));
  // ShiftRows: a byte permutation, applied to both rails alike (wiring only).
  assign sr1 = ncl_pkg::shift_rows(sb1);
  assign sr0 = ncl_pkg::shift_rows(sb0);
  ncl_mixcolumns u_mc (.s1(sr1), .s0(sr0), .y1(mc1), .y0(mc0));
  ncl_keyexp #(.RND(RND)) u_ke (.k1(k1), .k0(k0), .y1(ky1), .y0(ky0));
  ncl_addroundkey u_ark (.s1(mc1), .s0(mc0), .k1(ky1), .k0(ky0), .y1(y1), .y0(y0));

  initial assert (RND >= 1 && RND <= 9) else $error("ncl_round: RND must be 1..9");

endmodule
