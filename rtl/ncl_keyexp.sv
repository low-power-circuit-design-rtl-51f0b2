// ncl_keyexp: one step of the AES-128 key expansion in dual-rail NCL.
//
// From round key k (words w0..w3, w0 = bits [127:96]) it forms the key of round RND:
//   t   = SubWord(RotWord(w3)) ^ {rcon(RND), 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'.
// SubWord uses four ncl_sbox instances, the XORs are ncl_xor gates. XOR with the constant
// rcon needs no gate in dual rail: the two rails of each bit where rcon is 1 are swapped.
// The step runs in each round beside the data path, so the round key travels down the
// pipeline with the state it belongs to (this implementation's choice of where the key
// schedule lives; the function is the FIPS-197 key expansion).
// Ports: k1/k0 key rails in, y1/y0 next-key rails out. No clock, no reset.
module ncl_keyexp #(
  parameter int unsigned RND = 1   // key-expansion round, 1..10
) (
  input  logic [127:0] k1,
  input  logic [127:0] k0,
  output logic [127:0] y1,
  output logic [127:0] y0
);

  import ncl_pkg::*;

  localparam logic [31:0] RCON_WORD = {rcon(RND), 24'h000000};

  logic [31:0] r1, r0;   // RotWord(w3)
  logic [31:0] u1, u0;   // SubWord(RotWord(w3))
  logic [31:0] t1, t0;   // after the round constant

  assign r1 = {k1[23:0], k1[31:24]};
  assign r0 = {k0[23:0], k0[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sub
    ncl_sbox u_sbox (
      .x1(r1[8*b +: 8]), .x0(r0[8*b +: 8]),
      .y1(u1[8*b +: 8]), .y0(u0[8*b +: 8])
    );
  end

  // XOR with a constant: swap the rails where the constant bit is 1.
  assign t1 = (u1 & ~RCON_WORD) | (u0 & RCON_WORD);
  assign t0 = (u0 & ~RCON_WORD) | (u1 & RCON_WORD);

  ncl_xor #(.W(32)) u_w0 (.a1(k1[127:96]), .a0(k0[127:96]), .b1(t1),         .b0(t0),
                          .z1(y1[127:96]), .z0(y0[127:96]));
  ncl_xor #(.W(32)) u_w1 (.a1(k1[95:64]),  .a0(k0[95:64]),  .b1(y1[127:96]), .b0(y0[127:96]),
                          .z1(y1[95:64]),  .z0(y0[95:64]));
  ncl_xor #(.W(32)) u_w2 (.a1(k1[63:32]),  .a0(k0[63:32]),  .b1(y1[95:64]),  .b0(y0[95:64]),
                          .z1(y1[63:32]),  .z0(y0[63:32]));
  ncl_xor #(.W(32)) u_w3 (.a1(k1[31:0]),   .a0(k0[31:0]),   .b1(y1[63:32]),  .b0(y0[63:32]),
                          .z1(y1[31:0]),   .z0(y0[31:0]));

  initial assert (RND >= 1 && RND <= 10) else $error("ncl_keyexp: RND must be 1..10");

endmodule
