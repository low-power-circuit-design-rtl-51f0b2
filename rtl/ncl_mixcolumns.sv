// ncl_mixcolumns: the AES MixColumns transformation in dual-rail NCL.
//
// Each column (a0, a1, a2, a3) of the state is multiplied by the circulant matrix
// (2 3 1 1) over GF(2^8). The network used is
//   t = a0 ^ a1 ^ a2 ^ a3,   out_r = a_r ^ t ^ xtime(a_r ^ a_(r+1 mod 4))
// built from dual-rail XOR gates (ncl_xor) only: xtime, the multiplication by 2, is a
// shift plus an XOR of bit 7 into bits 1, 3 and 4. Every input bit feeds some output bit
// through input-complete XOR gates, so the outputs are all DATA (NULL) only after the inputs
// all are. Byte r of column c is bits [127-32c-8r -: 8].
// Ports: s1/s0 state rails in, y1/y0 rails out. No clock, no reset.
// The function is AES MixColumns; the XOR network is this implementation's choice.
module ncl_mixcolumns (
  input  logic [127:0] s1,
  input  logic [127:0] s0,
  output logic [127:0] y1,
  output logic [127:0] y0
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [3:0][7:0] a1, a0;    // column bytes, index = row
    logic [7:0]      p1, p0;    // a0 ^ a1
    logic [7:0]      q1, q0;    // a2 ^ a3
    logic [7:0]      t1, t0;    // a0 ^ a1 ^ a2 ^ a3
    logic [3:0][7:0] d1, d0;    // a_r ^ a_(r+1)
    logic [3:0][7:0] x1, x0;    // xtime(d_r)
    logic [3:0][7:0] e1, e0;    // a_r ^ t
    logic [3:0][2:0] h1, h0;    // xtime feedback bits 4, 3, 1

    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a1[r] = s1[127-32*c-8*r -: 8];
      assign a0[r] = s0[127-32*c-8*r -: 8];
    end

    ncl_xor #(.W(8)) u_p (.a1(a1[0]), .a0(a0[0]), .b1(a1[1]), .b0(a0[1]), .z1(p1), .z0(p0));
    ncl_xor #(.W(8)) u_q (.a1(a1[2]), .a0(a0[2]), .b1(a1[3]), .b0(a0[3]), .z1(q1), .z0(q0));
    ncl_xor #(.W(8)) u_t (.a1(p1),    .a0(p0),    .b1(q1),    .b0(q0),    .z1(t1), .z0(t0));

    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned RN = (r + 1) % 4;

      ncl_xor #(.W(8)) u_d (
        .a1(a1[r]), .a0(a0[r]), .b1(a1[RN]), .b0(a0[RN]), .z1(d1[r]), .z0(d0[r])
      );

      // xtime: bits 1, 3, 4 take an XOR with bit 7, the others are a shift.
      ncl_xor #(.W(3)) u_h (
        .a1({d1[r][3], d1[r][2], d1[r][0]}), .a0({d0[r][3], d0[r][2], d0[r][0]}),
        .b1({3{d1[r][7]}}),                  .b0({3{d0[r][7]}}),
        .z1(h1[r]),                          .z0(h0[r])
      );
      assign x1[r] = {d1[r][6:4], h1[r][2], h1[r][1], d1[r][1], h1[r][0], d1[r][7]};
      assign x0[r] = {d0[r][6:4], h0[r][2], h0[r][1], d0[r][1], h0[r][0], d0[r][7]};

      ncl_xor #(.W(8)) u_e (
        .a1(a1[r]), .a0(a0[r]), .b1(t1), .b0(t0), .z1(e1[r]), .z0(e0[r])
      );
      ncl_xor #(.W(8)) u_o (
        .a1(e1[r]), .a0(e0[r]), .b1(x1[r]), .b0(x0[r]),
        .z1(y1[127-32*c-8*r -: 8]), .z0(y0[127-32*c-8*r -: 8])
      );
    end
  end

endmodule
