// ncl_subbytes: the AES SubBytes transformation on a dual-rail 128-bit state.
//
// Sixteen ncl_sbox instances, one per byte, work independently; byte n of the state is
// bits [127-8n -: 8]. The output of each byte turns DATA (or NULL) once its own input byte
// has, so the block as a whole is input-complete per byte.
// Ports: s1/s0 state rails in, y1/y0 rails out. No clock, no reset.
module ncl_subbytes (
  input  logic [127:0] s1,
  input  logic [127:0] s0,
  output logic [127:0] y1,
  output logic [127:0] y0
);

  for (genvar n = 0; n < 16; n++) begin : g_byte
    ncl_sbox u_sbox (
      .x1(s1[8*n +: 8]),
      .x0(s0[8*n +: 8]),
      .y1(y1[8*n +: 8]),
      .y0(y0[8*n +: 8])
    );
  end

endmodule
