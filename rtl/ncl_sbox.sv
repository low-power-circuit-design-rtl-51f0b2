// ncl_sbox: the AES S-box in dual-rail NCL, one byte in, one byte out.
//
// The S-box is built as a delay-insensitive decoder followed by OR planes:
//  * each 4-bit half of the input byte is decoded by 16 TH44 gates, gate v taking the rail
//    of each of the four bits that matches the bits of v (one gate fires per DATA nibble);
//  * 256 TH22 gates combine one high-nibble and one low-nibble line into the minterm of the
//    input value, so exactly one minterm fires for a DATA byte;
//  * rail 1 of output bit k is the OR (TH1n gate) of the minterms v with bit k of S(v) set,
//    rail 0 the OR of the others.
// A minterm needs all eight input bits, so the output becomes DATA only after the whole
// byte is DATA, and returns to NULL only after the whole byte is NULL. The table S(v) is
// computed by ncl_pkg::sbox_table (inverse in GF(2^8) and affine map). No clock, no reset.
// The decoder / OR-plane structure is this implementation's choice of S-box mapping.
module ncl_sbox (
  input  logic [7:0] x1,
  input  logic [7:0] x0,
  output logic [7:0] y1,
  output logic [7:0] y0
);

  import ncl_pkg::*;

  localparam logic [2047:0] SBOX = sbox_table();

  logic [15:0] hi_set, hi_any, lo_set, lo_any;
  logic [15:0] hi, lo;           // nibble decoder outputs (TH44 gates)
  logic [255:0] mt_set, mt_any;
  logic [255:0] mt;              // minterms (TH22 gates)

  always_comb begin
    for (int unsigned v = 0; v < 16; v++) begin
      hi_set[v] = 1'b1;
      hi_any[v] = 1'b0;
      lo_set[v] = 1'b1;
      lo_any[v] = 1'b0;
      for (int unsigned b = 0; b < 4; b++) begin
        hi_set[v] = hi_set[v] & (v[b] ? x1[4+b] : x0[4+b]);
        hi_any[v] = hi_any[v] | (v[b] ? x1[4+b] : x0[4+b]);
        lo_set[v] = lo_set[v] & (v[b] ? x1[b]   : x0[b]);
        lo_any[v] = lo_any[v] | (v[b] ? x1[b]   : x0[b]);
      end
    end
  end

  ncl_thv #(.W(16)) u_hi (.set_c(hi_set), .any_c(hi_any), .z(hi));
  ncl_thv #(.W(16)) u_lo (.set_c(lo_set), .any_c(lo_any), .z(lo));

  always_comb begin
    for (int unsigned v = 0; v < 256; v++) begin
      mt_set[v] = hi[v/16] & lo[v%16];
      mt_any[v] = hi[v/16] | lo[v%16];
    end
  end

  ncl_thv #(.W(256)) u_mt (.set_c(mt_set), .any_c(mt_any), .z(mt));

  always_comb begin
    y1 = '0;
    y0 = '0;
    for (int unsigned v = 0; v < 256; v++) begin
      for (int unsigned k = 0; k < 8; k++) begin
        if (SBOX[8*v + k]) y1[k] = y1[k] | mt[v];
        else               y0[k] = y0[k] | mt[v];
      end
    end
  end

endmodule
