// ncl_pkg: constants and constant functions shared by the NCL AES-128 encryption pipeline.
//
// Null Convention Logic (NCL) carries every bit on two rails, rail 1 and rail 0:
//   rail1 rail0 = 0 1 -> DATA0, 1 0 -> DATA1, 0 0 -> NULL, 1 1 -> illegal.
// Every module of the design passes a dual-rail vector as a pair of plain vectors
// named <x>1 (rail 1) and <x>0 (rail 0), bit i of both forming one dual-rail signal.
//
// The AES constants (S-box, round constants) are computed here by constant functions,
// so no table is pasted into the source: the S-box is the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0), followed by the FIPS-197 affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// Byte order: byte 0 of a 128-bit state is bits [127:120], as in FIPS-197, and byte n
// sits in column n/4, row n%4.
package ncl_pkg;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  // The whole S-box as a 256 x 8 table; entry v in bits [8*v +: 8]. The inverse is taken
  // from log / antilog tables of the generator 3 (inv(3^i) = 3^(255-i)), which keeps the
  // elaboration-time work to a few thousand steps.
  function automatic logic [2047:0] sbox_table();
    logic [2047:0] t;
    logic [7:0]    alog [256];
    logic [7:0]    lg   [256];
    logic [7:0]    p, b;
    p = 8'h01;
    for (int i = 0; i < 256; i++) begin
      alog[i] = p;
      if (i < 255) lg[p] = 8'(i);
      p = p ^ xtime(p);
    end
    for (int v = 0; v < 256; v++) begin
      b = (v == 0) ? 8'h00 : alog[(255 - int'(lg[v])) % 255];
      t[8*v +: 8] = b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
    end
    return t;
  endfunction

  // ShiftRows on one rail of the state: row r of the 4x4 byte state rotates left by r
  // bytes, so output byte r + 4c is input byte r + 4((c + r) mod 4). Applied to both rails
  // of a dual-rail state it is pure wiring: no gate, no delay, DATA/NULL kept per bit.
  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127-8*(r+4*c) -: 8] = s[127-8*(r+4*((c+r)%4)) -: 8];
    return y;
  endfunction

  // Round constant of key-expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic logic [7:0] rcon(input int unsigned r);
    logic [7:0] c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

endpackage
