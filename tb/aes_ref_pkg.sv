// aes_ref_pkg: plain Boolean AES-128 reference model for the testbenches.
//
// Written independently of the design: the S-box inverse is computed as x^254 by repeated
// multiplication in GF(2^8) instead of from log tables, MixColumns uses the textbook
// 2-3-1-1 products, and the key schedule is the FIPS-197 word recurrence. It also offers
// dual-rail encoding helpers (rail 1 = value, rail 0 = inverted value, NULL = both 0).
package aes_ref_pkg;

  function automatic logic [7:0] mul2(input logic [7:0] b);
    return b[7] ? ((b << 1) ^ 8'h1b) : (b << 1);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = mul2(aa);
    end
    return p;
  endfunction

  // inverse as x^254, then the affine map written bit by bit
  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, s;
    inv = 8'h01;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic logic [7:0] getb(input logic [127:0] s, input int n);
    return s[127-8*n -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = ref_sbox(getb(s, n));
    return r;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(row+4*c) -: 8] = getb(s, row + 4*((c+row)%4));
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = getb(s, 4*c); a1 = getb(s, 4*c+1); a2 = getb(s, 4*c+2); a3 = getb(s, 4*c+3);
      r[127-32*c    -: 8] = mul2(a0) ^ (mul2(a1) ^ a1) ^ a2 ^ a3;
      r[127-32*c-8  -: 8] = a0 ^ mul2(a1) ^ (mul2(a2) ^ a2) ^ a3;
      r[127-32*c-16 -: 8] = a0 ^ a1 ^ mul2(a2) ^ (mul2(a3) ^ a3);
      r[127-32*c-24 -: 8] = (mul2(a0) ^ a0) ^ a1 ^ a2 ^ mul2(a3);
    end
    return r;
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input int rnd);
    logic [31:0] w [4];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 1; i < rnd; i++) rc = mul2(rc);
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {ref_sbox(w[3][23:16]) ^ rc, ref_sbox(w[3][15:8]), ref_sbox(w[3][7:0]),
         ref_sbox(w[3][31:24])};
    w[0] = w[0] ^ t;
    w[1] = w[1] ^ w[0];
    w[2] = w[2] ^ w[1];
    w[3] = w[3] ^ w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s, k;
    k = key;
    s = pt ^ k;
    for (int r = 1; r <= 10; r++) begin
      k = next_key(k, r);
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s = s ^ k;
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
