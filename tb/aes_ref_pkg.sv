// aes_ref_pkg: behavioural AES-128/192/256 reference (FIPS-197) used by the
// testbenches. It is written independently of the RTL: the S-box is the
// GF(2^8) inverse found by search followed by the affine transform, and the
// cipher works on a 16-byte array in the standard byte order.
package aes_ref_pkg;

  typedef logic [7:0] state_t [16];

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p = 0; aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, r;
    inv = 0;
    for (int i = 1; i < 256; i++) if (gmul(x, 8'(i)) == 8'h01) inv = 8'(i);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return r;
  endfunction

  // Expanded key as bytes: word w has bytes 4w..4w+3.
  function automatic void expand(input logic [7:0] key[32], input int nk, output logic [7:0] w[240]);
    logic [7:0] t[4], rc;
    int nr;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < 4*nk; i++) w[i] = key[i];
    for (int i = nk; i < 4*(nr+1); i++) begin
      for (int b = 0; b < 4; b++) t[b] = w[4*(i-1)+b];
      if (i % nk == 0) begin
        logic [7:0] t0;
        t0 = t[0];
        t[0] = sbox(t[1]) ^ rc; t[1] = sbox(t[2]); t[2] = sbox(t[3]); t[3] = sbox(t0);
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        for (int b = 0; b < 4; b++) t[b] = sbox(t[b]);
      end
      for (int b = 0; b < 4; b++) w[4*i+b] = w[4*(i-nk)+b] ^ t[b];
    end
  endfunction

  function automatic void cipher(input logic [7:0] pt[16], input logic [7:0] key[32], input int nk,
                                 output logic [7:0] ct[16]);
    logic [7:0] w[240], s[16], t[16];
    int nr;
    nr = nk + 6;
    expand(key, nk, w);
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ w[i];
    for (int r = 1; r <= nr; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sbox(s[i]);
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++) t[4*c+row] = s[4*((c+row)%4)+row];
      s = t;
      if (r != nr)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a, b, cc, d;
          a = s[4*c]; b = s[4*c+1]; cc = s[4*c+2]; d = s[4*c+3];
          s[4*c]   = gmul(a,2) ^ gmul(b,3) ^ cc ^ d;
          s[4*c+1] = a ^ gmul(b,2) ^ gmul(cc,3) ^ d;
          s[4*c+2] = a ^ b ^ gmul(cc,2) ^ gmul(d,3);
          s[4*c+3] = gmul(a,3) ^ b ^ cc ^ gmul(d,2);
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r+i];
    end
    ct = s;
  endfunction

  // GF(2^4) product modulo x^4+x+1, by shift-and-reduce of the full product.
  function automatic logic [3:0] g4mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = 0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'h13) << (i - 4);
    return p[3:0];
  endfunction

  // Product in GF((2^4)^2) with x^2 = x + {e}; elements are {high, low}.
  function automatic logic [7:0] cmul(input logic [7:0] p, input logic [7:0] q);
    logic [3:0] hh, hl, lh, ll;
    hh = g4mul(p[7:4], q[7:4]); hl = g4mul(p[7:4], q[3:0]);
    lh = g4mul(p[3:0], q[7:4]); ll = g4mul(p[3:0], q[3:0]);
    return {hh ^ hl ^ lh, g4mul(hh, 4'he) ^ ll};
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] a);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = a[i] ^ a[(i+4)%8] ^ a[(i+5)%8] ^ a[(i+6)%8] ^ a[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return r;
  endfunction

  typedef logic [1:0] rail_t;
  // Dual-rail code of a byte, written out independently of the RTL package.
  function automatic logic [15:0] dr8(input logic [7:0] b);
    logic [15:0] r;
    for (int i = 0; i < 8; i++) r[2*i +: 2] = b[i] ? 2'b10 : 2'b01;
    return r;
  endfunction
  function automatic logic [7:0] undr8(input logic [15:0] r, output logic ok);
    logic [7:0] b;
    ok = 1;
    for (int i = 0; i < 8; i++) begin
      b[i] = r[2*i+1];
      if (r[2*i] == r[2*i+1]) ok = 0;
    end
    return b;
  endfunction
  function automatic logic [63:0] dr32(input logic [31:0] w);
    return {dr8(w[31:24]), dr8(w[23:16]), dr8(w[15:8]), dr8(w[7:0])};
  endfunction

endpackage
