// aes_async_pkg: types, constants and helper functions shared by the
// quasi-delay-insensitive (QDI) AES crypto-processor.
//
// Encodings
//   * Dual rail (DR): one bit travels on two wires {A1,A0}. A0=1 means '0',
//     A1=1 means '1', both low is the invalid (spacer) state that separates
//     two data tokens in the four-phase protocol, both high never occurs.
//   * 1-of-16 (MR16): one GF(2^4) element travels on sixteen wires, exactly
//     one of which is high; all low is the spacer.
//   Every valid code word has the same number of high wires, so a block that
//   maps valid words to valid words switches a data-independent number of
//   wires per operation.
//
// Bytes and words are arrays of DR bits; word lane i carries state row i.
// GF(2^4) arithmetic uses the field polynomial x^4+x+1 (this design's choice;
// the composite-field reduction polynomial x^2+x+{e} is the one given for the
// S-box).
package aes_async_pkg;

  typedef logic [1:0]     dr_t;        // {A1, A0}
  typedef dr_t  [7:0]     dr_byte_t;
  typedef dr_t  [3:0]     dr_nib_t;
  typedef dr_byte_t [3:0] dr_word_t;   // lane i = row i
  typedef logic [15:0]    mr16_t;      // one-hot GF(2^4) element
  typedef logic [3:0][7:0] bin_word_t; // lane i = row i

  localparam dr_t DR_ZERO   = 2'b01;
  localparam dr_t DR_ONE    = 2'b10;

  // Key length selection held in the Mode register.
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } keylen_e;

  function automatic dr_t dr_enc(input logic b);
    return b ? DR_ONE : DR_ZERO;
  endfunction

  function automatic dr_byte_t dr_enc_byte(input logic [7:0] b);
    dr_byte_t r;
    for (int i = 0; i < 8; i++) r[i] = dr_enc(b[i]);
    return r;
  endfunction

  function automatic logic [7:0] dr_dec_byte(input dr_byte_t d);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = d[i][1];
    return r;
  endfunction

  function automatic dr_word_t dr_enc_word(input bin_word_t w);
    dr_word_t r;
    for (int l = 0; l < 4; l++) r[l] = dr_enc_byte(w[l]);
    return r;
  endfunction

  function automatic bin_word_t dr_dec_word(input dr_word_t d);
    bin_word_t r;
    for (int l = 0; l < 4; l++) r[l] = dr_dec_byte(d[l]);
    return r;
  endfunction

  // Completion detection on a word: every bit has exactly one rail high.
  function automatic logic dr_word_valid(input dr_word_t d);
    logic v;
    v = 1'b1;
    for (int l = 0; l < 4; l++)
      for (int i = 0; i < 8; i++) v &= (d[l][i][0] ^ d[l][i][1]);
    return v;
  endfunction

  // Return-to-zero detection on a word: every rail low.
  function automatic logic dr_word_spacer(input dr_word_t d);
    return d == '0;
  endfunction

  // Number of high rails: a balanced block keeps it constant for valid data.
  function automatic int unsigned dr_word_weight(input dr_word_t d);
    return $countones(d);
  endfunction

  // GF(2^4) product modulo x^4+x+1.
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) p ^= aa;
      aa = aa[3] ? {aa[2:0], 1'b0} ^ 4'h3 : {aa[2:0], 1'b0};
    end
    return p;
  endfunction

  // GF(2^4) inverse (0 maps to 0), found by search.
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    logic [3:0] r;
    r = '0;
    for (int i = 1; i < 16; i++)
      if (gf16_mul(a, 4'(i)) == 4'h1) r = 4'(i);
    return r;
  endfunction

endpackage
