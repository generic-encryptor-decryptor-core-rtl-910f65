// aes_pkg: types, constants and small GF helper functions shared by the
// Tiny AES encryptor/decryptor.
//
// Byte order follows FIPS-197 as a big-endian bit vector: byte 0 of a block
// (state s[0][0]) sits in bits [127:120], byte n in bits [127-8n -: 8]. A
// state column c is the 32-bit word [127-32c -: 32] with row 0 in its top byte.
//
// The composite-field helpers implement GF((2^2)^2): GF(2^2) with x^2+x+1,
// GF(2^4) = GF(2^2)[x]/(x^2+x+phi) with phi = {10}b, and the GF(2^4) squaring
// and multiply-by-lambda (lambda = {1100}b) as the bit equations of the design.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // k_type encoding of the key length (00 = AES-128, 01 = AES-192, 10 = AES-256).
  // The unused code 11 is treated as AES-256 (k_type[1] set).
  typedef enum logic [1:0] {
    KEY_128 = 2'b00,
    KEY_192 = 2'b01,
    KEY_256 = 2'b10
  } key_type_e;

  // mode = 1 encrypts, mode = 0 decrypts.
  localparam logic MODE_ENC = 1'b1;
  localparam logic MODE_DEC = 1'b0;

  // Number of 32-bit key words Nk for a k_type.
  function automatic logic [3:0] nk_of(input logic [1:0] kt);
    if (kt[1])       return 4'd8;
    else if (kt[0])  return 4'd6;
    else             return 4'd4;
  endfunction

  // Number of rounds Nr for a k_type.
  function automatic logic [3:0] nr_of(input logic [1:0] kt);
    if (kt[1])       return 4'd14;
    else if (kt[0])  return 4'd12;
    else             return 4'd10;
  endfunction

  // Multiplication by {02} in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^2) multiplication, x^2+x+1.
  function automatic logic [1:0] gf2_mul(input logic [1:0] h, input logic [1:0] w);
    return {(h[1] & w[1]) ^ (h[0] & w[1]) ^ (h[1] & w[0]),
            (h[1] & w[1]) ^ (h[0] & w[0])};
  endfunction

  // Multiplication by the constant phi = {10}b in GF(2^2).
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] y);
    return {y[1] ^ y[0], y[1]};
  endfunction

  // GF(2^4) multiplication built from three GF(2^2) products.
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh, hl, lh, ll;
    hh = gf2_mul(a[3:2], b[3:2]);
    hl = gf2_mul(a[3:2], b[1:0]);
    lh = gf2_mul(a[1:0], b[3:2]);
    ll = gf2_mul(a[1:0], b[1:0]);
    return {hh ^ hl ^ lh, gf2_mul_phi(hh) ^ ll};
  endfunction

  // GF(2^4) squaring.
  function automatic logic [3:0] gf4_sq(input logic [3:0] b);
    return {b[3], b[3] ^ b[2], b[2] ^ b[1], b[3] ^ b[1] ^ b[0]};
  endfunction

  // GF(2^4) multiplication by lambda = {1100}b.
  function automatic logic [3:0] gf4_mul_lambda(input logic [3:0] d);
    return {d[2] ^ d[0], d[3] ^ d[2] ^ d[1] ^ d[0], d[3], d[2]};
  endfunction

  // GF(2^4) inverse, computed one level down in GF(2^2) with the same
  // formula as the GF(2^8) inverse: (ax+b)^-1 = a*D^-1 x + (a+b)*D^-1,
  // D = a^2*phi + a*b + b^2. In GF(2^2) the inverse is the square: (h1, h1^h0).
  function automatic logic [3:0] gf4_inv(input logic [3:0] x);
    logic [1:0] a, b, d, di;
    a  = x[3:2];
    b  = x[1:0];
    d  = gf2_mul_phi(gf2_mul(a, a)) ^ gf2_mul(a, b) ^ gf2_mul(b, b);
    di = {d[1], d[1] ^ d[0]};
    return {gf2_mul(a, di), gf2_mul(a ^ b, di)};
  endfunction

endpackage
