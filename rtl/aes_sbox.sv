// aes_sbox: one shared ByteSub / InvByteSub byte substitution.
//
// A single multiplicative-inverse datapath serves both directions. For
// encryption (mode = 1) the byte is inverted in GF(2^8) and then passed
// through the affine transformation AT (b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^
// b_(i+6) ^ b_(i+7) ^ c_i, c = {63}). For decryption (mode = 0) the inverse
// affine transformation AT^-1 comes first and the inverse follows, so the
// expensive inverter is not duplicated. The two 8-bit 2:1 multiplexers on
// either side of the inverter are the whole cost of sharing.
//
// The GF(2^8) inverse is computed in the composite field GF((2^4)^2): the
// isomorphism delta maps the byte to two GF(2^4) nibbles (b = high, c = low),
// then
//   d = b^2, g = lambda*d, e = b ^ c, f = e*c, h = g ^ f, i = h^-1,
//   j = b*i (high nibble of the result), k = e*i (low nibble),
// and delta^-1 maps {j,k} back to GF(2^8). The nibble operations are the
// design's squaring, lambda-multiply and GF(2^2)-based multiplier equations.
// The delta / delta^-1 matrices are the ones that make this GF(2^4)
// arithmetic an isomorphic image of the AES field (the root {5F} of the AES
// polynomial in the composite field is the image of x); the XOR equations
// below are those matrices written out row by row.
//
// Purely combinational, no clock.
module aes_sbox
  import aes_pkg::*;
(
  input  logic  mode,    // 1 = SubBytes, 0 = InvSubBytes
  input  byte_t sb_in,
  output byte_t sb_out
);

  // Inverse affine transformation: b_i = x_(i+2) ^ x_(i+5) ^ x_(i+7) ^ {05}_i.
  function automatic byte_t inv_affine(input byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = x[(i + 2) % 8] ^ x[(i + 5) % 8] ^ x[(i + 7) % 8];
    return r ^ 8'h05;
  endfunction

  // Forward affine transformation.
  function automatic byte_t affine(input byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return r ^ 8'h63;
  endfunction

  // Isomorphism GF(2^8) -> GF((2^4)^2).
  function automatic byte_t delta(input byte_t x);
    return {x[7] ^ x[5],
            x[7] ^ x[6] ^ x[4] ^ x[3] ^ x[2] ^ x[1],
            x[7] ^ x[5] ^ x[3] ^ x[2],
            x[7] ^ x[5] ^ x[3] ^ x[2] ^ x[1],
            x[7] ^ x[6] ^ x[2] ^ x[1],
            x[7] ^ x[4] ^ x[3] ^ x[2] ^ x[1],
            x[6] ^ x[4] ^ x[1],
            x[6] ^ x[1] ^ x[0]};
  endfunction

  // Inverse isomorphism GF((2^4)^2) -> GF(2^8).
  function automatic byte_t delta_inv(input byte_t x);
    return {x[7] ^ x[6] ^ x[5] ^ x[1],
            x[6] ^ x[2],
            x[6] ^ x[5] ^ x[1],
            x[6] ^ x[5] ^ x[4] ^ x[2] ^ x[1],
            x[5] ^ x[4] ^ x[3] ^ x[2] ^ x[1],
            x[7] ^ x[4] ^ x[3] ^ x[2] ^ x[1],
            x[5] ^ x[4],
            x[6] ^ x[5] ^ x[4] ^ x[2] ^ x[0]};
  endfunction

  byte_t      inv_in, p, z;
  logic [3:0] b, c, d, g, e, f, h, i, j, k;

  always_comb begin
    inv_in = (mode == MODE_ENC) ? sb_in : inv_affine(sb_in);
    p = delta(inv_in);
    b = p[7:4];
    c = p[3:0];
    d = gf4_sq(b);
    g = gf4_mul_lambda(d);
    e = b ^ c;
    f = gf4_mul(e, c);
    h = g ^ f;
    i = gf4_inv(h);
    j = gf4_mul(b, i);
    k = gf4_mul(e, i);
    z = delta_inv({j, k});
    sb_out = (mode == MODE_ENC) ? affine(z) : z;
  end

endmodule
