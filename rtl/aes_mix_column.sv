// aes_mix_column: MixColumn / InvMixColumn of one 32-bit state column.
//
// MixColumn multiplies the column by c(X) = {03}X^3 + X^2 + X + {02}. Each
// output byte is written with byte-level sharing as
//   b_j = (a0 ^ a1 ^ a2 ^ a3) ^ {02}(a_j ^ a_(j+1)) ^ a_j,
// so the four-byte sum is computed once for all four outputs.
// InvMixColumn uses the serial decomposition d(X) = c(X) * f(X) with
// f(X) = {04}X^2 + {05}: the MixColumn result b is passed through f, whose
// output bytes are
//   o_j = {04}(b_j ^ b_(j+2)) ^ b_j,
// and the term {04}(b0 ^ b2) is shared by bytes 0 and 2, {04}(b1 ^ b3) by
// bytes 1 and 3. mode = 1 returns b, mode = 0 returns o. Row 0 is the top
// byte of the word. Combinational.
module aes_mix_column
  import aes_pkg::*;
(
  input  logic  mode,
  input  word_t din,
  output word_t dout
);

  byte_t a [4];
  byte_t b [4];
  byte_t o [4];
  byte_t sum, u02, u13;

  always_comb begin
    for (int j = 0; j < 4; j++) a[j] = din[31 - 8*j -: 8];
    sum = a[0] ^ a[1] ^ a[2] ^ a[3];
    for (int j = 0; j < 4; j++) b[j] = sum ^ xtime(a[j] ^ a[(j + 1) % 4]) ^ a[j];
    u02 = xtime(xtime(b[0] ^ b[2]));
    u13 = xtime(xtime(b[1] ^ b[3]));
    o[0] = u02 ^ b[0];
    o[1] = u13 ^ b[1];
    o[2] = u02 ^ b[2];
    o[3] = u13 ^ b[3];
    for (int j = 0; j < 4; j++)
      dout[31 - 8*j -: 8] = (mode == MODE_ENC) ? b[j] : o[j];
  end

endmodule
