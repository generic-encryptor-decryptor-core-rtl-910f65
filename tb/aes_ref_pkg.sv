// aes_ref_pkg: behavioural AES reference model for the testbenches.
//
// Written straight from the FIPS-197 definitions and deliberately different
// from the RTL: the S-box table is built from the GF(2^8) inverse (x^254 by
// square-and-multiply with plain shift-and-add multiplication) followed by
// the affine map, the inverse S-box by inverting that table, InvMixColumns uses the
// {0e,0b,0d,09} coefficients directly and decryption is the straight inverse
// cipher (not the equivalent one used by the hardware). Byte 0 of a block is
// bits [127:120]. Keys are 256-bit values with the key right-aligned
// (AES-128 in [127:0], AES-192 in [191:0]). Call init_tables() first.
package aes_ref_pkg;

  typedef logic [14:0][127:0] rk_set_t;   // round keys 0..14

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = 0, x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // S-box tables, filled once by init_tables() (call it at time 0).
  logic [7:0] sbox_t [256];
  logic [7:0] inv_sbox_t [256];

  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] r = 8'h01, s = a;
    // a^254, 254 = 0b11111110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, s);
      s = gmul(s, s);
    end
    return r;
  endfunction

  function automatic void init_tables();
    logic [7:0] v, r;
    for (int x = 0; x < 256; x++) begin
      v = ginv(8'(x));
      for (int i = 0; i < 8; i++)
        r[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
      r ^= 8'h63;
      sbox_t[x] = r;
      inv_sbox_t[r] = 8'(x);
    end
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    return sbox_t[x];
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] y);
    return inv_sbox_t[y];
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int n = 0; n < 16; n++)
      o[127-8*n -: 8] = inv ? inv_sbox(s[127-8*n -: 8]) : sbox(s[127-8*n -: 8]);
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[127-8*(r+4*c) -: 8] = s[127-8*(r+4*((c+r)%4)) -: 8];
        else      o[127-8*(r+4*((c+r)%4)) -: 8] = s[127-8*(r+4*c) -: 8];
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s, input bit inv);
    logic [127:0] o;
    logic [7:0] a [4];
    logic [7:0] k0, k1, k2, k3;
    if (inv) begin k0 = 8'h0e; k1 = 8'h0b; k2 = 8'h0d; k3 = 8'h09; end
    else     begin k0 = 8'h02; k1 = 8'h03; k2 = 8'h01; k3 = 8'h01; end
    for (int c = 0; c < 4; c++) begin
      for (int j = 0; j < 4; j++) a[j] = s[127-32*c-8*j -: 8];
      for (int j = 0; j < 4; j++)
        o[127-32*c-8*j -: 8] = gmul(k0, a[j]) ^ gmul(k1, a[(j+1)%4]) ^
                               gmul(k2, a[(j+2)%4]) ^ gmul(k3, a[(j+3)%4]);
    end
    return o;
  endfunction

  function automatic int nk_of(input logic [1:0] kt);
    return kt[1] ? 8 : (kt[0] ? 6 : 4);
  endfunction

  function automatic int nr_of(input logic [1:0] kt);
    return nk_of(kt) + 6;
  endfunction

  function automatic rk_set_t key_expand(input logic [255:0] key, input logic [1:0] kt);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    rk_set_t     rk = '0;
    int nk = nk_of(kt), nr = nr_of(kt);
    for (int i = 0; i < nk; i++) w[i] = key[32*nk-1-32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r <= nr; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] pt, input logic [255:0] key,
                                           input logic [1:0] kt);
    rk_set_t rk = key_expand(key, kt);
    int nr = nr_of(kt);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= nr; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != nr) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] ct, input logic [255:0] key,
                                           input logic [1:0] kt);
    rk_set_t rk = key_expand(key, kt);
    int nr = nr_of(kt);
    logic [127:0] s = ct ^ rk[nr];
    for (int r = nr - 1; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
