// aes_sub_bytes: ByteSub / InvByteSub of the whole 128-bit state.
//
// Sixteen shared aes_sbox instances work on the sixteen state bytes in
// parallel, so one pass of the round datapath substitutes the full block in a
// single combinational step. mode = 1 selects SubBytes, mode = 0 InvSubBytes;
// the same instances serve both directions. Combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  logic   mode,
  input  block_t din,
  output block_t dout
);

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    aes_sbox u_sbox (
      .mode   (mode),
      .sb_in  (din[127 - 8*n -: 8]),
      .sb_out (dout[127 - 8*n -: 8])
    );
  end

endmodule
