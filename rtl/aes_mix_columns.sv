// aes_mix_columns: Mix/InvMix Column block for the whole 128-bit state.
//
// Four aes_mix_column units process the four state columns in parallel.
// mode = 1 performs MixColumns, mode = 0 InvMixColumns. In the core this block
// is also time-shared to turn a round key into its InvMixColumns image for the
// equivalent decryption structure (its mode input is then forced to 0).
// Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  logic   mode,
  input  block_t din,
  output block_t dout
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_col (
      .mode (mode),
      .din  (din[127 - 32*c -: 32]),
      .dout (dout[127 - 32*c -: 32])
    );
  end

endmodule
