// tiny_aes_top: generic single encryptor/decryptor core for AES-128/192/256.
//
// One iterative ("rolled") round datapath does both directions. Decryption
// uses the equivalent inverse cipher: InvShiftRows and InvSubBytes commute,
// and InvMixColumns is moved in front of AddRoundKey by applying it to the
// round keys as well, so decryption runs the same sequence of units as
// encryption (substitute, shift, mix, add key) and every unit is shared,
// selected by mode (1 = encrypt, 0 = decrypt).
//
// Datapath (names of the block diagram):
//   I/P data buffer  <- din_key_lsb on ld_d
//   xor1_out = data buffer ^ first/last round key (DEMUX-1, "first round")
//   MUX-1 (data_en) : xor1_out or xor2_out -> Reg1 (reg1_en)
//   Reg1 -> ByteSub/InvByteSub -> ShiftRows/InvShiftRows -> Reg2
//   DEMUX-2 (last_round): Reg2 to the Mix/InvMix unit, or skip_mc_out
//   MUX-3 / DEMUX-3 (delay_rd_fifo): the Mix/InvMix unit is time-shared
//     between the state (result to Reg3, reg3_en) and the round key, which is
//     turned into its InvMixColumns image (unit forced to InvMix mode)
//   MUX-2 (mode): plain round key (encryption) or InvMix'd key (decryption)
//   xor2_out = Reg3 ^ MUX-2 output -> back to MUX-1 for the next round
//   xor3_out = skip_mc_out ^ round key -> O/P data buffer (last round)
// Round keys come from aes_key_expansion, which starts on ld_k and runs in
// parallel with encryption; decryption waits until the expansion is done
// and reads the keys last-first.
//
// Interface and protocol: the 256-bit key arrives on two 128-bit buses in
// one ld_k cycle: din_key_lsb carries bits [127:0], dout_key_msb_in bits
// [255:128] (an AES-128 key uses din_key_lsb alone, an AES-192 key bits
// [191:0]; key byte 0 is the most significant byte of the key). A later ld_d
// cycle loads the 128-bit input block from din_key_lsb. done rises when the
// result is in the output buffer; the core then drives it on the MSB bus
// (dout_key_msb_out with dout_key_msb_oe = 1). The bidirectional pad is not
// part of this module: the shared bus is brought out as separate in, out and
// output-enable signals. Further blocks can be processed with the same key by
// pulsing ld_d again. mode and k_type must be held from ld_k to done.
//
// Timing with ld_k in cycle 0 and ld_d in cycle 1 (counting the ld_k cycle
// up to and including the first cycle with done high): key expansion
// 4*Nr+11 cycles; encryption (overlapped with expansion) 53 / 59 / 65
// cycles; decryption 7*Nr+12 = 82 / 96 / 110 cycles, i.e. 3*Nr+1 cycles
// after k_exp_done. A block reusing a stored key takes 3*Nr+3 cycles counting
// its ld_d cycle.
// Synchronous active-high reset.
module tiny_aes_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ld_k,
  input  logic       ld_d,
  input  logic       mode,
  input  logic [1:0] k_type,
  input  block_t     din_key_lsb,
  input  block_t     dout_key_msb_in,
  output block_t     dout_key_msb_out,
  output logic       dout_key_msb_oe,
  output logic       done
);

  // control
  logic       rd_fifo, data_en, first_round, reg1_en, reg3_en;
  logic       last_round, delay_rd_fifo, out_en;
  logic [4:0] rk_count;
  logic       k_exp_done;

  // datapath
  block_t data_buf, round_k, first_round_k, other_round_k;
  block_t xor1_out, xor2_out, xor3_out, reg1_d;
  block_t reg1, reg2, reg3, sb_out, sr_out;
  block_t mc_path, skip_mc_out, mc_in, mc_out, mix_round_k, mc_state_out;
  block_t mux2_out, out_buf;
  logic   mc_mode;

  aes_key_expansion u_key_exp (
    .clk        (clk),
    .rst        (rst),
    .ld_k       (ld_k),
    .rd_k       (rd_fifo),
    .rd_restart (ld_d),
    .key_in     ({dout_key_msb_in, din_key_lsb}),
    .mode       (mode),
    .k_type     (k_type),
    .key_out    (round_k),
    .k_exp_done (k_exp_done),
    .rk_count   (rk_count)
  );

  aes_ctrl u_ctrl (
    .clk           (clk),
    .rst           (rst),
    .ld_d          (ld_d),
    .ld_k          (ld_k),
    .mode          (mode),
    .k_type        (k_type),
    .rk_count      (rk_count),
    .k_exp_done    (k_exp_done),
    .rd_fifo       (rd_fifo),
    .data_en       (data_en),
    .first_round   (first_round),
    .reg1_en       (reg1_en),
    .reg3_en       (reg3_en),
    .last_round    (last_round),
    .delay_rd_fifo (delay_rd_fifo),
    .out_en        (out_en),
    .done          (done)
  );

  // I/P data buffer register
  always_ff @(posedge clk) begin
    if (rst)       data_buf <= '0;
    else if (ld_d) data_buf <= din_key_lsb;
  end

  // DEMUX-1: first/last round key or other round key
  assign first_round_k = first_round ? round_k : '0;
  assign other_round_k = first_round ? '0 : round_k;
  assign xor1_out      = data_buf ^ first_round_k;

  // MUX-1 and Reg1
  assign reg1_d = data_en ? xor1_out : xor2_out;
  always_ff @(posedge clk) begin
    if (rst)          reg1 <= '0;
    else if (reg1_en) reg1 <= reg1_d;
  end

  aes_sub_bytes  u_sub   (.mode(mode), .din(reg1),   .dout(sb_out));
  aes_shift_rows u_shift (.mode(mode), .din(sb_out), .dout(sr_out));

  // Reg2 (inner pipeline register)
  always_ff @(posedge clk) begin
    if (rst) reg2 <= '0;
    else     reg2 <= sr_out;
  end

  // DEMUX-2: skip MixColumn in the last round
  assign skip_mc_out = last_round ? reg2 : '0;
  assign mc_path     = last_round ? '0 : reg2;

  // MUX-3, shared Mix/InvMix unit, DEMUX-3
  assign mc_in   = delay_rd_fifo ? other_round_k : mc_path;
  assign mc_mode = delay_rd_fifo ? MODE_DEC : mode;
  aes_mix_columns u_mix (.mode(mc_mode), .din(mc_in), .dout(mc_out));
  assign mc_state_out = delay_rd_fifo ? '0 : mc_out;
  assign mix_round_k  = delay_rd_fifo ? mc_out : '0;

  // Reg3
  always_ff @(posedge clk) begin
    if (rst)          reg3 <= '0;
    else if (reg3_en) reg3 <= mc_state_out;
  end

  // MUX-2 and XOR-2
  assign mux2_out = (mode == MODE_ENC) ? other_round_k : mix_round_k;
  assign xor2_out = reg3 ^ mux2_out;

  // XOR-3 and O/P data buffer register
  assign xor3_out = skip_mc_out ^ other_round_k;
  always_ff @(posedge clk) begin
    if (rst)         out_buf <= '0;
    else if (out_en) out_buf <= xor3_out;
  end

  assign dout_key_msb_out = out_buf;
  assign dout_key_msb_oe  = done;

endmodule
