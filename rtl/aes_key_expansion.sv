// aes_key_expansion: generic AES-128/192/256 key schedule with a round-key
// FIFO/LIFO.
//
// How it works. ld_k captures the 256-bit key_in into the R register (an
// AES-128 key sits in R[127:0], an AES-192 key in R[191:0], the unused upper
// bits are zero; key byte 0 is the most significant byte of the key). A
// control FSM then runs three phases:
//   LOAD (8 cycles): a 3-bit counter steps MUX-4 over the eight words of R,
//     most significant first, and shifts them into the 256-bit W shift
//     register, so that W ends up holding w[Nk-1] (newest) ... w[0]. In the
//     first LOAD cycle MUX-8/MUX-9 write the first round key (the top 128
//     bits of the key) straight into the key RAM, and MUX-10 preloads the
//     128-bit fifo shift register with the rest of the key words (none for
//     AES-128, two for AES-192, four for AES-256).
//   GEN (4*Nr cycles): one new key word per cycle,
//       w[i] = w[i-Nk] ^ temp,
//       temp = SubWord(RotWord(w[i-1])) ^ Rcon   when i mod Nk = 0,
//            = SubWord(w[i-1])                   when Nk = 8, i mod Nk = 4,
//            = w[i-1]                            otherwise.
//     MUX-5 chooses whether RotWord is applied, so one SubWord unit (four
//     forward S-boxes) serves both SubWord cases; MUX-2 selects temp; MUX-3
//     taps w[i-Nk] at W position 4, 6 or 8. The word is shifted into W and
//     into the fifo shift register; each time that register holds four words
//     it is written to the key RAM as the next round key. A mod counter
//     tracks i mod Nk and a key-round counter counts the groups of Nk words
//     (10, 8 or 7 groups), so GEN always lasts 4*Nr cycles; words beyond the
//     Nr+1 round keys that AES-192/256 need are produced but not stored.
//   FLUSH (1 cycle) writes the last full group, then DONE raises k_exp_done.
// With ld_k in cycle 0, k_exp_done is first high in cycle 4*Nr+10, so the
// expansion takes 4*Nr+11 cycles counting the ld_k cycle (51, 59, 67).
// Round key r is stored at cycle 4r+9 (AES-128), 4r+7 (AES-192) or
// 4r+5 (AES-256, r >= 2), one key per four cycles, so encryption can consume
// keys while they are being generated (rk_count says how many are stored).
//
// Reading: rd_k returns the next round key on key_out one cycle later, in
// generation order when mode = 1 and last-key-first when mode = 0.
// rd_restart rewinds the read order. k_type and mode must stay stable from
// ld_k until the block has been processed. Synchronous active-high reset.
//
// The datapath structure (R, W, MUX-1..10, SubWord, RotWord, Rcon generator,
// fifo shift register, 16x128 RAM, counters) follows the design description;
// the exact cycle-by-cycle control, the way the initial key words enter the
// RAM and the separate SubWord S-boxes are this implementation's choices.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned RAM_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld_k,
  input  logic         rd_k,
  input  logic         rd_restart,
  input  logic [255:0] key_in,
  input  logic         mode,
  input  logic [1:0]   k_type,
  output block_t       key_out,
  output logic         k_exp_done,
  output logic [4:0]   rk_count
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_GEN, S_FLUSH, S_DONE} ke_state_e;

  ke_state_e    state;
  logic [255:0] r_reg;
  word_t        w_reg [8];         // w_reg[p-1] holds w[i-p]
  logic [2:0]   mux4_cnt;
  logic [2:0]   mod_cnt;           // i mod Nk
  logic [3:0]   kround_cnt;        // groups of Nk words generated
  block_t       fifo_sr;           // fifo shift register
  logic [2:0]   fill;              // words held in fifo_sr
  logic [3:0]   nk, nr;
  logic [3:0]   groups;

  word_t        wm1, wmnk, rot, m5_out, sw_out, rc_out, m2_out, xor_out, m4_out;
  logic         rw_sel;
  logic         gen_push, first_load, last_gen;
  block_t       m8_out, m10_out, ram_wdata;
  logic         ram_wr, m9_sel;
  logic [2:0]   fill_init;
  logic [4:0]   ram_count;

  assign nk = nk_of(k_type);
  assign nr = nr_of(k_type);
  assign groups = k_type[1] ? 4'd7 : (k_type[0] ? 4'd8 : 4'd10);

  // ---------------- word generation datapath ----------------
  assign wm1    = w_reg[0];
  // MUX-3: w[i-Nk] sits at W position Nk (4, 6 or 8).
  assign wmnk   = k_type[1] ? w_reg[7] : (k_type[0] ? w_reg[5] : w_reg[3]);
  assign rot    = {wm1[23:0], wm1[31:24]};
  assign rw_sel = (mod_cnt == 3'd0);
  assign m5_out = rw_sel ? rot : wm1;

  for (genvar n = 0; n < 4; n++) begin : g_subword
    aes_sbox u_sbox (
      .mode   (MODE_ENC),
      .sb_in  (m5_out[31 - 8*n -: 8]),
      .sb_out (sw_out[31 - 8*n -: 8])
    );
  end

  aes_rcon_gen u_rcon (
    .clk      (clk),
    .rst      (rst),
    .cnt_clr  (ld_k),
    .cnt_en   (gen_push && rw_sel),
    .rcon_in  (sw_out),
    .rcon_out (rc_out)
  );

  // MUX-2: temp selection.
  always_comb begin
    if (rw_sel)                             m2_out = rc_out;
    else if (k_type[1] && mod_cnt == 3'd4)  m2_out = sw_out;
    else                                    m2_out = wm1;
  end
  assign xor_out = m2_out ^ wmnk;

  // MUX-4: walk R from its most significant word down.
  assign m4_out = r_reg[255 - 32*mux4_cnt -: 32];

  // MUX-8: first round key = top 128 bits of the key.
  assign m8_out  = k_type[1] ? r_reg[255:128] : (k_type[0] ? r_reg[191:64] : r_reg[127:0]);
  // MUX-10: remaining key words preloaded into the fifo shift register.
  assign m10_out = k_type[1] ? r_reg[127:0] : (k_type[0] ? {64'h0, r_reg[63:0]} : 128'h0);
  assign fill_init = k_type[1] ? 3'd4 : (k_type[0] ? 3'd2 : 3'd0);

  // ---------------- control ----------------
  assign first_load = (state == S_LOAD) && (mux4_cnt == 3'd0);
  assign gen_push   = (state == S_GEN);
  assign last_gen   = gen_push && (kround_cnt == groups - 4'd1) && (mod_cnt == 3'(nk - 4'd1));

  // MUX-9 / wr_fifo: initial key in the first LOAD cycle, full groups afterwards.
  always_comb begin
    m9_sel = 1'b0;
    ram_wr = 1'b0;
    if (first_load) begin
      m9_sel = 1'b1;
      ram_wr = 1'b1;
    end else if ((state == S_LOAD || state == S_GEN || state == S_FLUSH) && fill == 3'd4) begin
      ram_wr = (ram_count < 5'(nr) + 5'd1);
    end
  end
  assign ram_wdata = m9_sel ? m8_out : fifo_sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      r_reg      <= '0;
      mux4_cnt   <= '0;
      mod_cnt    <= '0;
      kround_cnt <= '0;
      fifo_sr    <= '0;
      fill       <= '0;
      k_exp_done <= 1'b0;
      for (int p = 0; p < 8; p++) w_reg[p] <= '0;
    end else if (ld_k) begin
      state      <= S_LOAD;
      r_reg      <= key_in;
      mux4_cnt   <= '0;
      mod_cnt    <= '0;
      kround_cnt <= '0;
      fill       <= '0;
      k_exp_done <= 1'b0;
    end else begin
      // fifo shift register and its fill level
      if (first_load) begin
        fifo_sr <= m10_out;
        fill    <= fill_init;
      end else if (gen_push) begin
        fifo_sr <= {fifo_sr[95:0], xor_out};
        fill    <= (fill == 3'd4) ? 3'd1 : fill + 3'd1;
      end else if (fill == 3'd4) begin
        fill    <= 3'd0;
      end

      unique case (state)
        S_IDLE: ;
        S_LOAD: begin
          // MUX-1 selects the R word; W shifts by one word.
          w_reg[0] <= m4_out;
          for (int p = 1; p < 8; p++) w_reg[p] <= w_reg[p-1];
          mux4_cnt <= mux4_cnt + 3'd1;
          if (mux4_cnt == 3'd7) state <= S_GEN;
        end
        S_GEN: begin
          // MUX-1 selects XOR_out; W shifts by one word.
          w_reg[0] <= xor_out;
          for (int p = 1; p < 8; p++) w_reg[p] <= w_reg[p-1];
          if (mod_cnt == 3'(nk - 4'd1)) begin
            mod_cnt    <= '0;
            kround_cnt <= kround_cnt + 4'd1;
          end else begin
            mod_cnt <= mod_cnt + 3'd1;
          end
          if (last_gen) state <= S_FLUSH;
        end
        S_FLUSH: begin
          state <= S_DONE;
          k_exp_done <= 1'b1;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- round-key FIFO/LIFO ----------------
  logic [$clog2(RAM_DEPTH):0] wr_count;

  aes_key_ram #(.DEPTH(RAM_DEPTH), .WIDTH(128)) u_ram (
    .clk        (clk),
    .rst        (rst),
    .clr        (ld_k),
    .mode       (mode),
    .wr         (ram_wr),
    .wdata      (ram_wdata),
    .rd         (rd_k),
    .rd_restart (rd_restart),
    .rdata      (key_out),
    .wr_count   (wr_count)
  );

  assign ram_count = 5'(wr_count);
  assign rk_count  = ram_count;

endmodule
