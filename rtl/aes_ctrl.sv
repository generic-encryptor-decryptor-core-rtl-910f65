// aes_ctrl: control logic block (FSM) of the Tiny AES round datapath.
//
// One operation starts when ld_d loads a data block. The FSM then
//   FIRST_RD  requests the first round key from the key FIFO/LIFO (round key 0
//             for encryption, as soon as one is stored; round key Nr for
//             decryption, only after the key expansion has finished),
//   ADD0      adds it to the input block (DEMUX-1 on "first round", MUX-1 on
//             data_en) and loads Reg1,
//   SB        Reg1 -> ByteSub -> ShiftRows -> Reg2,
//   MC        Reg2 -> Mix/InvMixColumn -> Reg3,
//   ARK       the round key goes through the shared Mix/InvMix unit as
//             InvMixColumn (delay_rd_fifo = 1; used for decryption only), is
//             added to Reg3 and the result is loaded back into Reg1,
// for rounds 1..Nr-1, and for round Nr SB followed by
//   LAST      Reg2 bypasses the MixColumn unit (DEMUX-2 on last_round), is added
//             to the last round key and loaded into the output buffer.
// The key for the next addition is requested as soon as the FIFO holds it
// (during SB, MC or a WAIT state); a request in cycle t delivers the key in
// t+1. A round therefore takes 3 cycles when the key is ready, and waits for
// the key expansion otherwise (encryption runs while keys are generated).
// done rises the cycle after the output buffer is loaded and stays high until
// the next ld_d or ld_k.
//
// Interface: rk_count is the number of round keys stored, k_exp_done the end of
// key expansion. The key read order is rewound by ld_d itself (the top wires
// ld_d to the key store's restart input). k_type and mode must be stable during the operation. Synchronous
// active-high reset. The state sequence and the key-prefetch policy are this
// implementation's own; the control outputs are those of the block diagram.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ld_d,
  input  logic       ld_k,
  input  logic       mode,
  input  logic [1:0] k_type,
  input  logic [4:0] rk_count,
  input  logic       k_exp_done,
  output logic       rd_fifo,
  output logic       data_en,
  output logic       first_round,
  output logic       reg1_en,
  output logic       reg3_en,
  output logic       last_round,
  output logic       delay_rd_fifo,
  output logic       out_en,
  output logic       done
);

  typedef enum logic [3:0] {
    C_IDLE, C_FIRST_RD, C_ADD0, C_SB, C_MC, C_WAIT, C_ARK, C_WAIT_LAST, C_LAST, C_DONE
  } ctrl_state_e;

  ctrl_state_e state;
  logic [3:0]  nr;
  logic [3:0]  round;
  logic [4:0]  rd_idx;        // index (in read order) of the next key to fetch
  logic        key_ready;     // key for the next addition already fetched
  logic        key_avail;

  assign nr = nr_of(k_type);

  // Encryption consumes keys while they are produced; decryption reads the
  // store backwards and so needs the whole expansion first.
  assign key_avail = (mode == MODE_ENC) ? (rk_count > rd_idx) : k_exp_done;

  always_comb begin
    rd_fifo       = 1'b0;
    data_en       = 1'b0;
    first_round   = 1'b0;
    reg1_en       = 1'b0;
    reg3_en       = 1'b0;
    last_round    = 1'b0;
    delay_rd_fifo = 1'b0;
    out_en        = 1'b0;
    unique case (state)
      C_FIRST_RD: rd_fifo = key_avail;
      C_ADD0: begin
        data_en     = 1'b1;
        first_round = 1'b1;
        reg1_en     = 1'b1;
      end
      C_SB, C_MC, C_WAIT, C_WAIT_LAST: begin
        rd_fifo    = !key_ready && key_avail;
        reg3_en    = (state == C_MC);
        last_round = (state == C_WAIT_LAST) || (state == C_SB && round == nr);
      end
      C_ARK: begin
        delay_rd_fifo = 1'b1;
        reg1_en       = 1'b1;
      end
      C_LAST: begin
        last_round = 1'b1;
        out_en     = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_IDLE;
      round     <= '0;
      rd_idx    <= '0;
      key_ready <= 1'b0;
      done      <= 1'b0;
    end else if (ld_d) begin
      state     <= C_FIRST_RD;
      round     <= '0;
      rd_idx    <= '0;
      key_ready <= 1'b0;
      done      <= 1'b0;
    end else if (ld_k) begin
      state     <= C_IDLE;
      done      <= 1'b0;
    end else begin
      if (rd_fifo) rd_idx <= rd_idx + 5'd1;
      unique case (state)
        C_IDLE: ;
        C_FIRST_RD: if (rd_fifo) state <= C_ADD0;
        C_ADD0: begin
          round     <= 4'd1;
          key_ready <= 1'b0;
          state     <= C_SB;
        end
        C_SB: begin
          if (rd_fifo) key_ready <= 1'b1;
          if (round == nr) state <= (key_ready || rd_fifo) ? C_LAST : C_WAIT_LAST;
          else             state <= C_MC;
        end
        C_MC: begin
          if (rd_fifo) key_ready <= 1'b1;
          state <= (key_ready || rd_fifo) ? C_ARK : C_WAIT;
        end
        C_WAIT: if (rd_fifo) begin
          key_ready <= 1'b1;
          state     <= C_ARK;
        end
        C_WAIT_LAST: if (rd_fifo) begin
          key_ready <= 1'b1;
          state     <= C_LAST;
        end
        C_ARK: begin
          key_ready <= 1'b0;
          round     <= round + 4'd1;
          state     <= C_SB;
        end
        C_LAST: begin
          key_ready <= 1'b0;
          done      <= 1'b1;
          state     <= C_DONE;
        end
        C_DONE: ;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
