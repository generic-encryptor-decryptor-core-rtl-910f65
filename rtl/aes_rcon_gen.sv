// aes_rcon_gen: round-constant generation for the key expansion.
//
// A 10 x 8 ROM holds Rcon[1..10] = {01,02,04,08,10,20,40,80,1b,36}. A 4-bit
// address counter selects the entry: it is cleared by cnt_clr (a new key) and
// advanced by cnt_en after each word that used a round constant. The top byte
// of the 32-bit input word is XORed with the ROM byte; the lower 24 bits pass
// unchanged:
//   rcon_out = {rcon_in[31:24] ^ Rcon[addr+1], rcon_in[23:0]}.
// The output is combinational in rcon_in and the counter; the counter is
// registered with a synchronous, active-high reset. The ROM contents follow
// from Rcon[i] = x^(i-1) in GF(2^8); AES-128 uses all ten entries, AES-192
// eight and AES-256 seven. The counter saturates at the last entry.
module aes_rcon_gen
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  cnt_clr,
  input  logic  cnt_en,
  input  word_t rcon_in,
  output word_t rcon_out
);

  byte_t      rom_q;
  logic [3:0] addr;

  always_ff @(posedge clk) begin
    if (rst || cnt_clr)            addr <= '0;
    else if (cnt_en && addr != 4'd9) addr <= addr + 4'd1;
  end

  always_comb begin
    unique case (addr)
      4'd0:    rom_q = 8'h01;
      4'd1:    rom_q = 8'h02;
      4'd2:    rom_q = 8'h04;
      4'd3:    rom_q = 8'h08;
      4'd4:    rom_q = 8'h10;
      4'd5:    rom_q = 8'h20;
      4'd6:    rom_q = 8'h40;
      4'd7:    rom_q = 8'h80;
      4'd8:    rom_q = 8'h1b;
      4'd9:    rom_q = 8'h36;
      default: rom_q = 8'h00;
    endcase
    rcon_out = {rcon_in[31:24] ^ rom_q, rcon_in[23:0]};
  end

endmodule
