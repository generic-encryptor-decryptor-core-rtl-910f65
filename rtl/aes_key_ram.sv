// aes_key_ram: FIFO/LIFO round-key store, a DEPTH x WIDTH dual-port RAM.
//
// The key expansion writes round keys in generation order (round 0 first)
// through the write port; each wr pulse stores wdata at the write pointer and
// advances it. The read port returns the keys in the same order for
// encryption (mode = 1, FIFO) and in reverse order for decryption (mode = 0,
// LIFO: the last key written is read first), so decryption can start from
// the last round key. Reading does not destroy the contents: rd_restart
// rewinds the read sequence so the same expanded key can serve another block.
// clr empties the store (a new key is being loaded).
//
// Timing: writes take effect at the clock edge; a read request rd in cycle t
// gives the key on rdata in cycle t+1 (registered output, as in a block RAM),
// and rdata holds until the next read. A key written at edge t can be read
// from cycle t+1 on. wr_count tells how many keys are stored. Synchronous,
// active-high reset of the pointers; the array itself is not reset.
module aes_key_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             mode,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  input  logic             rd_restart,
  output logic [WIDTH-1:0] rdata,
  output logic [AW:0]      wr_count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      rd_cnt;
  logic [AW-1:0]    raddr;

  always_comb begin
    if (mode) raddr = rd_cnt[AW-1:0];
    else      raddr = AW'(wr_count - 1'b1 - rd_cnt);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wr_count <= '0;
    end else if (wr && wr_count < (AW+1)'(DEPTH)) begin
      wr_count <= wr_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && wr_count < (AW+1)'(DEPTH)) mem[wr_count[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst || clr || rd_restart) rd_cnt <= '0;
    else if (rd)                  rd_cnt <= rd_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)     rdata <= '0;
    else if (rd) rdata <= mem[raddr];
  end

  // A read must target a stored key.
  assert property (@(posedge clk) disable iff (rst) rd |-> (rd_cnt < wr_count))
    else $error("aes_key_ram: read beyond the stored keys");

endmodule
