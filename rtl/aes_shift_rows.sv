// aes_shift_rows: ShiftRows / InvShiftRows of the 128-bit state.
//
// Row r of the state is rotated by r byte positions: to the left for
// encryption (mode = 1), to the right for decryption (mode = 0). Row 0 is not
// moved. The operation is pure rewiring; the only logic is the 2:1 byte
// selection between the two directions. State byte s[r][c] is block byte
// r + 4c (bits [127-8(r+4c) -: 8]). Combinational. Rows 0 and 2 come out the
// same in both directions, so half of the output bits are plain wires.
module aes_shift_rows
  import aes_pkg::*;
(
  input  logic   mode,
  input  block_t din,
  output block_t dout
);

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) begin
        if (mode == MODE_ENC)
          dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + r) % 4)) -: 8];
        else
          dout[127 - 8*(r + 4*c) -: 8] = din[127 - 8*(r + 4*((c + 4 - r) % 4)) -: 8];
      end
    end
  end

endmodule
