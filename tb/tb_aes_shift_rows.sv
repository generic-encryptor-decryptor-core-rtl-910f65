// tb_aes_shift_rows: ShiftRows / InvShiftRows against the reference model,
// a fixed pattern with distinct bytes and random states.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic         mode;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mode=%0b in=%032h got=%032h exp=%032h", mode, din, dout, exp);
    end
  endtask

  initial begin
    // bytes 00..0f: row r, column c holds r+4c
    din = 128'h000102030405060708090a0b0c0d0e0f;
    mode = 1'b1; #1; check(128'h00050a0f04090e03080d02070c01060b);
    mode = 1'b0; #1; check(128'h000d0a0704010e0b0805020f0c090603);
    for (int t = 0; t < 100; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      mode = t[0];
      #1; check(shift_rows(din, !mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
