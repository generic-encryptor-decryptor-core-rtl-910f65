// tb_aes_mix_columns: MixColumns / InvMixColumns against the reference model
// (plain GF(2^8) coefficient products), the known column db 13 53 45 ->
// 8e 4d a1 bc, the FIPS-197 round-1 state 6353e08c..d0e7 -> 5f726415..f91a
// (the published block test shows its first bytes), and InvMix(Mix(x)) = x
// on random states.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic         mode;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.mode(mode), .din(din), .dout(dout));

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
    din = 128'h6353e08c0960e104cd70b751bacad0e7;
    mode = 1'b1; #1; check(128'h5f72641557f5bc92f7be3b291db9f91a);
    mode = 1'b0; din = 128'h5f72641557f5bc92f7be3b291db9f91a;
    #1; check(128'h6353e08c0960e104cd70b751bacad0e7);
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    mode = 1'b1; #1; check(128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    din = 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6;
    mode = 1'b0; #1; check(128'hdb135345_f20a225c_01010101_c6c6c6c6);
    for (int t = 0; t < 200; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      mode = t[0];
      #1; check(mix_columns(din, !mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
