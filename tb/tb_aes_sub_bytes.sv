// tb_aes_sub_bytes: random 128-bit states through SubBytes and InvSubBytes,
// compared byte-wise with the reference model, plus the published block test
// vectors: InvSubBytes(2dfb0234 3f6d12dd 09337ec7 5b36e3f0) =
// fa636a28 25b339c9 40668a31 57244d17 and SubBytes(00 10 20 .. f0), whose
// output begins 63 ca b7 04 09 53 d0.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  logic         mode;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_tables();
    din = 128'h2dfb02343f6d12dd09337ec75b36e3f0; mode = 1'b0; #1;
    checks++;
    if (dout !== 128'hfa636a2825b339c940668a3157244d17) begin
      failures++; $display("FAIL published InvSubBytes vector: got %032h", dout);
    end
    din = 128'hfa636a2825b339c940668a3157244d17; mode = 1'b1; #1;
    checks++;
    if (dout !== 128'h2dfb02343f6d12dd09337ec75b36e3f0) begin
      failures++; $display("FAIL published vector forward: got %032h", dout);
    end
    din = 128'h00102030405060708090a0b0c0d0e0f0; mode = 1'b1; #1;
    checks++;
    if (dout[127:72] !== 56'h63cab7040953d0) begin
      failures++; $display("FAIL SubBytes(00 10 .. f0): got %032h", dout);
    end
    for (int t = 0; t < 200; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      mode = t[0];
      #1;
      checks++;
      if (dout !== sub_bytes(din, !mode)) begin
        failures++;
        $display("FAIL mode=%0b in=%032h got=%032h", mode, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
