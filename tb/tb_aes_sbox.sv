// tb_aes_sbox: exhaustive check of the shared composite-field S-box.
// All 256 inputs are checked in both directions against the reference
// model (GF(2^8) inverse by exponentiation plus affine map), plus the
// S-box example {53} -> {ed} and the round trip InvSub(Sub(x)) = x.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic       mode;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.mode(mode), .sb_in(din), .sb_out(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    init_tables();
    for (int x = 0; x < 256; x++) begin
      mode = 1'b1; din = 8'(x); #1;
      check(dout, sbox(8'(x)), $sformatf("SubBytes(%02h)", x));
      mode = 1'b0; din = sbox(8'(x)); #1;
      check(dout, 8'(x), $sformatf("InvSubBytes(%02h)", sbox(8'(x))));
    end
    mode = 1'b1; din = 8'h53; #1; check(dout, 8'hed, "S(53)");
    mode = 1'b0; din = 8'hed; #1; check(dout, 8'h53, "InvS(ed)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
