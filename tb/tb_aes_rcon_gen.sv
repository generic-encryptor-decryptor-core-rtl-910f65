// tb_aes_rcon_gen: steps the Rcon address counter through all ten entries
// and checks rcon_out = {in[31:24] ^ Rcon[i], in[23:0]}, with Rcon[i]
// computed independently as x^(i-1) in GF(2^8); then checks clear and
// saturation at the last entry.
module tb_aes_rcon_gen;
  import aes_ref_pkg::*;

  logic        clk, rst, cnt_clr, cnt_en;
  logic [31:0] rin, rout;
  int checks = 0, failures = 0;

  aes_rcon_gen dut (.clk(clk), .rst(rst), .cnt_clr(cnt_clr), .cnt_en(cnt_en),
                    .rcon_in(rin), .rcon_out(rout));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] rc);
    checks++;
    if (rout !== {rin[31:24] ^ rc, rin[23:0]}) begin
      failures++;
      $display("FAIL in=%08h got=%08h rcon=%02h", rin, rout, rc);
    end
  endtask

  initial begin
    logic [7:0] rc;
    rst = 1; cnt_clr = 0; cnt_en = 0; rin = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    rc = 8'h01;
    for (int i = 0; i < 10; i++) begin
      rin = $urandom;
      #1 check(rc);
      cnt_en = 1;
      @(posedge clk); #1 cnt_en = 0;
      rc = gmul(rc, 8'h02);
    end
    // saturated at Rcon[10] = {36}
    rin = $urandom; #1 check(8'h36);
    cnt_clr = 1; @(posedge clk); #1 cnt_clr = 0;
    rin = $urandom; #1 check(8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
