// tb_aes_key_expansion: runs the key expansion for AES-128, -192 and -256
// (FIPS-197 keys and random keys) and checks
//  - k_exp_done rises 4*Nr+10 clock edges after the ld_k cycle, i.e. the
//    expansion takes 4*Nr+11 cycles (51 / 59 / 67),
//  - after the first two, one round key is stored every 4 cycles,
//  - every round key, read in FIFO order (mode 1) and LIFO order (mode 0),
//    against the reference key schedule, and the FIPS-197 AES-128 last
//    round key d014f9a8c9ee2589e13f0cc8b6630ca6.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic         clk, rst, ld_k, rd_k, rd_restart, mode, k_exp_done;
  logic [1:0]   k_type;
  logic [255:0] key_in;
  logic [127:0] key_out;
  logic [4:0]   rk_count;
  int checks = 0, failures = 0;
  int cyc;          // 2-state, starts at 0

  aes_key_expansion dut (.clk(clk), .rst(rst), .ld_k(ld_k), .rd_k(rd_k), .rd_restart(rd_restart),
                         .key_in(key_in), .mode(mode), .k_type(k_type), .key_out(key_out),
                         .k_exp_done(k_exp_done), .rk_count(rk_count));

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [255:0] key, input logic [1:0] kt);
    rk_set_t rk = key_expand(key, kt);
    int nr = nr_of(kt);
    int start, prev_cnt, t_store [16];
    k_type = kt; mode = 1'b1; key_in = key;
    ld_k = 1'b1; start = cyc;
    @(posedge clk); #1 ld_k = 1'b0;
    key_in = '0;
    prev_cnt = 0;
    while (!k_exp_done) begin
      @(posedge clk); #1;
      if (rk_count != 5'(prev_cnt)) begin
        t_store[prev_cnt] = cyc - start - 1;
        prev_cnt = int'(rk_count);
      end
      if (cyc - start > 200) break;
    end
    check(cyc - start == 4*nr + 10, $sformatf("kt=%0d done after %0d edges, expected %0d",
                                               kt, cyc - start, 4*nr + 10));
    check(rk_count == 5'(nr + 1), $sformatf("kt=%0d stored %0d keys", kt, rk_count));
    for (int r = 3; r <= nr; r++)
      check(t_store[r] - t_store[r-1] == 4,
            $sformatf("kt=%0d key %0d stored %0d cycles after key %0d", kt, r,
                      t_store[r] - t_store[r-1], r - 1));
    check(t_store[nr] == 4*nr + (kt[1] ? 5 : (kt[0] ? 7 : 9)),
          $sformatf("kt=%0d last key stored in cycle %0d", kt, t_store[nr]));
    // FIFO order
    rd_restart = 1; @(posedge clk); #1 rd_restart = 0;
    for (int r = 0; r <= nr; r++) begin
      rd_k = 1; @(posedge clk); #1 rd_k = 0;
      check(key_out === rk[r], $sformatf("kt=%0d FIFO key %0d got %032h exp %032h",
                                         kt, r, key_out, rk[r]));
    end
    // LIFO order
    mode = 1'b0;
    rd_restart = 1; @(posedge clk); #1 rd_restart = 0;
    for (int r = nr; r >= 0; r--) begin
      rd_k = 1; @(posedge clk); #1 rd_k = 0;
      check(key_out === rk[r], $sformatf("kt=%0d LIFO key %0d got %032h exp %032h",
                                         kt, r, key_out, rk[r]));
      if (kt == 2'b00 && key == 256'h2b7e151628aed2a6abf7158809cf4f3c && r == 10)
        check(key_out === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    end
  endtask

  initial begin
    init_tables();
    rst = 1; ld_k = 0; rd_k = 0; rd_restart = 0; mode = 1; k_type = 0; key_in = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    run(256'h2b7e151628aed2a6abf7158809cf4f3c, 2'b00);
    run(256'h000102030405060708090a0b0c0d0e0f1011121314151617, 2'b01);
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 2'b10);
    for (int t = 0; t < 6; t++) begin
      automatic logic [255:0] k = {$urandom, $urandom, $urandom, $urandom,
                                   $urandom, $urandom, $urandom, $urandom};
      automatic logic [1:0] kt = 2'(t % 3);
      if (kt == 2'b00) k[255:128] = '0;
      if (kt == 2'b01) k[255:192] = '0;
      run(k, kt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
