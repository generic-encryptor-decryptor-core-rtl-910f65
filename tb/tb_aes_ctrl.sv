// tb_aes_ctrl: drives the control FSM with a modelled key store and checks
// the control sequence it produces, for all key types and both modes:
//  - a key is requested only when it is stored (encryption) or when the
//    expansion is done (decryption), and exactly Nr+1 keys are requested,
//  - Reg1 is loaded Nr times (once from the input, Nr-1 times from XOR-2),
//    Reg3 Nr-1 times, the round key goes through InvMix Nr-1 times, the
//    output buffer once, with last_round set when it is loaded,
//  - with all keys ready, done rises 3*Nr+2 edges after the ld_d cycle,
//  - with keys arriving every 4 cycles, encryption waits (stalls) for them.
module tb_aes_ctrl;
  import aes_ref_pkg::nr_of;

  logic       clk, rst, ld_d, ld_k, mode, k_exp_done;
  logic [1:0] k_type;
  logic [4:0] rk_count;
  logic rd_fifo, data_en, first_round, reg1_en, reg3_en, last_round;
  logic delay_rd_fifo, out_en, done;
  int checks = 0, failures = 0;
  int n_rd, n_reg1, n_reg3, n_mixkey, n_out;
  int cyc;          // 2-state, starts at 0

  aes_ctrl dut (.clk(clk), .rst(rst), .ld_d(ld_d), .ld_k(ld_k), .mode(mode), .k_type(k_type),
                .rk_count(rk_count), .k_exp_done(k_exp_done), .rd_fifo(rd_fifo),
                .data_en(data_en), .first_round(first_round),
                .reg1_en(reg1_en), .reg3_en(reg3_en), .last_round(last_round),
                .delay_rd_fifo(delay_rd_fifo), .out_en(out_en), .done(done));

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

  // Watch the outputs every cycle.
  always @(negedge clk) if (!rst) begin
    if (rd_fifo) begin
      if (mode) check(int'(rk_count) > n_rd, "key requested before it was stored");
      else      check(k_exp_done, "decryption key requested before expansion done");
      n_rd++;
    end
    if (reg1_en) n_reg1++;
    if (reg3_en) n_reg3++;
    if (delay_rd_fifo) n_mixkey++;
    if (out_en) begin
      n_out++;
      check(last_round, "output loaded without last_round");
    end
    if (data_en) check(first_round && reg1_en, "data_en without first_round/reg1_en");
  end

  // key_period = 0: all keys ready; otherwise one new key every key_period cycles.
  task automatic run(input logic [1:0] kt, input logic m, input int key_period);
    int nr = nr_of(kt);
    int start, t;
    k_type = kt; mode = m;
    n_rd = 0; n_reg1 = 0; n_reg3 = 0; n_mixkey = 0; n_out = 0;
    if (key_period == 0) begin rk_count = 5'(nr + 1); k_exp_done = 1; end
    else begin rk_count = 1; k_exp_done = 0; end
    ld_d = 1; start = cyc;
    @(posedge clk); #1 ld_d = 0;
    t = 0;
    while (!done && t < 500) begin
      @(posedge clk); #1;
      t++;
      if (key_period != 0 && t % key_period == 0 && rk_count < 5'(nr + 1)) begin
        rk_count++;
        if (rk_count == 5'(nr + 1)) k_exp_done = 1;
      end
    end
    check(n_rd == nr + 1, $sformatf("kt=%0d m=%0b %0d key reads", kt, m, n_rd));
    check(n_reg1 == nr, $sformatf("kt=%0d m=%0b %0d Reg1 loads", kt, m, n_reg1));
    check(n_reg3 == nr - 1, $sformatf("kt=%0d m=%0b %0d Reg3 loads", kt, m, n_reg3));
    check(n_mixkey == nr - 1, $sformatf("kt=%0d m=%0b %0d key mix passes", kt, m, n_mixkey));
    check(n_out == 1, $sformatf("kt=%0d m=%0b %0d output loads", kt, m, n_out));
    if (key_period == 0)
      check(cyc - start == 3*nr + 2, $sformatf("kt=%0d m=%0b done after %0d edges, expected %0d",
                                               kt, m, cyc - start, 3*nr + 2));
    else if (m)
      check(cyc - start > 3*nr + 2, $sformatf("kt=%0d no stall with slow keys", kt));
    @(posedge clk); #1;
    check(done, "done stays high");
  endtask

  initial begin
    rst = 1; ld_d = 0; ld_k = 0; mode = 1; k_type = 0; rk_count = 0; k_exp_done = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int kt = 0; kt < 3; kt++) begin
      run(2'(kt), 1'b1, 0);
      run(2'(kt), 1'b0, 0);
      run(2'(kt), 1'b1, 4);
      run(2'(kt), 1'b0, 4);
    end
    // ld_k aborts an operation and clears done
    ld_k = 1; @(posedge clk); #1 ld_k = 0;
    check(!done, "ld_k clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
