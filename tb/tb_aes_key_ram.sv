// tb_aes_key_ram: writes 15 random keys, reads them back in FIFO order
// (mode 1) and LIFO order (mode 0), checks the one-cycle read latency, the
// wr_count, that a restart rewinds the order and that clr empties the store.
module tb_aes_key_ram;
  logic         clk, rst, clr, mode, wr, rd, rd_restart;
  logic [127:0] wdata, rdata;
  logic [4:0]   wr_count;
  logic [127:0] keys [15];
  int checks = 0, failures = 0;

  aes_key_ram dut (.clk(clk), .rst(rst), .clr(clr), .mode(mode), .wr(wr), .wdata(wdata),
                   .rd(rd), .rd_restart(rd_restart), .rdata(rdata), .wr_count(wr_count));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic read_all(input logic m, input int n);
    mode = m;
    rd_restart = 1; @(posedge clk); #1 rd_restart = 0;
    for (int i = 0; i < n; i++) begin
      rd = 1; @(posedge clk); #1 rd = 0;
      check(rdata, m ? keys[i] : keys[n-1-i], $sformatf("mode %0b read %0d", m, i));
      @(posedge clk); #1;
      check(rdata, m ? keys[i] : keys[n-1-i], "rdata holds");
    end
  endtask

  initial begin
    rst = 1; clr = 0; mode = 1; wr = 0; rd = 0; rd_restart = 0; wdata = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 15; i++) begin
      keys[i] = {$urandom, $urandom, $urandom, $urandom};
      wdata = keys[i]; wr = 1; @(posedge clk); #1 wr = 0;
      checks++;
      if (wr_count != 5'(i + 1)) begin failures++; $display("FAIL wr_count %0d", wr_count); end
    end
    read_all(1'b1, 15);
    read_all(1'b0, 15);
    read_all(1'b1, 15);
    clr = 1; @(posedge clk); #1 clr = 0;
    checks++;
    if (wr_count != 0) begin failures++; $display("FAIL clr"); end
    // fewer keys: LIFO starts from the last one written
    for (int i = 0; i < 11; i++) begin
      keys[i] = {$urandom, $urandom, $urandom, $urandom};
      wdata = keys[i]; wr = 1; @(posedge clk); #1 wr = 0;
    end
    read_all(1'b0, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
