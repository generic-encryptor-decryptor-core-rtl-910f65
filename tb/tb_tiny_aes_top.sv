// tb_tiny_aes_top: end-to-end test of the Tiny AES core at its default
// (and only) size.
//
// For AES-128, -192 and -256 it encrypts and decrypts the FIPS-197 example
// vectors and random blocks under random keys, comparing with the
// reference model and with the published ciphertexts. Each key is loaded
// once with ld_k (LSB half on din_key_lsb, MSB half on dout_key_msb_in);
// further blocks reuse it with ld_d only, switching between encryption and
// decryption. Latencies are checked, counted from the ld_k cycle up to and
// including the first cycle with done high:
//   encryption with a fresh key  53 / 59 / 65  (published: 55 / 63 / 71)
//   decryption with a fresh key  7*Nr+12 = 82 / 96 / 110 (published: 86 / 100 / 114)
// and 3*Nr+2 edges after the ld_d cycle when the key is already expanded.
// It also counts the mechanisms of the design and fails if one never
// happened: encryption waiting for round keys still being generated,
// decryption waiting for the end of expansion, key reuse, a mode switch on
// a stored key, the last-round MixColumn bypass, each key type, and a reset
// in the middle of a decryption.
module tb_tiny_aes_top;
  import aes_ref_pkg::*;

  logic         clk, rst, ld_k, ld_d, mode, done, oe;
  logic [1:0]   k_type;
  logic [127:0] din_key_lsb, msb_in, msb_out;
  int checks = 0, failures = 0;
  int ke_end = 0;   // cycle in which the last started key expansion ends
  int cyc;          // 2-state, starts at 0
  int n_reset = 0;
  int n_enc_stall = 0, n_dec_wait = 0, n_reuse = 0, n_switch = 0, n_bypass = 0;
  int n_kt [3] = '{0, 0, 0};

  tiny_aes_top dut (.clk(clk), .rst(rst), .ld_k(ld_k), .ld_d(ld_d), .mode(mode),
                    .k_type(k_type), .din_key_lsb(din_key_lsb), .dout_key_msb_in(msb_in),
                    .dout_key_msb_out(msb_out), .dout_key_msb_oe(oe), .done(done));

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Waits for done; returns the number of clock edges since cycle `start`.
  task automatic wait_done(input int start, output int edges);
    while (!done && cyc - start < 1000) begin
      @(posedge clk); #1;
    end
    edges = cyc - start;
  endtask

  task automatic check_result(input logic [127:0] in, input logic [255:0] key,
                              input logic [1:0] kt, input logic m, input string tag);
    logic [127:0] exp = m ? encrypt(in, key, kt) : decrypt(in, key, kt);
    check(oe === 1'b1, {tag, ": bus not driven with done"});
    check(msb_out === exp, $sformatf("%s kt=%0d mode=%0b in=%032h got=%032h exp=%032h",
                                     tag, kt, m, in, msb_out, exp));
    n_bypass++;
    n_kt[kt]++;
  endtask

  // ld_k then ld_d in the next cycle; returns the latency (cycles from the
  // ld_k cycle up to and including the first done cycle).
  task automatic fresh(input logic [255:0] key, input logic [1:0] kt, input logic m,
                       input logic [127:0] in, output int lat);
    int start, edges;
    k_type = kt; mode = m;
    ld_k = 1; din_key_lsb = key[127:0]; msb_in = key[255:128]; start = cyc;
    @(posedge clk); #1 ld_k = 0; msb_in = '0;
    ld_d = 1; din_key_lsb = in;
    @(posedge clk); #1 ld_d = 0; din_key_lsb = '0;
    check(!done, "done cleared by a new operation");
    ke_end = start + 4*nr_of(kt) + 10;
    wait_done(start, edges);
    lat = edges + 1;
    check_result(in, key, kt, m, "fresh");
  endtask

  // ld_d only, on the key already expanded.
  task automatic reuse(input logic [255:0] key, input logic [1:0] kt, input logic m,
                       input logic [127:0] in);
    int start, edges, nr = nr_of(kt);
    if (m != mode) n_switch++;
    mode = m;
    ld_d = 1; din_key_lsb = in; start = cyc;
    @(posedge clk); #1 ld_d = 0; din_key_lsb = '0;
    wait_done(start, edges);
    // a decryption that starts while the key expansion still runs (right
    // after a fresh AES-256 encryption) waits for it, so it may take longer
    if (!m && start < ke_end)
      check(edges >= 3*nr + 2 && edges <= 3*nr + 2 + (ke_end - start),
            $sformatf("early reuse kt=%0d done after %0d edges", kt, edges));
    else
      check(edges == 3*nr + 2, $sformatf("reuse kt=%0d mode=%0b done after %0d edges, expected %0d",
                                         kt, m, edges, 3*nr + 2));
    check_result(in, key, kt, m, "reuse");
    n_reuse++;
  endtask

  function automatic logic [255:0] rand_key(input logic [1:0] kt);
    logic [255:0] k = {$urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom, $urandom};
    if (kt == 2'b00) k[255:128] = '0;
    if (kt == 2'b01) k[255:192] = '0;
    return k;
  endfunction

  initial begin
    int lat;
    static int enc_lat [3] = '{53, 59, 65};
    static int doc_enc [3] = '{55, 63, 71};
    static int doc_dec [3] = '{86, 100, 114};
    logic [255:0] fips_key [3];
    logic [127:0] fips_ct [3];
    static logic [127:0] pt = 128'h00112233445566778899aabbccddeeff;
    init_tables();
    fips_key[0] = 256'h000102030405060708090a0b0c0d0e0f;
    fips_key[1] = 256'h000102030405060708090a0b0c0d0e0f1011121314151617;
    fips_key[2] = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    fips_ct[0]  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    fips_ct[1]  = 128'hdda97ca4864cdfe06eaf70a0ec0d7191;
    fips_ct[2]  = 128'h8ea2b7ca516745bfeafc49904b496089;

    rst = 1; ld_k = 0; ld_d = 0; mode = 1; k_type = 0; din_key_lsb = '0; msb_in = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    check(!done && !oe, "idle after reset");

    for (int kt = 0; kt < 3; kt++) begin
      automatic int nr = nr_of(2'(kt));
      // FIPS-197 example: encrypt with a fresh key
      fresh(fips_key[kt], 2'(kt), 1'b1, pt, lat);
      check(msb_out === fips_ct[kt], $sformatf("FIPS-197 ciphertext kt=%0d got %032h", kt, msb_out));
      check(lat == enc_lat[kt], $sformatf("kt=%0d encryption latency %0d, expected %0d",
                                          kt, lat, enc_lat[kt]));
      check(lat <= doc_enc[kt], $sformatf("kt=%0d encryption latency %0d above %0d",
                                          kt, lat, doc_enc[kt]));
      // the rounds wait for keys: far more than 3 cycles per round after ld_d
      if (lat > 3*nr + 4) n_enc_stall++;
      // decrypt it again on the stored key (mode switch, key reuse)
      reuse(fips_key[kt], 2'(kt), 1'b0, fips_ct[kt]);
      check(msb_out === pt, $sformatf("FIPS-197 plaintext kt=%0d got %032h", kt, msb_out));
      // decryption with a fresh key
      fresh(fips_key[kt], 2'(kt), 1'b0, fips_ct[kt], lat);
      check(msb_out === pt, $sformatf("FIPS-197 decryption kt=%0d got %032h", kt, msb_out));
      check(lat == 7*nr + 12, $sformatf("kt=%0d decryption latency %0d, expected %0d",
                                        kt, lat, 7*nr + 12));
      check(lat <= doc_dec[kt], $sformatf("kt=%0d decryption latency %0d above %0d",
                                          kt, lat, doc_dec[kt]));
      if (lat >= 4*nr + 11) n_dec_wait++;
    end

    // random keys and blocks
    for (int t = 0; t < 12; t++) begin
      automatic logic [1:0]   kt  = 2'(t % 3);
      automatic logic [255:0] key = rand_key(kt);
      automatic logic         m   = 1'($urandom);
      fresh(key, kt, m, {$urandom, $urandom, $urandom, $urandom}, lat);
      for (int b = 0; b < 3; b++)
        reuse(key, kt, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
    end

    // reset in the middle of a decryption: the core must come back idle and
    // then run a new operation normally
    begin
      automatic logic [255:0] key = rand_key(2'b10);
      k_type = 2'b10; mode = 1'b0;
      ld_k = 1; din_key_lsb = key[127:0]; msb_in = key[255:128];
      @(posedge clk); #1 ld_k = 0; msb_in = '0;
      ld_d = 1; din_key_lsb = 128'h0123456789abcdeffedcba9876543210;
      @(posedge clk); #1 ld_d = 0; din_key_lsb = '0;
      repeat (40) @(posedge clk);
      #1 rst = 1;
      repeat (2) @(posedge clk);
      #1 rst = 0;
      repeat (150) begin
        @(posedge clk); #1;
        check(!done && !oe, "done after a reset without a new operation");
      end
      n_reset++;
      fresh(key, 2'b10, 1'b0, 128'h0123456789abcdeffedcba9876543210, lat);
      check(lat == 7*14 + 12, $sformatf("decryption after reset took %0d cycles", lat));
    end

    check(n_reset > 0, "no reset during an operation");
    check(n_enc_stall > 0, "encryption never waited for a round key");
    check(n_dec_wait > 0, "decryption never waited for the key expansion");
    check(n_reuse > 0, "no block reused a stored key");
    check(n_switch > 0, "no mode switch on a stored key");
    check(n_bypass > 0, "last-round MixColumn bypass never used");
    for (int kt = 0; kt < 3; kt++) check(n_kt[kt] > 0, $sformatf("key type %0d never used", kt));
    $display("mechanisms: reset=%0d enc_stall=%0d dec_wait=%0d reuse=%0d mode_switch=%0d bypass=%0d kt=%0d/%0d/%0d",
             n_reset, n_enc_stall, n_dec_wait, n_reuse, n_switch, n_bypass, n_kt[0], n_kt[1], n_kt[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
