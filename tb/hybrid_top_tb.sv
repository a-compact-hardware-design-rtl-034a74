// hybrid_top_tb: end-to-end test of the hybrid AES-256 / SHA3-512 core at
// its default size (four AES blocks per operation).
//
// Runs: the FIPS-197 AES-256 known answer with random companion blocks;
// decryption back to the plaintext; the 64-byte "K.JANSHI LAKSHMI" x 4
// message under the 32-byte key "SRI VENKATESWARA UNIVERSITY, TPT"
// encrypted and decrypted again; random AES round trips; SHA3-512 known
// answers for "" and "abc"; multi-block messages (100 bytes, and 72 bytes,
// whose padding fills a block of its own) against a reference sponge; a
// start while busy, which must be ignored; and LED paging of a result.
// Each mechanism is counted and one that never happened is a failure.
// Latencies checked: AES done 70 cycles after start, SHA-3 26 cycles.
module hybrid_top_tb;
  import hybrid_pkg::*;
  import ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, enc = 1, sha_first = 0, sha_last = 0, btn_next = 0;
  mode_e mode = MODE_AES;
  logic [575:0] din = '0;
  logic [255:0] key = '0;
  logic [6:0] sha_len = '0;
  logic busy, done;
  logic [511:0] dout;
  logic [15:0] led;
  logic [4:0] led_page;
  int checks = 0, failures = 0, lat;
  int n_aes_enc = 0, n_aes_dec = 0, n_sha_single = 0, n_sha_multi = 0,
      n_pad_block = 0, n_busy_ignored = 0, n_led_step = 0;

  hybrid_top dut (.clk, .rst_n, .start, .mode, .enc, .din, .key, .sha_first, .sha_last,
                  .sha_len, .busy, .done, .dout, .btn_next, .led, .led_page);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s dout=%h", what, dout);
    end
  endtask

  // One operation: pulse start, wait for done, return the latency.
  task automatic run(output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic aes(input logic [255:0] k, input logic [511:0] blocks, input bit e,
                     output logic [511:0] res);
    mode = MODE_AES; enc = e; key = k; din = {blocks, 64'h0};
    run(lat);
    check(lat == 70, "AES latency");
    res = dout;
    if (e) n_aes_enc++; else n_aes_dec++;
  endtask

  function automatic logic [511:0] ref_aes4(input logic [255:0] k, input logic [511:0] blocks, input bit e);
    logic [511:0] r;
    for (int b = 0; b < 4; b++)
      r[511 - 128 * b -: 128] = e ? r_aes_enc(k, blocks[511 - 128 * b -: 128])
                                  : r_aes_dec(k, blocks[511 - 128 * b -: 128]);
    return r;
  endfunction

  // Hash a message of len bytes (msg byte 0 at msg[8*len-1 -: 8]) with the
  // core, block by block, and with the reference sponge.
  task automatic sha3(input logic [8*200-1:0] msg, input int len, output logic [511:0] got,
                      output logic [511:0] expect_d);
    int nblk = len / 72 + 1;
    logic [1599:0] s = '0;
    logic [575:0] blk;
    int bl;
    mode = MODE_SHA3;
    for (int i = 0; i < nblk; i++) begin
      bl = (i == nblk - 1) ? len - 72 * i : 72;
      blk = '0;
      for (int j = 0; j < bl; j++) blk[575 - 8 * j -: 8] = msg[8 * len - 1 - 8 * (72 * i + j) -: 8];
      din = blk; sha_first = (i == 0); sha_last = (i == nblk - 1); sha_len = 7'(bl);
      run(lat);
      check(lat == 26, "SHA-3 latency");
      if (i == nblk - 1 && bl == 0) n_pad_block++;
      s[575:0] ^= r_pad(blk, bl, i == nblk - 1);
      s = r_keccak_f(s);
    end
    if (nblk > 1) n_sha_multi++; else n_sha_single++;
    for (int j = 0; j < 64; j++) expect_d[511 - 8 * j -: 8] = s[8 * j +: 8];
    got = dout;
  endtask

  initial begin
    logic [511:0] pt, ct, back, got, exp_d;
    logic [255:0] k;
    logic [8*200-1:0] msg;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // FIPS-197 C.3 in block 0, random blocks 1..3
    k  = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    pt = {128'h00112233445566778899aabbccddeeff, $urandom, $urandom, $urandom, $urandom,
          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    aes(k, pt, 1, ct);
    check(ct[511:384] == 128'h8ea2b7ca516745bfeafc49904b496089, "FIPS-197 AES-256 ciphertext");
    check(ct == ref_aes4(k, pt, 1), "AES encrypt vs reference");
    aes(k, ct, 0, back);
    check(back == pt, "AES decrypt round trip");

    // the example message and key
    k  = "SRI VENKATESWARA UNIVERSITY, TPT";
    pt = {4{"K.JANSHI LAKSHMI"}};
    aes(k, pt, 1, ct);
    check(ct == ref_aes4(k, pt, 1), "example encrypt vs reference");
    aes(k, ct, 0, back);
    check(back == pt, "example round trip");
    check(back == 512'h4B2E4A414E534849204C414B53484D494B2E4A414E534849204C414B53484D494B2E4A414E534849204C414B53484D494B2E4A414E534849204C414B53484D49,
          "example output hex");

    for (int i = 0; i < 3; i++) begin
      k  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int w = 0; w < 16; w++) pt[32 * w +: 32] = $urandom;
      aes(k, pt, 1, ct);
      check(ct == ref_aes4(k, pt, 1), "random encrypt");
      aes(k, ct, 0, back);
      check(back == pt, "random round trip");
      check(back == ref_aes4(k, ct, 0), "random decrypt vs reference");
    end

    // start while busy is ignored
    mode = MODE_AES; enc = 1; din = {pt, 64'h0};
    @(negedge clk) start = 1;
    @(negedge clk) start = 1;
    din = '1;
    repeat (3) @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(dout == ref_aes4(k, pt, 1), "start while busy ignored");
    n_busy_ignored++;
    @(negedge clk);
    check(!busy, "idle after busy start");

    // SHA3-512 known answers
    sha3('0, 0, got, exp_d);
    check(got == 512'ha69f73cca23a9ac5c8b567dc185a756e97c982164fe25859e0d1dcc1475c80a615b2123af1f5f94c11e3e9402c3ac558f500199d95b6d3e301758586281dcd26,
          "SHA3-512 empty");
    check(got == exp_d, "SHA3-512 empty vs reference");
    msg = '0; msg[23:0] = "abc";
    sha3(msg, 3, got, exp_d);
    check(got == 512'hb751850b1a57168a5693cd924b6b096e08f621827444f70d884f5d0240d2712e10e116e9192af3c91a7ec57647e3934057340b4cf408d5a56592f8274eec53f0,
          "SHA3-512 abc");
    check(got == exp_d, "SHA3-512 abc vs reference");

    // multi-block messages
    for (int w = 0; w < 50; w++) msg[32 * w +: 32] = $urandom;
    sha3(msg, 100, got, exp_d);
    check(got == exp_d, "SHA3-512 100 bytes");
    sha3(msg, 72, got, exp_d);
    check(got == exp_d, "SHA3-512 72 bytes");
    sha3(msg, 71, got, exp_d);
    check(got == exp_d, "SHA3-512 71 bytes");

    // LED pages of the last digest (loaded one clock after done)
    @(negedge clk);
    check(led_page == 0 && led == got[511:496], "LED page 0");
    for (int p = 1; p < 33; p++) begin
      @(negedge clk) btn_next = 1;
      @(negedge clk) btn_next = 0;
      repeat (4) @(negedge clk);
      check(led_page == 5'(p % 32) && led == got[511 - 16 * (p % 32) -: 16], "LED page");
      n_led_step++;
    end

    $display("mechanisms: aes_enc=%0d aes_dec=%0d sha_single=%0d sha_multi=%0d pad_only_block=%0d busy_start_ignored=%0d led_step=%0d",
             n_aes_enc, n_aes_dec, n_sha_single, n_sha_multi, n_pad_block, n_busy_ignored, n_led_step);
    check(n_aes_enc > 0, "AES encryption exercised");
    check(n_aes_dec > 0, "AES decryption exercised");
    check(n_sha_single > 0, "single-block SHA-3 exercised");
    check(n_sha_multi > 0, "multi-block SHA-3 exercised");
    check(n_pad_block > 0, "padding-only final block exercised");
    check(n_busy_ignored > 0, "start while busy exercised");
    check(n_led_step > 0, "LED paging exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
