// End-to-end testbench for aes_top at its default (and only) configuration,
// AES-128 with 10 rounds. It loads keys, encrypts and decrypts the published
// known-answer blocks of the AES standard, runs both cores at once, then
// encrypts random blocks under random keys and decrypts the result again,
// comparing every output with the reference model and every latency with
// 10 clocks. It also counts how often each mechanism of the design happened:
// key expansion, encryption, decryption, both cores busy together, the final
// round without (Inv)MixColumns, and the three kinds of ignored request
// (start before the keys are ready, start while busy, key load while busy).
// A mechanism that never happened counts as a failure.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   key_load = 0, key_ready;
  block_t key_in = '0;
  logic   enc_start = 0, enc_busy, enc_done;
  block_t enc_in = '0, enc_out;
  logic   dec_start = 0, dec_busy, dec_done;
  block_t dec_in = '0, dec_out;

  aes_top dut (.*);

  always #5 clk = ~clk;

  int n_key_exp = 0, n_enc = 0, n_dec = 0, n_both = 0, n_enc_last = 0, n_dec_last = 0;
  int n_ign_nokey = 0, n_ign_busy = 0, n_ign_load = 0;

  always @(posedge clk) if (rst_n) begin
    if (key_load && !enc_busy && !dec_busy) n_key_exp++;
    if (key_load && (enc_busy || dec_busy)) n_ign_load++;
    if (enc_done) n_enc++;
    if (dec_done) n_dec++;
    if (enc_busy && dec_busy) n_both++;
    if (dut.u_enc.busy && dut.u_enc.round == 4'(NR)) n_enc_last++;
    if (dut.u_dec.busy && dut.u_dec.round == 4'(NR)) n_dec_last++;
    if ((enc_start && !enc_busy || dec_start && !dec_busy) && !key_ready) n_ign_nokey++;
    if (enc_start && enc_busy || dec_start && dec_busy) n_ign_busy++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  task automatic load_key(logic [127:0] key);
    int cycles = 0;
    @(negedge clk);
    key_in = key; key_load = 1;
    @(negedge clk);
    key_load = 0;
    // A start while the keys are being expanded must be ignored.
    enc_start = 1; enc_in = ~key;
    @(negedge clk);
    enc_start = 0; cycles = 1;
    checks++;
    if (enc_busy) begin failures++; $display("FAIL start accepted before keys ready"); end
    while (!key_ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL key expansion took %0d clocks", cycles); end
  endtask

  // Start the selected cores in the same clock and check their results.
  task automatic run(bit do_enc, logic [127:0] pt, bit do_dec, logic [127:0] ct,
                     logic [127:0] key, bit disturb);
    int cycles = 0;
    bit got_e = !do_enc, got_d = !do_dec;
    @(negedge clk);
    enc_in = pt; enc_start = do_enc;
    dec_in = ct; dec_start = do_dec;
    @(negedge clk);
    enc_start = 0; dec_start = 0;
    if (disturb) begin
      // Key load and starts while busy: all must be ignored.
      key_load = 1; key_in = ~key;
      enc_start = do_enc; dec_start = do_dec; enc_in = ~pt; dec_in = ~ct;
    end
    while (!(got_e && got_d)) begin
      @(negedge clk);
      key_load = 0; enc_start = 0; dec_start = 0;
      cycles++;
      if (enc_done) begin
        got_e = 1;
        checks++;
        if (cycles != 10) begin failures++; $display("FAIL enc latency %0d", cycles); end
        check("cipher text", enc_out, encrypt(pt, key));
      end
      if (dec_done) begin
        got_d = 1;
        checks++;
        if (cycles != 10) begin failures++; $display("FAIL dec latency %0d", cycles); end
        check("plain text", dec_out, decrypt(ct, key));
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    logic [127:0] key, pt, ct;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Start with no key loaded: ignored.
    @(negedge clk); enc_start = 1; dec_start = 1;
    @(negedge clk); enc_start = 0; dec_start = 0;
    checks++;
    if (enc_busy || dec_busy) begin failures++; $display("FAIL start accepted with no key"); end

    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(key);
    run(1, 128'h3243f6a8885a308d313198a2e0370734, 1, 128'h3925841d02dc09fbdc118597196a0b32, key, 1);
    check("fips cipher text", enc_out, 128'h3925841d02dc09fbdc118597196a0b32);
    check("fips plain text", dec_out, 128'h3243f6a8885a308d313198a2e0370734);

    // Worked key-expansion example: first derived word a986ee49.
    key = 128'h3243f6a8885a308d313198a2e0370734;
    load_key(key);
    check("example w4", {96'h0, dut.u_keys.round_keys[1][127:96]}, {96'h0, 32'ha986ee49});

    key = 128'h000102030405060708090a0b0c0d0e0f;
    load_key(key);
    run(1, 128'h00112233445566778899aabbccddeeff, 0, '0, key, 0);
    check("fips c1 cipher text", enc_out, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(0, '0, 1, enc_out, key, 0);
    check("fips c1 plain text", dec_out, 128'h00112233445566778899aabbccddeeff);

    for (int n = 0; n < 40; n++) begin
      key = rand128();
      load_key(key);
      for (int m = 0; m < 3; m++) begin
        pt = rand128();
        run(1, pt, 0, '0, key, n[0]);
        ct = enc_out;
        run(1, rand128(), 1, ct, key, m[0]);
        check("round trip", dec_out, pt);
      end
    end

    need("key expansion", n_key_exp);
    need("encryption", n_enc);
    need("decryption", n_dec);
    need("both cores busy", n_both);
    need("final round without MixColumns", n_enc_last);
    need("final round without InvMixColumns", n_dec_last);
    need("start ignored before keys ready", n_ign_nokey);
    need("start ignored while busy", n_ign_busy);
    need("key load ignored while busy", n_ign_load);
    report();
    $finish;
  end
endmodule
