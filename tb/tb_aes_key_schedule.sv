// Self-checking testbench for aes_key_schedule: expands known keys (the AES
// standard's example key, whose round keys 1 and 10 are published, and a key
// whose first derived word is worked out by hand) and random keys, checks all
// 11 round keys against the reference model, checks that `ready` rises
// exactly 10 clocks after `load`, and that a load during an expansion
// restarts it.
module tb_aes_key_schedule;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, ready;
  block_t      key_in = '0;
  round_keys_t round_keys;
  logic [127:0] rk [11];

  aes_key_schedule dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  task automatic expand_and_check(logic [127:0] key, string what);
    int cycles = 0;
    @(negedge clk);
    key_in = key; load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (ready) begin failures++; $display("FAIL %s: ready still high after load", what); end
    cycles = 0;  // clocks after the edge that took the request
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL %s: expansion took %0d clocks", what, cycles); end
    expand(key, rk);
    for (int k = 0; k <= 10; k++) check($sformatf("%s rk%0d", what, k), round_keys[k], rk[k]);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expand_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c, "fips");
    check("fips rk1", round_keys[1], 128'ha0fafe1788542cb123a339392a6c7605);
    check("fips rk10", round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    // Worked example: RotWord(e0370734) -> 370734e0, SubWord -> 9ac518e1,
    // XOR Rcon 01 -> 9bc518e1, XOR w0 = 3243f6a8 -> a986ee49.
    expand_and_check(128'h3243f6a8885a308d313198a2e0370734, "example");
    check("example w4", {96'h0, round_keys[1][127:96]}, {96'h0, 32'ha986ee49});
    for (int n = 0; n < 20; n++) expand_and_check(rand128(), "random");
    // Restart: a second load in the middle of an expansion.
    @(negedge clk);
    key_in = rand128(); load = 1;
    @(negedge clk); load = 0;
    repeat (4) @(negedge clk);
    expand_and_check(128'h000102030405060708090a0b0c0d0e0f, "restart");
    report();
    $finish;
  end
endmodule
