// Self-checking testbench for aes_encrypt: the round keys are computed by the
// reference model and driven in parallel. Two published known-answer blocks
// of the AES standard, then random keys and blocks compared with the
// reference model. Checks that `done` pulses exactly 10 clocks after the
// start, for one clock, and that a start while busy is ignored.
module tb_aes_encrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, busy, done;
  block_t      data_in = '0, data_out;
  round_keys_t round_keys = '0;
  logic [127:0] rk [11];

  aes_encrypt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  // plain text din under key; expect exp; optionally poke start while busy.
  task automatic run(logic [127:0] din, logic [127:0] key, logic [127:0] exp, bit poke);
    int cycles = 0;
    expand(key, rk);
    for (int k = 0; k <= 10; k++) round_keys[k] = rk[k];
    @(negedge clk);
    data_in = din; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;  // clocks after the edge that took the request
    if (poke) begin
      data_in = ~din; start = 1;
      @(negedge clk); start = 0; cycles++;
    end
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL latency %0d clocks", cycles); end
    check("cipher text", data_out, exp);
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done/busy after result"); end
    check("cipher text held", data_out, exp);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32, 0);
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    for (int n = 0; n < 50; n++) begin
      logic [127:0] din, key;
      din = rand128(); key = rand128();
      run(din, key, encrypt(din, key), n[0]);
    end
    report();
    $finish;
  end
endmodule
