// Self-checking testbench for aes_add_round_key: known-answer vectors from the AES
// standard's worked example, then random states compared with the reference
// model in aes_ref_pkg. Combinational block: each vector is applied and
// checked after 1 ns.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out, round_key, expv;
  logic         last;

  aes_add_round_key dut (.state_in(state_in), .round_key(round_key), .state_out(state_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    round_key = '0;
    last = 1'b0;
    state_in = 128'h046681e5e0cb199a48f8d37a2806264c; round_key = 128'ha0fafe1788542cb123a339392a6c7605; last = 1'b0; #1; check("fips_round1", state_out, 128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 200; n++) begin
      state_in  = rand128();
      round_key = rand128();
      last      = n[0];
      #1;
      expv = state_in ^ round_key;
      check("random", state_out, expv);
    end
    report();
    $finish;
  end
endmodule
