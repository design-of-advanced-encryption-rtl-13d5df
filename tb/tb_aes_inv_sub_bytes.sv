// Self-checking testbench for aes_inv_sub_bytes: known-answer vectors from the AES
// standard's worked example, then random states compared with the reference
// model in aes_ref_pkg. Combinational block: each vector is applied and
// checked after 1 ns.
module tb_aes_inv_sub_bytes;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out, round_key, expv;
  logic         last;

  aes_inv_sub_bytes dut (.state_in(state_in), .state_out(state_out));

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
    state_in = 128'hd42711aee0bf98f1b8b45de51e415230; round_key = 128'h0; last = 1'b0; #1; check("fips_round1", state_out, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int v = 0; v < 256; v += 16) begin
      for (int i = 0; i < 16; i++) state_in[127 - 8*i -: 8] = 8'(v + i);
      #1;
      check("exhaustive", state_out, sub_bytes(state_in, 1));
    end
    for (int n = 0; n < 200; n++) begin
      state_in  = rand128();
      round_key = rand128();
      last      = n[0];
      #1;
      expv = sub_bytes(state_in, 1);
      check("random", state_out, expv);
    end
    report();
    $finish;
  end
endmodule
