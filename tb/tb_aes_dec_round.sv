// Self-checking testbench for aes_dec_round: known-answer vectors from the AES
// standard's worked example, then random states compared with the reference
// model in aes_ref_pkg. Combinational block: each vector is applied and
// checked after 1 ns.
module tb_aes_dec_round;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out, round_key, expv;
  logic         last;

  aes_dec_round dut (.state_in(state_in), .round_key(round_key), .last(last), .state_out(state_out));

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
    state_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; round_key = 128'h1d5b625b403ffbb1d23e5e50c1fe6e44; last = 1'b0; #1; check("fips_round1_inverse", state_out, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    state_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; round_key = 128'h0; last = 1'b1; #1; check("last_no_invmix", state_out, 128'h193de3bea0f4e22b9ac68d2ae9f84808);
    for (int n = 0; n < 200; n++) begin
      state_in  = rand128();
      round_key = rand128();
      last      = n[0];
      #1;
      expv = dec_round(state_in, round_key, last);
      check("random", state_out, expv);
    end
    report();
    $finish;
  end
endmodule
