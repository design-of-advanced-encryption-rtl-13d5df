// Self-checking testbench for aes_shift_rows: known-answer vectors from the AES
// standard's worked example, then random states compared with the reference
// model in aes_ref_pkg. Combinational block: each vector is applied and
// checked after 1 ns.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out, round_key, expv;
  logic         last;

  aes_shift_rows dut (.state_in(state_in), .state_out(state_out));

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
    state_in = 128'hd42711aee0bf98f1b8b45de51e415230; round_key = 128'h0; last = 1'b0; #1; check("fips_round1", state_out, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    state_in = 128'h000102030405060708090a0b0c0d0e0f; round_key = 128'h0; last = 1'b0; #1; check("index_map", state_out, 128'h00050a0f04090e03080d02070c01060b);
    for (int n = 0; n < 200; n++) begin
      state_in  = rand128();
      round_key = rand128();
      last      = n[0];
      #1;
      expv = shift_rows(state_in, 0);
      check("random", state_out, expv);
    end
    report();
    $finish;
  end
endmodule
