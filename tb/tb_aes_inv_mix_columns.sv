// Self-checking testbench for aes_inv_mix_columns: known-answer vectors from the AES
// standard's worked example, then random states compared with the reference
// model in aes_ref_pkg. Combinational block: each vector is applied and
// checked after 1 ns.
module tb_aes_inv_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out, round_key, expv;
  logic         last;

  aes_inv_mix_columns dut (.state_in(state_in), .state_out(state_out));

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
    state_in = 128'h046681e5e0cb199a48f8d37a2806264c; round_key = 128'h0; last = 1'b0; #1; check("fips_round1", state_out, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    state_in = 128'h8e4da1bc9fdc589d01010101c6c6c6c6; round_key = 128'h0; last = 1'b0; #1; check("column_vectors", state_out, 128'hdb135345f20a225c01010101c6c6c6c6);
    for (int n = 0; n < 200; n++) begin
      state_in  = rand128();
      round_key = rand128();
      last      = n[0];
      #1;
      expv = mix_columns(state_in, 1);
      check("random", state_out, expv);
    end
    report();
    $finish;
  end
endmodule
