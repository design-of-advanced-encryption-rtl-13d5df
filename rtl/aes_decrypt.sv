// AES-128 decryption core (inverse cipher), one round per clock.
//
// On a `start` pulse while idle, the cipher text is XORed with round key NR
// and stored. On each of the next NR clocks one inverse round (aes_dec_round)
// is applied with round keys NR-1 down to 0; the last round omits
// InvMixColumns. The round keys are the forward expansion read in reverse.
// Timing: `busy` is high from the clock after `start` until the result is
// ready; `done` pulses for one clock, NR clocks after the clock that took
// `start`, with `data_out` valid from then until the next start. A start
// while busy is ignored. The round keys must stay constant while busy.
// Interface: cipher text in, plain text out, all NR+1 round keys in parallel.
// The inverse cipher follows AES-128; reading stored forward round keys in
// reverse and the handshake are this design's choices.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      data_in,
  input  round_keys_t round_keys,
  output logic        busy,
  output logic        done,
  output block_t      data_out
);

  logic [3:0] round;    // round applied on the next clock, 1..NR
  block_t     state, round_out;

  aes_dec_round u_round (
    .state_in (state),
    .round_key(round_keys[4'(NR) - round]),
    .last     (round == 4'(NR)),
    .state_out(round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      round <= 4'd1;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= data_in ^ round_keys[NR];
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_out;
        if (round == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign data_out = state;

  a_done_ends_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_round_range:    assert property (@(posedge clk) disable iff (!rst_n)
                                     busy |-> (round >= 4'd1 && round <= 4'(NR)));

endmodule
