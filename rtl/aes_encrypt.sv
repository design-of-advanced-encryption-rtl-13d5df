// AES-128 encryption core, one round per clock.
//
// On a `start` pulse while idle, the plain text is XORed with round key 0
// (the initial AddRoundKey) and stored. On each of the next NR clocks one
// encryption round (aes_enc_round) is applied with round keys 1..NR; the last
// round omits MixColumns.
// Timing: `busy` is high from the clock after `start` until the result is
// ready; `done` pulses for one clock, NR clocks after the clock that took
// `start`, with `data_out` valid from then until the next start. A start
// while busy is ignored. The round keys must stay constant while busy.
// Interface: plain text in, cipher text out, all NR+1 round keys in parallel.
// The cipher sequence follows AES-128; the iterative one-round-per-clock
// structure and the handshake are this design's choices.
module aes_encrypt
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

  aes_enc_round u_round (
    .state_in (state),
    .round_key(round_keys[round]),
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
          state <= data_in ^ round_keys[0];
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
