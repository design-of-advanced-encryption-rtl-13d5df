// AES-128 key expansion with round-key storage.
//
// A pulse on `load` captures the 128-bit cipher key as round key 0 and starts
// the expansion. On each of the next NR clocks one further round key is
// derived from the previous one: the last word is rotated left by one byte
// (RotWord), passed through four S-boxes (SubWord) and XORed with the round
// constant Rcon, and the result is XORed into the four words in a running
// chain, w[i] = w[i-4] ^ w[i-1] for the other three words. Rcon starts at 01
// and is doubled in GF(2^8) each round (01 02 04 ... 80 1b 36).
// All NR+1 round keys are kept in registers so that the encryption core can
// read them forwards and the decryption core backwards.
// Timing: `ready` falls on the clock that accepts `load` and rises NR clocks
// later with every round key valid. A load during an expansion restarts it.
// The expansion rule and Rcon follow AES-128; one key per clock and storing
// all round keys are this design's choices.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  block_t      key_in,
  output logic        ready,
  output round_keys_t round_keys
);

  logic [3:0] idx;      // index of the round key produced next
  logic       busy;
  byte_t      rc;       // Rcon of the round key produced next
  block_t     prev;     // last round key produced
  block_t     next;
  word_t      rot, sub;

  assign prev = round_keys[idx - 4'd1];

  // RotWord of the last word, then SubWord.
  assign rot = {prev[23:0], prev[31:24]};
  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.in_byte(rot[8*b +: 8]), .out_byte(sub[8*b +: 8]));
  end

  always_comb begin
    word_t w0, w1, w2, w3;
    w0 = prev[127:96] ^ sub ^ {rc, 24'h0};
    w1 = prev[95:64] ^ w0;
    w2 = prev[63:32] ^ w1;
    w3 = prev[31:0]  ^ w2;
    next = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round_keys <= '0;
      idx        <= 4'd1;
      busy       <= 1'b0;
      ready      <= 1'b0;
      rc         <= 8'h01;
    end else if (load) begin
      round_keys[0] <= key_in;
      idx           <= 4'd1;
      busy          <= 1'b1;
      ready         <= 1'b0;
      rc            <= 8'h01;
    end else if (busy) begin
      round_keys[idx] <= next;
      rc              <= xtime(rc);
      if (idx == 4'(NR)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        idx <= idx + 4'd1;
      end
    end
  end

  a_ready_not_busy: assert property (@(posedge clk) disable iff (!rst_n) !(ready && busy));

endmodule
