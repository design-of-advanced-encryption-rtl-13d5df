// AES-128 encryption and decryption engine.
//
// A key expansion unit (aes_key_schedule) turns the 128-bit cipher key into
// NR+1 = 11 stored round keys. An iterative encryption core (aes_encrypt) and
// an iterative decryption core (aes_decrypt) share those keys and run
// independently, each doing one round per clock, so a block takes NR = 10
// clocks after its start.
// Handshake: `key_load` is accepted only while neither core is busy; while
// the expansion runs `key_ready` is low (10 clocks). `enc_start`/`dec_start`
// are accepted only when `key_ready` is high and the core is idle; other
// starts are ignored. Each core pulses its `*_done` for one clock when its
// output is valid; the output then holds until that core starts again.
// The AES-128 configuration (10 rounds, 128-bit key and data) follows the
// document; the iterative architecture and handshake are this design's own.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key_in,
  output logic   key_ready,
  input  logic   enc_start,
  input  block_t enc_in,
  output logic   enc_busy,
  output logic   enc_done,
  output block_t enc_out,
  input  logic   dec_start,
  input  block_t dec_in,
  output logic   dec_busy,
  output logic   dec_done,
  output block_t dec_out
);

  round_keys_t round_keys;
  logic        key_load_ok;

  assign key_load_ok = key_load && !enc_busy && !dec_busy;

  aes_key_schedule u_keys (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (key_load_ok),
    .key_in    (key_in),
    .ready     (key_ready),
    .round_keys(round_keys)
  );

  aes_encrypt u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (enc_start && key_ready && !key_load_ok),
    .data_in   (enc_in),
    .round_keys(round_keys),
    .busy      (enc_busy),
    .done      (enc_done),
    .data_out  (enc_out)
  );

  aes_decrypt u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (dec_start && key_ready && !key_load_ok),
    .data_in   (dec_in),
    .round_keys(round_keys),
    .busy      (dec_busy),
    .done      (dec_done),
    .data_out  (dec_out)
  );

  // The round keys must not change under a running core.
  a_keys_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (enc_busy || dec_busy) |-> key_ready);

endmodule
