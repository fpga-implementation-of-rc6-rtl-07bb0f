// rc6_main: RC6-32/r/b cipher unit with the key schedule on chip.
//
// The unit expands a user key into the round-key array S itself, then
// encrypts or decrypts 128-bit blocks with it, one round per clock. A new key
// can be supplied at any time the unit is idle; the expansion then runs again
// and the unit is not ready until it completes.
//
// Structure: rc6_control sequences everything; rc6_key_schedule and
// rc6_key_store compute and hold S; rc6_datapath holds the block and applies
// the whitening steps and rc6_core's rounds.
//
// Handshakes (all synchronous to clk, reset rst active high):
//   key_avail  -> key_read    key_in is taken in the cycle key_read is high.
//   data_avail -> data_read   data_in and enc_dec (0 encrypt, 1 decrypt) are
//                             taken in the cycle data_read is high.
//   data_write, full          data_out is valid in the cycle data_write is
//                             high; while full is high the unit holds the
//                             result and waits.
//   ready                     high once the key expansion has finished.
// Blocks use the RC6 byte order: byte 0 of the block is bits [7:0] (the low
// byte of A) and A, B, C, D are bits [31:0], [63:32], [95:64], [127:96].
// Timing: ready 1 + 4*(2r+4) cycles after key_read; data_write r+2 cycles
// after data_read when full is low.
// The pin list and the on-chip key schedule follow the original design; port
// widths and pulse timing of the handshakes are this design's choices.
module rc6_main
  import rc6_pkg::*;
#(
  parameter int unsigned ROUNDS    = 20,
  parameter int unsigned KEY_BYTES = 16,
  localparam int unsigned AW = $clog2(2*ROUNDS + 4),
  localparam int unsigned PW = $clog2(ROUNDS + 2)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [8*KEY_BYTES-1:0] key_in,
  input  logic                   key_avail,
  output logic                   key_read,
  input  logic [127:0]           data_in,
  input  logic                   data_avail,
  output logic                   data_read,
  input  logic                   enc_dec,
  input  logic                   full,
  output logic [127:0]           data_out,
  output logic                   data_write,
  output logic                   ready
);

  logic          ks_load, ks_init_step, ks_mix_step, dp_load, dp_round, dp_post;
  logic [AW-1:0] ks_addr;
  logic [PW-1:0] pair_addr;
  mode_e         mode;
  word_t         ks_rdata, ks_wdata, s_even, s_odd;
  logic          ks_we;
  block_t        blk_out;

  rc6_control #(.ROUNDS(ROUNDS)) u_control (
    .clk, .rst,
    .key_avail, .key_read, .data_avail, .data_read,
    .enc_dec(mode_e'(enc_dec)), .full, .data_write, .ready,
    .ks_load, .ks_init_step, .ks_mix_step, .ks_addr,
    .pair_addr, .mode, .dp_load, .dp_round, .dp_post
  );

  rc6_key_schedule #(.KEY_BYTES(KEY_BYTES)) u_key_schedule (
    .clk, .rst, .key_in,
    .load(ks_load), .init_step(ks_init_step), .mix_step(ks_mix_step),
    .s_rdata(ks_rdata), .s_wdata(ks_wdata), .s_we(ks_we)
  );

  rc6_key_store #(.ROUNDS(ROUNDS)) u_key_store (
    .clk,
    .ks_addr, .ks_we, .ks_wdata, .ks_rdata,
    .pair_addr, .s_even, .s_odd
  );

  rc6_datapath u_datapath (
    .clk,
    .blk_in  (block_t'(data_in)),
    .s_even, .s_odd, .mode,
    .load    (dp_load),
    .round_en(dp_round),
    .post_en (dp_post),
    .blk_out
  );

  assign data_out = blk_out;

endmodule
