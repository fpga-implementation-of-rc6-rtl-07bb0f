// rc6_datapath: the RC6 block datapath around one round unit.
//
// A 128-bit block enters as four words A, B, C, D. On load the first
// whitening step is applied and the result is written to the round register:
//   encryption: B += S[0],      D += S[1]
//   decryption: C -= S[2r+3],   A -= S[2r+2]
// On each round_en the round register is fed through rc6_core and written
// back (the multiplexer in front of the register picks the whitened input on
// load and the core output otherwise). On post_en the final whitening step is
// applied and the result is written to the output register:
//   encryption: A += S[2r+2],   C += S[2r+3]
//   decryption: D -= S[1],      B -= S[0]
// The control unit supplies the right key pair on s_even/s_odd for each step:
// pair 0 or r+1 for whitening and pair i for round i.
//
// Timing: one round per clock, so a block takes 1 load + r rounds + 1 post
// cycle. blk_out holds its value until the next post_en.
// The register/multiplexer arrangement follows the original block diagram;
// applying the last whitening on the way into the output register is this
// design's choice.
module rc6_datapath
  import rc6_pkg::*;
(
  input  logic   clk,
  input  block_t blk_in,
  input  word_t  s_even,
  input  word_t  s_odd,
  input  mode_e  mode,
  input  logic   load,
  input  logic   round_en,
  input  logic   post_en,
  output block_t blk_out
);

  block_t round_q, pre_w, post_w, core_out;

  always_comb begin
    pre_w = blk_in;
    if (mode == MODE_DEC) begin
      pre_w.c = blk_in.c - s_odd;
      pre_w.a = blk_in.a - s_even;
    end else begin
      pre_w.b = blk_in.b + s_even;
      pre_w.d = blk_in.d + s_odd;
    end
  end

  rc6_core u_core (
    .blk_in (round_q),
    .s_even (s_even),
    .s_odd  (s_odd),
    .mode   (mode),
    .blk_out(core_out)
  );

  always_comb begin
    post_w = round_q;
    if (mode == MODE_DEC) begin
      post_w.d = round_q.d - s_odd;
      post_w.b = round_q.b - s_even;
    end else begin
      post_w.a = round_q.a + s_even;
      post_w.c = round_q.c + s_odd;
    end
  end

  always_ff @(posedge clk) begin
    if (load)          round_q <= pre_w;
    else if (round_en) round_q <= core_out;
  end

  always_ff @(posedge clk) begin
    if (post_en) blk_out <= post_w;
  end

endmodule
