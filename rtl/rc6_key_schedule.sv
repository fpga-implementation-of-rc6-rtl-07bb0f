// rc6_key_schedule: datapath of the RC6 key expansion, run inside the FPGA.
//
// The user key of KEY_BYTES bytes is loaded little-endian into the word array
// L[0 .. c-1] (key byte 0 is the low byte of L[0]; a short last word is padded
// with zero bytes). The expansion then runs in two phases, one S word per
// clock, under the control unit:
//   init: S[i] = P32 + i*Q32, produced by a running register that starts at
//         P32 and adds Q32 on each step (one step per word, i = 0 .. 2r+3);
//   mix:  3*max(c, 2r+4) steps of
//           A = S[i] = (S[i] + A + B) <<< 3
//           B = L[j] = (L[j] + A + B) <<< (A + B)
//         with i stepping through S (supplied by the control unit as s_addr)
//         and j = (j+1) mod c kept here.
// The S array itself lives in rc6_key_store; this block reads the old S[i] on
// s_rdata and drives the write port. A and B are held in registers; both
// updates of a mixing step are computed in the same cycle.
//
// Interface: load (one cycle) latches key_in, clears A, B and j and restarts the
// init register. init_step and mix_step each perform one step on S[s_addr].
// The algorithm and running on chip follow the original design; one word per
// cycle and the shared barrel rotator are this design's choices.
module rc6_key_schedule
  import rc6_pkg::*;
#(
  parameter int unsigned KEY_BYTES = 16,
  localparam int unsigned C  = (KEY_BYTES + 3) / 4 > 0 ? (KEY_BYTES + 3) / 4 : 1,
  localparam int unsigned JW = C > 1 ? $clog2(C) : 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [8*KEY_BYTES-1:0] key_in,
  input  logic                   load,
  input  logic                   init_step,
  input  logic                   mix_step,
  // to and from the key store word port
  input  word_t                  s_rdata,
  output word_t                  s_wdata,
  output logic                   s_we
);

  word_t          l_mem [C];
  word_t          reg_a, reg_b, s_init;
  logic [JW-1:0]  j;

  word_t a_sum, a_new, b_sum, b_new;

  // A = (S[i] + A + B) <<< 3 (fixed rotation: wiring)
  assign a_sum = s_rdata + reg_a + reg_b;
  assign a_new = {a_sum[W-4:0], a_sum[W-1:W-3]};
  // B = (L[j] + A + B) <<< (A + B), with the new A
  word_t ab;
  assign ab    = a_new + reg_b;
  assign b_sum = l_mem[j] + ab;

  rc6_rotator #(.WIDTH(W)) u_rot (.din(b_sum), .amt(ab[LGW-1:0]), .dout(b_new));

  assign s_we    = init_step | mix_step;
  assign s_wdata = init_step ? s_init : a_new;

  // Key bytes zero-padded to whole words.
  logic [32*C-1:0] key_words;
  assign key_words = (32*C)'(key_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_a  <= '0;
      reg_b  <= '0;
      s_init <= P32;
      j      <= '0;
    end else if (load) begin
      reg_a  <= '0;
      reg_b  <= '0;
      s_init <= P32;
      j      <= '0;
    end else if (init_step) begin
      s_init <= s_init + Q32;
    end else if (mix_step) begin
      reg_a <= a_new;
      reg_b <= b_new;
      j     <= (j == JW'(C - 1)) ? '0 : j + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int k = 0; k < C; k++) l_mem[k] <= key_words[32*k +: 32];
    end else if (mix_step) begin
      l_mem[j] <= b_new;
    end
  end

endmodule
