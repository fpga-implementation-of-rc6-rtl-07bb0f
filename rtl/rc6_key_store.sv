// rc6_key_store: the round-key array S[0 .. 2r+3].
//
// The array is split into an even bank (S[0], S[2], ...) and an odd bank
// (S[1], S[3], ...) of r+2 words each, so that a round can read the pair
// S[2k], S[2k+1] in one cycle through the pair port (pair_addr = k). The key
// schedule uses the word port: ks_addr selects one word of S, ks_rdata returns
// it, and ks_we writes ks_wdata into it at the rising clock edge; bit 0 of
// ks_addr picks the bank. Reads on both ports are asynchronous, which maps onto
// FPGA distributed RAM. The array is not reset: nothing reads it before the
// key schedule has written every word.
// The even/odd split follows the original design; the asynchronous-read
// register arrays are this design's choice.
module rc6_key_store
  import rc6_pkg::*;
#(
  parameter int unsigned ROUNDS = 20,
  localparam int unsigned NWORDS = 2*ROUNDS + 4,
  localparam int unsigned NPAIRS = ROUNDS + 2,
  localparam int unsigned AW     = $clog2(NWORDS),
  localparam int unsigned PW     = $clog2(NPAIRS)
) (
  input  logic          clk,
  // word port, used by the key schedule
  input  logic [AW-1:0] ks_addr,
  input  logic          ks_we,
  input  word_t         ks_wdata,
  output word_t         ks_rdata,
  // pair port, used by the cipher rounds
  input  logic [PW-1:0] pair_addr,
  output word_t         s_even,
  output word_t         s_odd
);

  word_t bank_even [NPAIRS];
  word_t bank_odd  [NPAIRS];

  wire [PW-1:0] ks_pair = PW'(ks_addr >> 1);

  always_ff @(posedge clk) begin
    if (ks_we) begin
      if (ks_addr[0]) bank_odd[ks_pair]  <= ks_wdata;
      else            bank_even[ks_pair] <= ks_wdata;
    end
  end

  assign ks_rdata = ks_addr[0] ? bank_odd[ks_pair] : bank_even[ks_pair];
  assign s_even   = bank_even[pair_addr];
  assign s_odd    = bank_odd[pair_addr];

endmodule
