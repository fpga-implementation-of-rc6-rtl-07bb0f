// rc6_pkg: types and constants shared by the RC6 crypto-coprocessor.
//
// RC6-w/r/b is fixed here at w = 32 bits per word. A 128-bit block is four
// words A, B, C, D. The byte order follows the RC6 convention: the first byte
// of a block is the least significant byte of A and the last byte is the most
// significant byte of D. On a 128-bit port this means A = bits [31:0],
// B = [63:32], C = [95:64] and D = [127:96]. A 128-bit key is laid out the same
// way: key byte 0 is bits [7:0], so L[0] = key[31:0].
// P32 and Q32 are the RC5/RC6 "magic constants" used to seed the round-key
// array. The round count and key length are module parameters (defaults
// 20 rounds and 16 key bytes, the AES configuration).
package rc6_pkg;

  localparam int unsigned W    = 32;  // word size in bits
  localparam int unsigned LGW  = 5;   // log2(W): rotation amounts use 5 bits

  typedef logic [W-1:0]   word_t;
  typedef logic [LGW-1:0] rot_t;

  // A block: A in the least significant word, D in the most significant.
  typedef struct packed {
    word_t d;
    word_t c;
    word_t b;
    word_t a;
  } block_t;

  localparam word_t P32 = 32'hB7E1_5163;
  localparam word_t Q32 = 32'h9E37_79B9;

  // Direction of a cipher operation, as on the Enc/Dec pin: 0 encrypts, 1 decrypts.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } mode_e;

endpackage
