// rc6_core: one full round of RC6, for encryption or decryption.
//
// Encryption round i (keys s_even = S[2i], s_odd = S[2i+1]):
//   t = f(B) <<< 5,  u = f(D) <<< 5
//   A' = ((A ^ t) <<< u) + S[2i],  C' = ((C ^ u) <<< t) + S[2i+1]
//   (A, B, C, D) <- (B, C', D, A')
// Decryption round i undoes it:
//   (A, B, C, D) <- (D, A, B, C)
//   t = f(B) <<< 5,  u = f(D) <<< 5
//   C' = ((C - S[2i+1]) >>> t) ^ u,  A' = ((A - S[2i]) >>> u) ^ t
// with f(X) = X(2X+1) mod 2^32.
//
// Both directions share the two quadratic units and the two barrel rotators:
// the mode multiplexes which words feed f (B and D on encryption, the words
// that become B and D after the inverse permutation on decryption), what goes
// into each rotator (A^t or A-S), and what is applied after it (+S or ^t).
// A right rotation by n is done by the left rotator with amount -n mod 32;
// that sharing is this design's choice. The rotate-by-5 after f is wiring.
//
// Interface: combinational. blk_in is the round input, s_even/s_odd the two
// round keys read together from the key store, mode selects the direction.
module rc6_core
  import rc6_pkg::*;
(
  input  block_t blk_in,
  input  word_t  s_even,
  input  word_t  s_odd,
  input  mode_e  mode,
  output block_t blk_out
);

  block_t p;          // words after the decryption pre-permutation
  word_t  fb, fd;     // f(B), f(D)
  word_t  t, u;       // f(.) <<< 5
  word_t  rot_a_in, rot_c_in, rot_a_out, rot_c_out;
  rot_t   amt_a, amt_c;
  word_t  new_a, new_c;

  // Decryption starts its round with (A,B,C,D) = (D,A,B,C).
  always_comb begin
    if (mode == MODE_DEC) p = '{d: blk_in.c, c: blk_in.b, b: blk_in.a, a: blk_in.d};
    else                  p = blk_in;
  end

  rc6_quad #(.WIDTH(W)) u_quad_b (.x(p.b), .f(fb));
  rc6_quad #(.WIDTH(W)) u_quad_d (.x(p.d), .f(fd));

  assign t = {fb[W-LGW-1:0], fb[W-1:W-LGW]};
  assign u = {fd[W-LGW-1:0], fd[W-1:W-LGW]};

  always_comb begin
    if (mode == MODE_DEC) begin
      rot_a_in = p.a - s_even;
      rot_c_in = p.c - s_odd;
      amt_a    = rot_t'(-u[LGW-1:0]);
      amt_c    = rot_t'(-t[LGW-1:0]);
    end else begin
      rot_a_in = p.a ^ t;
      rot_c_in = p.c ^ u;
      amt_a    = u[LGW-1:0];
      amt_c    = t[LGW-1:0];
    end
  end

  rc6_rotator #(.WIDTH(W)) u_rot_a (.din(rot_a_in), .amt(amt_a), .dout(rot_a_out));
  rc6_rotator #(.WIDTH(W)) u_rot_c (.din(rot_c_in), .amt(amt_c), .dout(rot_c_out));

  always_comb begin
    if (mode == MODE_DEC) begin
      new_a   = rot_a_out ^ t;
      new_c   = rot_c_out ^ u;
      blk_out = '{d: p.d, c: new_c, b: p.b, a: new_a};
    end else begin
      new_a   = rot_a_out + s_even;
      new_c   = rot_c_out + s_odd;
      blk_out = '{d: new_a, c: p.d, b: new_c, a: p.b};
    end
  end

endmodule
