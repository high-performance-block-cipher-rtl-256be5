// simon_round: one Simon round on a word whose width n (32, 48 or 64) is
// chosen at run time.
//
//   f(x) = ((x <<< 1) & (x <<< 8)) xor (x <<< 2)
//   x'   = y xor f(x) xor k,     y' = x
//
// The three XORs of a round are arranged as a balanced tree of depth two,
// (f_and xor x<<<2) xor (y xor k), rather than as a chain of three, which
// shortens the critical path; the y xor k branch does not wait for the
// AND. Words are held in 64-bit signals with the bits above n at zero;
// the rotations wrap inside the low n bits. Purely combinational.
// The XOR tree follows the design description; the round function itself
// is the published Simon round.
module simon_round
  import cipher_pkg::*;
(
  input  wsize_e wsize,   // active word width n
  input  word_t  x,       // upper word
  input  word_t  y,       // lower word
  input  word_t  k,       // round key
  output word_t  x_out,
  output word_t  y_out
);

  word_t f_and, r2, t0, t1;

  always_comb begin
    f_and = rotl_w(x, 1, wsize) & rotl_w(x, 8, wsize);
    r2    = rotl_w(x, 2, wsize);
    // XOR tree, level 1
    t0    = f_and ^ r2;
    t1    = y ^ k;
    // level 2
    x_out = t0 ^ t1;
    y_out = x;
  end

endmodule
