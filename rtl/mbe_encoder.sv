// mbe_encoder: radix-4 Modified Booth encoder for one multiplier bit group.
//
// The multiplier is read in overlapping groups of three bits
// {b3, b2, b1} = {y[2k+1], y[2k], y[2k-1]} (y[-1] = 0). The group stands for
// the digit -2*b3 + b2 + b1, i.e. the operation on the multiplicand A:
//   000 -> 0   001 -> +A   010 -> +A   011 -> +2A
//   100 -> -2A 101 -> -A   110 -> -A   111 -> 0
// The digit leaves as the select lines of mbe_pkg::mbe_sel_t:
//   one = b2 ^ b1                  (|digit| = 1)
//   two = (b3 ^ b2) & ~(b2 ^ b1)   (|digit| = 2)
//   neg = b3 & ~(b2 & b1)          (negative digit)
// The operation table follows the published method; the gate equations are this
// design's own, chosen so that 111 gives neg = 0 and a true all-zero row
// rather than an inverted zero plus one.
//
// Timing: combinational, two gate levels.
module mbe_encoder
  import mbe_pkg::*;
(
  input  logic [2:0] grp,   // {b3, b2, b1}
  output mbe_sel_t   sel
);
  always_comb begin
    sel.one = grp[1] ^ grp[0];
    sel.two = (grp[2] ^ grp[1]) & ~(grp[1] ^ grp[0]);
    sel.neg = grp[2] & ~(grp[1] & grp[0]);
  end
endmodule
