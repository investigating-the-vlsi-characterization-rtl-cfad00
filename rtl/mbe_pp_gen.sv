// mbe_pp_gen: Booth decoder, builds one partial-product row of the
// radix-4 Modified Booth multiplier.
//
// The N-bit multiplicand A is first sign-extended to N+1 bits so that 2A
// fits. Each output bit selects A[j] (one) or A[j-1] (two, the multiplicand
// moved one column left with a 0 entering at the bottom) and XORs it with
// neg:
//   pp[j] = ((one & A[j]) | (two & A[j-1])) ^ neg
// For a negative digit this gives the one's complement of A or 2A; the
// missing +1 of the two's complement leaves on `neg_lsb`, to be added in the
// row's lowest column by the adder array. So the row value is
//   signed(pp) + neg_lsb = digit * A.
//
// Interface: a multiplicand, sel from mbe_encoder; pp is the (N+1)-bit
// signed row, neg_lsb its correction bit. Timing: combinational.
//
// Selecting A or 2A and complementing for negative digits follows the
// published method; passing the +1 on as a separate bit is this design's choice.
module mbe_pp_gen
  import mbe_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  mbe_sel_t     sel,
  output logic [N:0]   pp,
  output logic         neg_lsb
);
  logic [N:0] ae;   // sign-extended multiplicand
  logic [N:0] a2;   // multiplicand shifted one column left

  always_comb begin
    ae = {a[N-1], a};
    a2 = {a, 1'b0};
    for (int j = 0; j <= int'(N); j++)
      pp[j] = ((sel.one & ae[j]) | (sel.two & a2[j])) ^ sel.neg;
    neg_lsb = sel.neg;
  end
endmodule
