// signed_mult_top: the two signed parallel multipliers side by side.
//
// A modified Baugh-Wooley array multiplier (bw_mult) and a radix-4 Modified
// Booth Encoding multiplier (booth_mult), both N x N two's-complement
// multipliers with a 2N-bit product. They are independent circuits with
// their own operand and product ports, so they can be driven with the same
// or with different samples and compared for area, delay and switching
// activity. Both are combinational: a product is valid one propagation delay
// after its operands change.
//
// N defaults to 64, the largest strength characterized; 4, 8, 16 and 32 are
// the other strengths and are obtained by overriding N (booth_mult needs an
// even N).
module signed_mult_top #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   bw_x,
  input  logic [N-1:0]   bw_y,
  output logic [2*N-1:0] bw_p,
  input  logic [N-1:0]   mbe_x,
  input  logic [N-1:0]   mbe_y,
  output logic [2*N-1:0] mbe_p
);

  bw_mult #(.N(N)) u_bw (
    .x(bw_x),
    .y(bw_y),
    .p(bw_p)
  );

  booth_mult #(.N(N)) u_booth (
    .x(mbe_x),
    .y(mbe_y),
    .p(mbe_p)
  );

endmodule
