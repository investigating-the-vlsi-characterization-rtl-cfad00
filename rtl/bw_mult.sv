// bw_mult: N x N two's-complement multiplier, modified Baugh-Wooley array.
//
// With X = -x[N-1]2^(N-1) + sum x[i]2^i and Y likewise, the product contains
// the two negative cross terms -x[i]y[N-1] and -x[N-1]y[j]. The Baugh-Wooley
// form replaces each subtraction by adding the complemented bits and two
// constants:
//   P = x[N-1]y[N-1]2^(2N-2) + sum_{i,j<N-1} x[i]y[j]2^(i+j)
//     + 2^(N-1) sum_{i<N-1} ~(x[i]y[N-1]) 2^i
//     + 2^(N-1) sum_{j<N-1} ~(x[N-1]y[j]) 2^j
//     + 2^N - 2^(2N-1)
// so every partial-product bit is a single AND (or NAND) gate and all rows are
// added as unsigned numbers. Modulo 2^(2N), -2^(2N-1) equals +2^(2N-1), so
// the two constants are ones in columns N and 2N-1.
//
// Structure: the N^2 gates pp[j][i] = x[i]&y[j] (NAND where exactly one of
// i, j is N-1) feed a carry-save array of N-1 rows of N full adders, i.e.
// N(N-1) adders. Row j (1..N-1) spans columns j..j+N-1; cell k of row j adds
// the previous row's sum from the same column, pp[j][k], and the previous
// row's carry into that column. Column j is final after row j and gives
// product bit p[j]. Row 0 is the bare pp[0] row; the +2^N constant enters as
// the carry into column N ahead of row 1. The remaining sum and carry
// vectors (columns N..2N-1) are added by an N-bit ripple-carry adder, whose
// top cell takes the +2^(2N-1) constant in place of the absent sum bit.
//
// Interface: x, y signed N-bit operands; p the 2N-bit signed product.
// Timing: combinational, no registers; the longest path runs down the N-1
// array rows and then along the N ripple stages.
//
// The partial-product equation and the N^2 gates plus N(N-1) adders follow
// the source. Where the constants enter the array and the ripple-carry final
// adder are this design's choices.
module bw_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  // pp[j][i]: partial-product bit x[i]y[j], weight 2^(i+j).
  logic [N-1:0][N-1:0] pp;
  // s[j][k], c[j][k]: sum at column j+k and carry into column j+k+1 after row j.
  logic [N-1:0][N-1:0] s;
  logic [N-1:0][N-1:0] c;

  for (genvar j = 0; j < int'(N); j++) begin : g_pp_row
    for (genvar i = 0; i < int'(N); i++) begin : g_pp_bit
      // A bit with exactly one sign operand carries negative weight: invert it.
      if ((i == int'(N) - 1) != (j == int'(N) - 1)) begin : g_nand
        assign pp[j][i] = ~(x[i] & y[j]);
      end else begin : g_and
        assign pp[j][i] = x[i] & y[j];
      end
    end
  end

  // Row 0: the first partial product; the only carry is the +2^N constant.
  assign s[0] = pp[0];
  always_comb begin
    c[0]      = '0;
    c[0][N-1] = 1'b1;
  end

  // Carry-save rows 1..N-1, N full adders each.
  for (genvar j = 1; j < int'(N); j++) begin : g_row
    for (genvar k = 0; k < int'(N); k++) begin : g_cell
      logic a_in;
      if (k < int'(N) - 1) begin : g_sum_in
        assign a_in = s[j-1][k+1];
      end else begin : g_no_sum
        assign a_in = 1'b0;   // the previous row does not reach column j+N-1
      end
      full_adder u_fa (
        .a (a_in),
        .b (pp[j][k]),
        .ci(c[j-1][k]),
        .s (s[j][k]),
        .co(c[j][k])
      );
    end
  end

  // Low product bits leave the array one per row.
  for (genvar j = 0; j < int'(N); j++) begin : g_lo
    assign p[j] = s[j][0];
  end

  // Final ripple-carry adder on columns N..2N-1.
  logic [N:0] rc;
  assign rc[0] = 1'b0;
  for (genvar m = 0; m < int'(N); m++) begin : g_rca
    logic a_in;
    if (m < int'(N) - 1) begin : g_sum_in
      assign a_in = s[N-1][m+1];
    end else begin : g_const
      assign a_in = 1'b1;     // +2^(2N-1) constant
    end
    full_adder u_fa (
      .a (a_in),
      .b (c[N-1][m]),
      .ci(rc[m]),
      .s (p[N+m]),
      .co(rc[m+1])
    );
  end

  initial begin
    assert (N >= 2) else $fatal(1, "bw_mult needs N >= 2");
  end

endmodule
