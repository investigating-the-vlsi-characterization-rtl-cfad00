// pp_array_adder: adds ROWS partial-product rows of W bits, modulo 2^W.
//
// This is the second and third step of a parallel multiplier: the rows are
// first reduced to two rows, then those two are added. The reduction is a
// linear carry-save array, as in a classic array multiplier: rows 0 and 1
// form the initial (sum, carry) pair and every further row passes through one
// row of W full adders (3:2 compressors) whose carries move one column left.
// The last (sum, carry) pair goes through a W-bit ripple-carry adder built
// from the same full-adder cell. Carries out of column W-1 are dropped, so
// the result is the sum modulo 2^W, which for two's-complement rows that are
// already sign-extended to W bits is the exact signed sum.
//
// Interface: rows[r] is row r, already shifted to its column weight.
// Timing: purely combinational; the critical path runs through ROWS-2
// carry-save rows and then W ripple stages.
//
// The array organisation and the ripple-carry final adder are this design's
// choice: the published method only says the rows are added "as in an array
// multiplier" until two remain, then the last two are added. Every carry-save
// row spans the full width W, simpler than trimming each row to the columns
// it can reach; constant-zero cells fold away in synthesis.
module pp_array_adder #(
  parameter int unsigned W    = 128,  // product width, 2N for an N x N multiplier
  parameter int unsigned ROWS = 33    // 32 Booth rows of a 64 x 64 multiplier + correction row
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum
);

  // Carry-save state after each array stage: stage k has absorbed rows 0..k+1.
  logic [ROWS-2:0][W-1:0] s_st;
  logic [ROWS-2:0][W-1:0] c_st;

  assign s_st[0] = rows[0];
  assign c_st[0] = rows[1];

  for (genvar k = 1; k <= int'(ROWS) - 2; k++) begin : g_csa_row
    logic [W-1:0] co;
    for (genvar b = 0; b < int'(W); b++) begin : g_col
      full_adder u_fa (
        .a (s_st[k-1][b]),
        .b (c_st[k-1][b]),
        .ci(rows[k+1][b]),
        .s (s_st[k][b]),
        .co(co[b])
      );
    end
    assign c_st[k] = {co[W-2:0], 1'b0};
  end

  // Final carry-propagate adder on the last two rows.
  logic [W:0] rc;
  assign rc[0] = 1'b0;
  for (genvar b = 0; b < int'(W); b++) begin : g_rca
    full_adder u_fa (
      .a (s_st[ROWS-2][b]),
      .b (c_st[ROWS-2][b]),
      .ci(rc[b]),
      .s (sum[b]),
      .co(rc[b+1])
    );
  end

  initial begin
    assert (ROWS >= 2) else $fatal(1, "pp_array_adder needs at least two rows");
  end

endmodule
