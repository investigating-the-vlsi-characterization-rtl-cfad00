// booth_mult: N x N two's-complement multiplier with radix-4 Modified Booth
// Encoding (MBE).
//
// The multiplier y is split into N/2 overlapping three-bit groups
// {y[2k+1], y[2k], y[2k-1]} (y[-1] = 0). Each group is encoded by
// mbe_encoder into a digit in {-2,-1,0,+1,+2}, and mbe_pp_gen turns the digit
// and the multiplicand x into an (N+1)-bit row plus a +1 correction bit. This
// halves the number of partial products against a plain array.
//
// Row k has weight 4^k: it is sign-extended to the full 2N-bit width and
// shifted left by 2k columns. The N/2 correction bits fall in distinct columns
// (2k), so they share one extra row. The N/2 + 1 rows are then added by
// pp_array_adder: a carry-save array reduces them to two rows and a
// ripple-carry adder adds the last two, as in an array multiplier.
//
// Interface: x, y signed N-bit operands (N even); p the 2N-bit signed product.
// Timing: combinational, no registers.
//
// Encoding, row selection, two-column shift and sign extension follow the
// published method. Collecting the correction bits in one row, and the form of the
// adder array, are this design's choices.
module booth_mult
  import mbe_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned W    = 2 * N;
  localparam int unsigned NPP  = N / 2;

  logic [N:0]          yz;     // {y, 0}: y with the implicit y[-1] = 0 below it
  mbe_sel_t [NPP-1:0]  sel;
  logic [NPP-1:0][N:0] pp;
  logic [NPP-1:0]      neg;
  logic [NPP:0][W-1:0] rows;   // rows[0..NPP-1]: shifted rows, rows[NPP]: +1 bits

  assign yz = {y, 1'b0};

  for (genvar k = 0; k < int'(NPP); k++) begin : g_pp
    mbe_encoder u_enc (
      .grp(yz[2*k+2 -: 3]),
      .sel(sel[k])
    );
    mbe_pp_gen #(.N(N)) u_gen (
      .a      (x),
      .sel    (sel[k]),
      .pp     (pp[k]),
      .neg_lsb(neg[k])
    );
  end

  // Row k: sign-extended to W bits and shifted left by two columns per group.
  for (genvar k = 0; k < int'(NPP); k++) begin : g_row
    if (k > 0) begin : g_lo
      assign rows[k][2*k-1:0] = '0;
    end
    assign rows[k][2*k+N:2*k] = pp[k];
    if (2*k + N + 1 < int'(W)) begin : g_ext
      assign rows[k][W-1:2*k+N+1] = {(W - 2*k - N - 1){pp[k][N]}};
    end
  end

  // +1 corrections of the negative rows, each in its row's lowest column.
  always_comb begin
    rows[NPP] = '0;
    for (int k = 0; k < int'(NPP); k++) rows[NPP][2*k] = neg[k];
  end

  pp_array_adder #(.W(W), .ROWS(NPP + 1)) u_add (
    .rows(rows),
    .sum (p)
  );

  initial begin
    assert (N >= 2 && N % 2 == 0) else $fatal(1, "booth_mult needs an even N >= 2");
  end

endmodule
