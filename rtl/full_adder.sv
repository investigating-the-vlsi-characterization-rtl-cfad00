// full_adder: one-bit full adder, the cell of the adder arrays.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational. Used both as
// a 3:2 carry-save cell in the partial-product array and as a stage of the
// final ripple-carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
