// One-bit full adder: sum = x ^ y ^ ci, co = majority(x, y, ci).
// Purely combinational; the basic cell of the carry-save array and of the
// final ripple-carry row of cb_mult.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = x ^ y ^ ci;
    co = (x & y) | (x & ci) | (y & ci);
  end
endmodule
