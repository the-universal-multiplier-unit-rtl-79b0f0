// csa_cell: carry save adder cell, a (3,2) counter.
//
// Adds three bits of equal weight and returns a sum bit S of that weight and
// a carry bit C of twice that weight: 2*C + S = X + Y + Z. This is a full
// adder; the same cell is used in the carry-save rows of the array and,
// chained through its carry, in the final ripple carry-propagate adder.
// Purely combinational, no clock.
module csa_cell (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic c,   // carry, weight 2
  output logic s    // sum, weight 1
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
