// cpa_ripple: final carry-propagate adder of the multiplier array.
//
// Adds two W-bit vectors and a carry-in with a chain of csa_cell full
// adders, the carry of each cell feeding the next (ripple carry addition, as
// in the bottom CPA row of a carry-save array multiplier). Delay grows
// linearly with W. Interface: a + b + cin = {cout, sum}. Combinational.
// Ripple carry is this implementation's choice for the final adder; any
// carry-propagate adder with the same interface can take its place.
module cpa_ripple #(
  parameter int unsigned W = 34   // 2n+2 for n = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    csa_cell u_fa (
      .x (a[k]),
      .y (b[k]),
      .z (carry[k]),
      .c (carry[k+1]),
      .s (sum[k])
    );
  end

  assign cout = carry[W];

endmodule
