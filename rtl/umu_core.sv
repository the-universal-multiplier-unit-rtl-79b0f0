// umu_core: central core array of the Universal Multiplier Unit.
//
// Multiplies two (N+1)-bit two's complement numbers and returns the full
// 2N+2 bit two's complement product. The three classic stages of an array
// multiplier are used: umu_pp_matrix generates the N+3 rows of the extended
// matrix (AND terms, complemented sign row and column, two constant ones),
// csa_array reduces them with N+1 rows of carry save cells, and cpa_ripple
// merges the final sum and carry vectors. Every number format the unit
// supports is fed through this one array; the format only changes what the
// input multiplexers put on xe and ye.
//
// Interface: p = xe * ye (signed, exact in 2N+2 bits). Combinational; the
// longest path runs through N+1 carry-save rows and the 2N+2 bit ripple
// adder. The carry out of the ripple adder lies above the product and is
// not used.
module umu_core #(
  parameter int unsigned N = 16
) (
  input  logic [N:0]     xe,
  input  logic [N:0]     ye,
  output logic [2*N+1:0] p
);

  localparam int unsigned W    = 2*N + 2;
  localparam int unsigned ROWS = N + 3;

  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0]           csa_sum, csa_carry;
  logic                   cpa_cout;

  umu_pp_matrix #(.N(N)) u_pp (
    .xe   (xe),
    .ye   (ye),
    .rows (rows)
  );

  csa_array #(.W(W), .ROWS(ROWS)) u_csa (
    .rows  (rows),
    .sum   (csa_sum),
    .carry (csa_carry)
  );

  cpa_ripple #(.W(W)) u_cpa (
    .a    (csa_sum),
    .b    (csa_carry),
    .cin  (1'b0),
    .sum  (p),
    .cout (cpa_cout)
  );

endmodule
