// umu: Universal Multiplier Unit (top level).
//
// One multiplier for three number formats. The N-bit operands X and Y are
// widened by one bit and multiplied as (N+1)-bit two's complement numbers on
// a single carry-save array; the 2-bit Universal Control word UC only
// chooses how the operands are widened and how the result is read out:
//   UC = 00  unsigned          X, Y zero extended;    P = X*Y
//   UC = 01  sign magnitude    sign bits cleared;     P[2N-1:0] = |X|*|Y|,
//                                                      P[2N] = sign(X) XOR sign(Y)
//   UC = 1x  two's complement  X, Y sign extended;    P = X*Y, two's complement
//
// Datapath: umu_input_mux -> umu_core (partial product matrix, carry-save
// array, ripple carry-propagate adder) -> umu_output_mux.
//
// Interface: X and Y are N bits, UC 2 bits, P is 2N+1 bits. The unit is
// purely combinational, with no clock and no reset; P is valid one array
// delay after the inputs settle. In sign-magnitude mode a zero product keeps
// the XOR of the operand signs, so "negative zero" can appear at the output;
// this is inherent in the representation and left to the user.
//
// The three operand formats, the UC codes, the widening rules and the sign
// placement at P[2n] are the unit's definition. This implementation's own
// choices: the 2n+1 bit output (which gives the 16+16+2 inputs and 33 outputs
// of a 16-bit unit), no registers, a linear carry-save array and a ripple
// final adder.
module umu
  import umu_pkg::*;
#(
  parameter int unsigned N = UMU_N   // operand width n, 16 by default
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  uc_t          uc,
  output logic [2*N:0] p
);

  logic [N:0]     xe, ye;
  logic [2*N+1:0] core_p;

  umu_input_mux #(.N(N)) u_in (
    .x  (x),
    .y  (y),
    .uc (uc),
    .xe (xe),
    .ye (ye)
  );

  umu_core #(.N(N)) u_core (
    .xe (xe),
    .ye (ye),
    .p  (core_p)
  );

  umu_output_mux #(.N(N)) u_out (
    .core_p (core_p),
    .uc     (uc),
    .x_sign (x[N-1]),
    .y_sign (y[N-1]),
    .p      (p)
  );

endmodule
