// umu_input_mux: input multiplexers of the Universal Multiplier Unit.
//
// Widens the N-bit operands x and y to the N+1 bits of the core array,
// according to the Universal Control word:
//   unsigned          Xn <- 0,       Yn <- 0         (zero extension)
//   sign magnitude    Xn = Xn-1 = 0, Yn = Yn-1 = 0   (sign bits dropped, the
//                                                      magnitudes are
//                                                      multiplied as unsigned)
//   two's complement  Xn <- Xn-1,    Yn <- Yn-1      (sign extension)
// Combinational, one 2-level multiplexer per affected bit.
module umu_input_mux
  import umu_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  uc_t          uc,
  output logic [N:0]   xe,
  output logic [N:0]   ye
);

  always_comb begin
    if (uc_is_twos(uc)) begin
      xe = {x[N-1], x};
      ye = {y[N-1], y};
    end else if (uc == UC_SIGNMAG) begin
      xe = {2'b00, x[N-2:0]};
      ye = {2'b00, y[N-2:0]};
    end else begin
      xe = {1'b0, x};
      ye = {1'b0, y};
    end
  end

endmodule
