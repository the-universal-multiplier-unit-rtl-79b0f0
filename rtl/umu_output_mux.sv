// umu_output_mux: output selection of the Universal Multiplier Unit.
//
// Takes the 2N+2 bit product of the core array and returns the 2N+1 bit
// result P[2N:0] of the unit:
//   unsigned          P[2N-1:0] of the core, P[2N] = 0
//   sign magnitude    P[2N-1:0] of the core (the magnitude), and the sign
//                     position P[2N] <- Xn-1 XOR Yn-1 (operand sign bits)
//   two's complement  P[2N:0] of the core (the product, sign extended by one)
// Core bit 2N+1 is never needed: every result fits in 2N+1 bits. Forcing
// P[2N] to zero in unsigned mode is this implementation's choice; the core
// already delivers a zero there for unsigned operands.
// Combinational.
module umu_output_mux
  import umu_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [2*N+1:0] core_p,
  input  uc_t            uc,
  input  logic           x_sign,   // Xn-1 of the unextended operand
  input  logic           y_sign,   // Yn-1 of the unextended operand
  output logic [2*N:0]   p
);

  always_comb begin
    if (uc_is_twos(uc)) begin
      p = core_p[2*N:0];
    end else if (uc == UC_SIGNMAG) begin
      p = {x_sign ^ y_sign, core_p[2*N-1:0]};
    end else begin
      p = {1'b0, core_p[2*N-1:0]};
    end
  end

  // The dropped core bits must carry no information: zero for the unsigned
  // formats, a copy of bit 2N for two's complement.
  always_comb begin
    if (uc_is_twos(uc)) begin
      a_twos_fits: assert #0 (core_p[2*N+1] == core_p[2*N])
        else $error("two's complement product does not fit in 2N+1 bits");
    end else begin
      a_unsigned_fits: assert #0 (core_p[2*N+1:2*N] == 2'b00)
        else $error("unsigned or sign-magnitude product exceeds 2N bits");
    end
  end

endmodule
