// umu_pkg: types and constants shared by the Universal Multiplier Unit.
//
// The unit multiplies unsigned, sign-magnitude and two's complement operands
// on one array. The number format is chosen by the 2-bit Universal Control
// word UC. The encoding is part of the unit's definition:
//   UC = 00  unsigned
//   UC = 01  sign magnitude
//   UC = 1x  two's complement (both 10 and 11 select it)
// The default operand width of 16 bits is the word length the design was
// evaluated at.
package umu_pkg;

  // Default operand width n.
  localparam int unsigned UMU_N = 16;

  // Universal Control word. UC_TWOS_ALT exists because the low bit of UC is
  // a don't-care in two's complement mode.
  typedef enum logic [1:0] {
    UC_UNSIGNED = 2'b00,
    UC_SIGNMAG  = 2'b01,
    UC_TWOS     = 2'b10,
    UC_TWOS_ALT = 2'b11
  } uc_t;

  // True when UC selects two's complement (UC1 = 1, UC0 ignored).
  function automatic logic uc_is_twos(uc_t uc);
    return (uc == UC_TWOS) || (uc == UC_TWOS_ALT);
  endfunction

endpackage
