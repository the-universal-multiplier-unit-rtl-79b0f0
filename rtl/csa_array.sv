// csa_array: carry-save array that reduces ROWS partial product rows to two.
//
// The first row of csa_cells adds rows 0, 1 and 2. Every following row of
// cells adds the next partial product to the running sum and carry vectors,
// so there are ROWS-2 rows of cells and no carry travels along a row: the
// carries of one row go, one column to the left, into the next row. This is
// the linear array organisation of a carry-save array multiplier; the result
// still has to be merged by a carry-propagate adder.
//
// Interface: sum + carry = rows[0] + ... + rows[ROWS-1] (mod 2**W). The carry
// vector is already aligned (bit 0 is always 0). Combinational.
//
// The rows are handed over as full-width, pre-shifted vectors; constant zero
// bits in them are left for synthesis to remove, rather than drawing the
// diagonal cell placement of a hand-laid array.
module csa_array #(
  parameter int unsigned W    = 34,  // 2n+2 for n = 16
  parameter int unsigned ROWS = 19   // n+3 rows of the extended matrix
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  localparam int unsigned LEVELS = ROWS - 2;

  // Sum and aligned carry leaving each level of cells.
  logic [LEVELS-1:0][W-1:0] lvl_s;
  logic [LEVELS-1:0][W-1:0] lvl_c;
  logic [LEVELS-1:0][W-1:0] lvl_co;   // raw cell carries, before alignment

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    logic [W-1:0] in_a, in_b;
    if (l == 0) begin : g_first
      assign in_a = rows[0];
      assign in_b = rows[1];
    end else begin : g_next
      assign in_a = lvl_s[l-1];
      assign in_b = lvl_c[l-1];
    end
    for (genvar k = 0; k < W; k++) begin : g_col
      csa_cell u_csa (
        .x (in_a[k]),
        .y (in_b[k]),
        .z (rows[l+2][k]),
        .c (lvl_co[l][k]),
        .s (lvl_s[l][k])
      );
    end
    // The carry out of column W-1 falls outside the modulo-2**W result.
    assign lvl_c[l] = {lvl_co[l][W-2:0], 1'b0};
  end

  assign sum   = lvl_s[LEVELS-1];
  assign carry = lvl_c[LEVELS-1];

endmodule
