// tb_csa_array: checks the carry-save array at its default size (19 rows of
// 34 bits). For random, all-ones and single-row inputs, sum + carry must
// equal the sum of all rows modulo 2**34, and bit 0 of the aligned carry
// vector must be zero.
module tb_csa_array;
  localparam int W = 34, ROWS = 19;
  logic [ROWS-1:0][W-1:0] rows;
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  csa_array dut (.rows(rows), .sum(sum), .carry(carry));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    logic [W-1:0] ref_total = '0;
    for (int r = 0; r < ROWS; r++) ref_total += rows[r];
    #1;
    checks++;
    if (W'(sum + carry) !== ref_total || carry[0] !== 1'b0) begin
      failures++;
      $display("FAIL sum=%h carry=%h exp total %h", sum, carry, ref_total);
    end
  endtask

  initial begin
    rows = '1;
    check_rows();
    for (int r = 0; r < ROWS; r++) begin
      rows = '0;
      rows[r] = {$urandom, $urandom};
      check_rows();
    end
    for (int k = 0; k < 2000; k++) begin
      for (int r = 0; r < ROWS; r++) rows[r] = {$urandom, $urandom};
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
