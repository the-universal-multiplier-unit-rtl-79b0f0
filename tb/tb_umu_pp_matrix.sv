// tb_umu_pp_matrix: checks the partial product matrix for n = 16.
// For each operand pair the rows must add up, modulo 2**(2n+2), to the
// signed product of the two (n+1)-bit operands. A few individual terms of
// the matrix are checked by position as well: the two constant ones, XnYn,
// and one complemented term of each sign line.
module tb_umu_pp_matrix;
  localparam int N = 16, W = 2*N + 2;
  logic [N:0] xe, ye;
  logic [N+2:0][W-1:0] rows;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu_pp_matrix dut (.xe(xe), .ye(ye), .rows(rows));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N:0] a, logic [N:0] b);
    logic [W-1:0] total = '0;
    logic signed [W-1:0] ref_p;
    xe = a; ye = b;
    ref_p = W'(signed'(a)) * W'(signed'(b));
    #1;
    for (int r = 0; r < N+3; r++) total += rows[r];
    checks++;
    if (total !== ref_p) begin
      failures++;
      $display("FAIL xe=%h ye=%h rows sum %h exp %h", a, b, total, ref_p);
    end
    checks++;
    if (rows[N+1][W-1] !== 1'b1 || rows[N+2][N+1] !== 1'b1 ||
        rows[N+1][2*N] !== (a[N] & b[N]) ||
        rows[N][N] !== ~(a[0] & b[N]) ||
        rows[N+1][2*N-1] !== ~(a[N] & b[N-1])) begin
      failures++;
      $display("FAIL term positions xe=%h ye=%h", a, b);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply({1'b1, N'(0)}, {1'b1, N'(0)});
    apply({1'b1, N'(0)}, {1'b0, {N{1'b1}}});
    for (int k = 0; k < 3000; k++) apply((N+1)'($urandom), (N+1)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
