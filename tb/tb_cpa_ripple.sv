// tb_cpa_ripple: checks the ripple carry-propagate adder at its default
// width (34 bits) against the simulator's own addition: corner cases (full
// carry chain, all ones, carry-in) and random operands.
module tb_cpa_ripple;
  localparam int W = 34;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cpa_ripple dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    logic [W:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    ref_sum = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    #1;
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {cout, sum}, ref_sum);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, W'(1), 1'b0);
    apply('0, '0, 1'b0);
    for (int k = 0; k < 2000; k++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
