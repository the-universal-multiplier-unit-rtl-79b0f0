// tb_umu_small: exhaustive test of the Universal Multiplier Unit at small
// widths: n = 4 (the width of the worked partial product matrix), n = 5 (an
// odd width) and n = 8. Every operand pair is tried in all four UC codes.
module tb_umu_small;
  int c4, f4, c5, f5, c8, f8;
  logic d4, d5, d8;
  int checks, failures;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu_exhaust #(.N(4)) u_n4 (.checks(c4), .failures(f4), .done(d4));
  umu_exhaust #(.N(5)) u_n5 (.checks(c5), .failures(f5), .done(d5));
  umu_exhaust #(.N(8)) u_n8 (.checks(c8), .failures(f8), .done(d8));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c5 + c8, f4 + f5 + f8 + 1);
    $finish;
  end

  initial begin
    wait (d4 && d5 && d8);
    checks   = c4 + c5 + c8;
    failures = f4 + f5 + f8;
    $display("n=4: %0d checks, n=5: %0d checks, n=8: %0d checks", c4, c5, c8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
