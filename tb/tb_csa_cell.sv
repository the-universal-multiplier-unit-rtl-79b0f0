// tb_csa_cell: exhaustive check of the carry save adder cell.
// All eight input combinations are applied; 2*C + S must equal the number of
// ones at the inputs. A clock-counting watchdog ends a hung run.
module tb_csa_cell;
  logic x, y, z, c, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  csa_cell dut (.x(x), .y(y), .z(z), .c(c), .s(s));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {x, y, z} = 3'(v);
      ones = int'(x) + int'(y) + int'(z);
      #1;
      checks++;
      if (2 * int'(c) + int'(s) != ones) begin
        failures++;
        $display("FAIL xyz=%b%b%b c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
