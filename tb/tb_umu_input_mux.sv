// tb_umu_input_mux: checks the input multiplexers (n = 16) in all four UC
// codes. The expected widened operands are built from the value each format
// stands for: zero extension for unsigned, the magnitude alone for sign
// magnitude, sign extension for two's complement (UC = 10 and 11).
module tb_umu_input_mux;
  import umu_pkg::*;
  localparam int N = 16;
  logic [N-1:0] x, y;
  uc_t uc;
  logic [N:0] xe, ye;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu_input_mux dut (.x(x), .y(y), .uc(uc), .xe(xe), .ye(ye));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Widened operand as an integer value, worked out per format.
  function automatic longint widened(logic [N-1:0] v, uc_t m);
    case (m)
      UC_UNSIGNED: return longint'(v);
      UC_SIGNMAG:  return longint'(v) % (longint'(1) << (N-1));
      default:     return longint'(v) - (v[N-1] ? (longint'(1) << N) : 0);
    endcase
  endfunction

  function automatic longint as_signed17(logic [N:0] v);
    return longint'(v) - (v[N] ? (longint'(1) << (N+1)) : 0);
  endfunction

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b, uc_t m);
    x = a; y = b; uc = m;
    #1;
    checks++;
    if (as_signed17(xe) != widened(a, m) || as_signed17(ye) != widened(b, m)) begin
      failures++;
      $display("FAIL uc=%b x=%h y=%h xe=%h ye=%h", m, a, b, xe, ye);
    end
  endtask

  initial begin
    uc_t modes[4] = '{UC_UNSIGNED, UC_SIGNMAG, UC_TWOS, UC_TWOS_ALT};
    foreach (modes[m]) begin
      apply('1, '1, modes[m]);
      apply({1'b1, (N-1)'(0)}, (N)'(1), modes[m]);
      apply('0, {1'b0, {(N-1){1'b1}}}, modes[m]);
      for (int k = 0; k < 500; k++) apply(N'($urandom), N'($urandom), modes[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
