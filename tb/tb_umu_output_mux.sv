// tb_umu_output_mux: checks the output selection (n = 16) in all four UC
// codes with random legal core products and operand sign bits: bit 2n is zero for
// unsigned, the XOR of the signs for sign magnitude and the core's own bit
// for two's complement; the lower 2n bits always come from the core.
module tb_umu_output_mux;
  import umu_pkg::*;
  localparam int N = 16;
  logic [2*N+1:0] core_p;
  uc_t uc;
  logic xs, ys;
  logic [2*N:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu_output_mux dut (.core_p(core_p), .uc(uc), .x_sign(xs), .y_sign(ys), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uc_t modes[4] = '{UC_UNSIGNED, UC_SIGNMAG, UC_TWOS, UC_TWOS_ALT};
    foreach (modes[m]) begin
      for (int k = 0; k < 500; k++) begin
        logic top_bit;
        // Only core words the array can produce: the two top bits are zero
        // for the unsigned formats and equal for two's complement.
        core_p = {$urandom, $urandom};
        if (uc_is_twos(modes[m])) core_p[2*N+1] = core_p[2*N];
        else                      core_p[2*N+1:2*N] = 2'b00;
        xs = 1'($urandom); ys = 1'($urandom); uc = modes[m];
        case (modes[m])
          UC_UNSIGNED: top_bit = 1'b0;
          UC_SIGNMAG:  top_bit = (xs != ys);
          default:     top_bit = core_p[2*N];
        endcase
        #1;
        checks++;
        if (p !== {top_bit, core_p[2*N-1:0]}) begin
          failures++;
          $display("FAIL uc=%b core=%h xs=%b ys=%b p=%h", modes[m], core_p, xs, ys, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
