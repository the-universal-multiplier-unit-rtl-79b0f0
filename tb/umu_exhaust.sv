// umu_exhaust: testbench helper that drives one umu instance of width N with
// every operand pair in every UC code and compares the result with a
// reference computed from the values the bit patterns stand for. It raises
// `done` when finished and reports its counts on its outputs.
module umu_exhaust
  import umu_pkg::*;
#(
  parameter int N = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic [N-1:0] x, y;
  uc_t uc;
  logic [2*N:0] p;

  umu #(.N(N)) dut (.x(x), .y(y), .uc(uc), .p(p));

  function automatic logic [2*N:0] reference(logic [N-1:0] a, logic [N-1:0] b, uc_t m);
    longint va, vb;
    case (m)
      UC_UNSIGNED: return (2*N+1)'(longint'(a) * longint'(b));
      UC_SIGNMAG:  return {a[N-1] ^ b[N-1],
                           (2*N)'(longint'(a[N-2:0]) * longint'(b[N-2:0]))};
      default: begin
        va = longint'(a) - (a[N-1] ? (longint'(1) << N) : 0);
        vb = longint'(b) - (b[N-1] ? (longint'(1) << N) : 0);
        return (2*N+1)'(va * vb);
      end
    endcase
  endfunction

  initial begin
    uc_t modes[4] = '{UC_UNSIGNED, UC_SIGNMAG, UC_TWOS, UC_TWOS_ALT};
    checks = 0; failures = 0; done = 1'b0;
    foreach (modes[m]) begin
      for (int a = 0; a < (1 << N); a++) begin
        for (int b = 0; b < (1 << N); b++) begin
          logic [2*N:0] exp_p;
          x = N'(a); y = N'(b); uc = modes[m];
          exp_p = reference(N'(a), N'(b), modes[m]);
          #1;
          checks++;
          if (p !== exp_p) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=%0d uc=%b x=%h y=%h got %h exp %h", N, modes[m], x, y, p, exp_p);
          end
        end
      end
    end
    done = 1'b1;
  end
endmodule
