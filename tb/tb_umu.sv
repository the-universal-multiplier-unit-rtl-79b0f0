// tb_umu: end-to-end test of the Universal Multiplier Unit at its default
// width (n = 16, no parameter override).
//
// Each operand pair is multiplied in every format and compared with a
// reference worked out from the numbers the bit patterns stand for:
//   unsigned          P = X * Y
//   sign magnitude    P[2n] = sign(X) XOR sign(Y), P[2n-1:0] = |X| * |Y|
//   two's complement  P = X * Y as a 2n+1 bit two's complement number
// Both two's complement codes (UC = 10 and 11) are used. The test counts how
// often each mode and each special case ran: a negative sign-magnitude
// product, a sign-magnitude "negative zero", a negative two's complement
// product, the most negative number squared (the only two's complement
// product that needs bit 2n-1 as a magnitude bit) and an unsigned product
// with a carry into bit 2n-1. A mechanism that never ran counts as a failure.
module tb_umu;
  import umu_pkg::*;
  localparam int N = UMU_N;
  logic [N-1:0] x, y;
  uc_t uc;
  logic [2*N:0] p;
  int checks = 0, failures = 0;
  int n_unsigned = 0, n_signmag = 0, n_twos = 0, n_twos_alt = 0;
  int n_sm_neg = 0, n_sm_negzero = 0, n_tc_neg = 0, n_tc_mostneg = 0, n_us_top = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu dut (.x(x), .y(y), .uc(uc), .p(p));

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N:0] reference(logic [N-1:0] a, logic [N-1:0] b, uc_t m);
    longint va, vb, mag;
    case (m)
      UC_UNSIGNED: return (2*N+1)'(longint'(a) * longint'(b));
      UC_SIGNMAG: begin
        mag = longint'(a[N-2:0]) * longint'(b[N-2:0]);
        return {a[N-1] ^ b[N-1], (2*N)'(mag)};
      end
      default: begin
        va = longint'(a) - (a[N-1] ? (longint'(1) << N) : 0);
        vb = longint'(b) - (b[N-1] ? (longint'(1) << N) : 0);
        return (2*N+1)'(va * vb);
      end
    endcase
  endfunction

  task automatic apply(logic [N-1:0] a, logic [N-1:0] b, uc_t m);
    logic [2*N:0] exp_p;
    x = a; y = b; uc = m;
    exp_p = reference(a, b, m);
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL uc=%b x=%h y=%h got %h exp %h", m, a, b, p, exp_p);
    end
    case (m)
      UC_UNSIGNED: begin
        n_unsigned++;
        if (exp_p[2*N-1]) n_us_top++;
      end
      UC_SIGNMAG: begin
        n_signmag++;
        if (exp_p[2*N]) n_sm_neg++;
        if (exp_p[2*N] && exp_p[2*N-1:0] == '0) n_sm_negzero++;
      end
      UC_TWOS:     n_twos++;
      UC_TWOS_ALT: n_twos_alt++;
    endcase
    if (uc_is_twos(m) && exp_p[2*N]) n_tc_neg++;
    if (uc_is_twos(m) && a == {1'b1, (N-1)'(0)} && b == {1'b1, (N-1)'(0)}) n_tc_mostneg++;
  endtask

  task automatic all_modes(logic [N-1:0] a, logic [N-1:0] b);
    apply(a, b, UC_UNSIGNED);
    apply(a, b, UC_SIGNMAG);
    apply(a, b, UC_TWOS);
    apply(a, b, UC_TWOS_ALT);
  endtask

  task automatic need(string what, int count);
    $display("  %-28s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    localparam logic [N-1:0] MOSTNEG = {1'b1, (N-1)'(0)};
    all_modes('0, '0);
    all_modes('1, '1);
    all_modes(MOSTNEG, MOSTNEG);
    all_modes(MOSTNEG, '1);
    all_modes(MOSTNEG, N'(1));
    all_modes({1'b0, {(N-1){1'b1}}}, {1'b0, {(N-1){1'b1}}});
    all_modes(N'(5), N'(3));
    for (int k = 0; k < 20000; k++) all_modes(N'($urandom), N'($urandom));
    $display("mechanisms exercised:");
    need("unsigned (UC=00)", n_unsigned);
    need("sign magnitude (UC=01)", n_signmag);
    need("two's complement (UC=10)", n_twos);
    need("two's complement (UC=11)", n_twos_alt);
    need("unsigned, bit 2n-1 set", n_us_top);
    need("sign magnitude, negative", n_sm_neg);
    need("sign magnitude, -0", n_sm_negzero);
    need("two's complement, negative", n_tc_neg);
    need("most negative squared", n_tc_mostneg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
