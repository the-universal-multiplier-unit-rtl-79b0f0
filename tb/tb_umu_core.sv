// tb_umu_core: checks the core array (n = 16) as a 17 x 17 bit two's
// complement multiplier against the simulator's signed multiplication:
// extreme values (most negative times most negative, -1, 0, largest
// positive) and random operands.
module tb_umu_core;
  localparam int N = 16, W = 2*N + 2;
  logic [N:0] xe, ye;
  logic [W-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  umu_core dut (.xe(xe), .ye(ye), .p(p));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N:0] a, logic [N:0] b);
    logic signed [W-1:0] ref_p;
    xe = a; ye = b;
    ref_p = W'(signed'(a)) * W'(signed'(b));
    #1;
    checks++;
    if (p !== ref_p) begin
      failures++;
      $display("FAIL xe=%h ye=%h got %h exp %h", a, b, p, ref_p);
    end
  endtask

  localparam logic [N:0] MOSTNEG = {1'b1, N'(0)};
  localparam logic [N:0] MOSTPOS = {1'b0, {N{1'b1}}};

  initial begin
    apply(MOSTNEG, MOSTNEG);
    apply(MOSTNEG, MOSTPOS);
    apply(MOSTPOS, MOSTPOS);
    apply('1, '1);
    apply('1, MOSTNEG);
    apply('0, MOSTNEG);
    for (int k = 0; k < 5000; k++) apply((N+1)'($urandom), (N+1)'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
