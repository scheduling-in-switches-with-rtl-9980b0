// tb_sbs_system -- end-to-end test of the switch at reduced size.
// Two 8x8 switches run the same sequence of traffic phases (see sbs_harness):
//   A: Q = 4 credits and buffer cells per output, SD = 2, R = 1, P = 0, and
//      the shortest request window that keeps a lone flow at full rate (4);
//   B: Q = 2 with a one-cell output buffer plus cut-through, SD = 1,
//      R = 2 grants per cell time (credits released one per cell time) and a
//      line delay of P = 3 cell times, request window 16.
module tb_sbs_system;
  logic clk = 0;
  logic done_a, done_b;
  int checks_a, failures_a, checks_b, failures_b;
  int checks, failures;

  always #5 clk = ~clk;

  sbs_harness #(.N(8), .Q(4), .R(1), .SD(2), .P(0), .VOQ_DEPTH(64), .OQ_DEPTH(4), .REQ_MAX(4),
                .PHASE_CT(2000), .MIN_TPUT(0.9), .NAME("A")) u_a (
    .clk, .done(done_a), .checks(checks_a), .failures(failures_a));
  sbs_harness #(.N(8), .Q(2), .R(2), .SD(1), .P(3), .VOQ_DEPTH(64), .OQ_DEPTH(1), .REQ_MAX(16),
                .PHASE_CT(2000), .MIN_TPUT(0.85), .NAME("B")) u_b (
    .clk, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks   = checks_a + checks_b;
    failures = failures_a + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
