// tb_grant_scheduler -- self-checking test of the per-input grant scheduler.
// Two instances: SD = 2 (choice over the registered grant counters) and
// SD = 1 (grants of the same cell time visible to the choice). The test plays
// the credit schedulers, sending random grants from each output while keeping
// at most Q outstanding per output, and predicts with a reference model which
// grant is accepted each cell time, the one-hot credit return (same cell
// time as the choice) and the
// "grant left pending" flag. It also measures that a grant arriving at an idle
// scheduler is accepted after SD cell times.
module tb_grant_scheduler;
  localparam int N = 4, Q = 3;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, waiting_seen = 0;

  logic [N-1:0] gnt_in [2], ack_out [2];
  logic sel_valid [2], waiting [2];
  logic [$clog2(N)-1:0] sel_out [2];

  grant_scheduler #(.N(N), .Q(Q), .SD(2)) dut2 (.clk, .rst_n, .gnt_in(gnt_in[0]),
    .sel_valid(sel_valid[0]), .sel_out(sel_out[0]), .ack_out(ack_out[0]), .waiting(waiting[0]));
  grant_scheduler #(.N(N), .Q(Q), .SD(1)) dut1 (.clk, .rst_n, .gnt_in(gnt_in[1]),
    .sel_valid(sel_valid[1]), .sel_out(sel_out[1]), .ack_out(ack_out[1]), .waiting(waiting[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_gq [2][N];
  int m_ptr [2];
  logic m_v [2], m_w [2];
  int m_sel [2];

  task automatic step(input int d, input int sd);
    int av [N];
    logic found; int pick;
    // the registered outputs must show last cell time's prediction
    checks++;
    if (sel_valid[d] !== m_v[d] || (m_v[d] && sel_out[d] != m_sel[d]) || waiting[d] !== m_w[d]) begin
      failures++;
      $display("SD=%0d got v=%0d o=%0d w=%0d exp v=%0d o=%0d w=%0d", sd,
               sel_valid[d], sel_out[d], waiting[d], m_v[d], m_sel[d], m_w[d]);
    end
    if (waiting[d]) waiting_seen++;
    for (int o = 0; o < N; o++) av[o] = m_gq[d][o] + ((sd == 1) ? int'(gnt_in[d][o]) : 0);
    found = 0; pick = 0;
    for (int k = 0; k < N; k++) begin
      int o;
      o = (m_ptr[d] + k) % N;
      if (!found && av[o] > 0) begin found = 1; pick = o; end
    end
    // the credit return is the choice itself, in the same cell time
    checks++;
    if (ack_out[d] !== (found ? N'(1) << pick : N'(0))) begin
      failures++;
      $display("SD=%0d ack %b, expected choice %0d (%0d)", sd, ack_out[d], pick, found);
    end
    m_v[d] = found; m_sel[d] = pick;
    if (found) m_ptr[d] = (pick + 1) % N;
    m_w[d] = 0;
    for (int o = 0; o < N; o++) begin
      if (av[o] - ((found && pick == o) ? 1 : 0) > 0) m_w[d] = 1;
      m_gq[d][o] += int'(gnt_in[d][o]) - ((found && pick == o) ? 1 : 0);
    end
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      gnt_in[d] = '0; m_ptr[d] = 0; m_v[d] = 0; m_w[d] = 0; m_sel[d] = 0;
      for (int o = 0; o < N; o++) m_gq[d][o] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one grant at an idle scheduler is passed on after SD cell times
    @(negedge clk);
    gnt_in[0] = 4'b0100; gnt_in[1] = 4'b0100;
    for (int c = 1; c <= 3; c++) begin
      @(negedge clk);
      gnt_in[0] = '0; gnt_in[1] = '0;
      checks++;
      if (sel_valid[0] !== (c == 2) || sel_valid[1] !== (c == 1)) begin
        failures++;
        $display("latency: cycle %0d sd2=%0d sd1=%0d", c, sel_valid[0], sel_valid[1]);
      end
    end
    repeat (3) @(negedge clk);
    for (int d = 0; d < 2; d++) m_ptr[d] = 3;
    for (int t = 0; t < 3000; t++) begin
      // outputs grant while they hold fewer than Q outstanding to us
      for (int d = 0; d < 2; d++)
        for (int o = 0; o < N; o++)
          gnt_in[d][o] = (m_gq[d][o] < Q - 1) && ($urandom % 8 < ((t / 400) % 2 == 0 ? 3 : 1));
      #1;
      step(0, 2);
      step(1, 1);
      @(negedge clk);
    end
    checks++;
    if (waiting_seen == 0) begin failures++; $display("no pending grant was ever left behind"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
