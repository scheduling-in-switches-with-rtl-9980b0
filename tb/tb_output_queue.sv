// tb_output_queue -- self-checking test of the multi-write output buffer.
// Cells arrive on up to S lanes per cell time, never more than the buffer can
// hold (the test keeps its own count, as the credit scheduler would). The
// output must be the arrivals in order (lane order within a cell time), one
// per cell time, with no gap while cells are held: cut-through when empty,
// so a lone cell into an empty queue leaves one clock after it arrived. The
// test counts bypasses and full-buffer cell times and requires both. A second
// instance has a one-cell buffer with two lanes, the smallest configuration
// (two pending grants per output, one buffer cell plus the bypass).
module tb_output_queue;
  localparam int S = 3, DEPTH = 3, W = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, bypass_seen = 0, full_seen = 0;

  logic [S-1:0] lv;
  logic [W-1:0] ld [S];
  logic ov, bp, of;
  logic [W-1:0] od;
  logic [$clog2(DEPTH+1)-1:0] occ;
  logic [1:0] lv1;
  logic [W-1:0] ld1 [2];
  logic ov1, bp1, of1;
  logic [W-1:0] od1;
  logic [0:0] occ1;

  output_queue #(.S(S), .DEPTH(DEPTH), .CELL_W(W)) dut (.clk, .rst_n, .lane_valid(lv),
    .lane_data(ld), .out_valid(ov), .out_data(od), .occupancy(occ), .bypass(bp), .overflow(of));
  output_queue #(.S(2), .DEPTH(1), .CELL_W(W)) dut1 (.clk, .rst_n, .lane_valid(lv1),
    .lane_data(ld1), .out_valid(ov1), .out_data(od1), .occupancy(occ1), .bypass(bp1), .overflow(of1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] exp_q [$], exp_q1 [$];
  int held, held1;          // cells the queue holds after the edge
  logic [W-1:0] seq, seq1;

  initial begin
    lv = '0; lv1 = '0; held = 0; held1 = 0; seq = 0; seq1 = 100;
    for (int s = 0; s < S; s++) ld[s] = '0;
    ld1[0] = '0; ld1[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int n, room, n1, room1;
      @(negedge clk);
      // outputs of the previous edge
      checks++;
      if (ov !== (exp_q.size() > 0) || (ov && od !== exp_q.pop_front())) begin
        failures++; $display("t=%0d queue 3: out v=%0d d=%0d", t, ov, od);
      end
      checks++;
      if (ov1 !== (exp_q1.size() > 0) || (ov1 && od1 !== exp_q1.pop_front())) begin
        failures++; $display("t=%0d queue 1: out v=%0d d=%0d", t, ov1, od1);
      end
      if (bp) bypass_seen++;
      if (occ == DEPTH) full_seen++;
      checks++;
      if (occ != held || occ1 != held1) begin
        failures++; $display("t=%0d occupancy %0d/%0d expected %0d/%0d", t, occ, occ1, held, held1);
      end
      // new arrivals: at most what fits after this cell time's departure
      room = DEPTH - held + 1;
      n = $urandom % (S + 1);
      if ((t / 300) % 2 == 1) n = $urandom % 2;
      if (n > room) n = room;
      lv = '0;
      for (int s = 0; s < S; s++) begin
        ld[s] = W'($urandom);
        if (s < n) begin lv[s] = 1; ld[s] = seq; exp_q.push_back(seq); seq++; end
      end
      held = held + n - ((held + n) > 0 ? 1 : 0);
      room1 = 1 - held1 + 1;
      n1 = $urandom % 3;
      if (n1 > room1) n1 = room1;
      lv1 = '0;
      for (int s = 0; s < 2; s++) begin
        ld1[s] = W'($urandom);
        if (s < n1) begin lv1[s] = 1; ld1[s] = seq1; exp_q1.push_back(seq1); seq1++; end
      end
      held1 = held1 + n1 - ((held1 + n1) > 0 ? 1 : 0);
      #1;
      checks++;
      if (of || of1) begin failures++; $display("t=%0d overflow flagged", t); end
    end
    checks++;
    if (bypass_seen == 0 || full_seen == 0) begin
      failures++; $display("coverage: bypass %0d full %0d", bypass_seen, full_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
