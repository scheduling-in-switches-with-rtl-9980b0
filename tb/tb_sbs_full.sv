// tb_sbs_full -- the switch at its default size: 32 x 32, Q = 12, SD = 2,
// R = 1, P = 0, 64-bit cells, 64-cell VOQs.
// A lone cell first measures the idle latency (5 + SD + 3P = 7 cell times from
// offer to output). Then every input offers uniform Bernoulli traffic at load
// 0.9 for 1500 cell times, followed by a drain. Every cell must reach its
// output exactly once and in flow order, no output buffer may overflow, the
// outputs must carry at least 85% of the cell times while loaded, and
// concurrent arrivals, cut-through departures and pending grants must occur.
module tb_sbs_full;
  import sbs_pkg::*;
  localparam int N = N_DEF, CELL_W = CELL_W_DEF, QD = Q_DEF;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic                 in_valid [N];
  logic [IW-1:0]        in_dest  [N];
  logic [CELL_W-1:0]    in_cell  [N];
  logic                 in_ready [N];
  logic                 out_valid [N];
  logic [CELL_W-1:0]    out_data  [N];
  logic [N-1:0] lc_win_stall, cs_starved, gs_waiting, oq_bypass, oq_multi, oq_overflow;
  logic [$clog2(QD+1)-1:0] oq_occupancy [N];

  sbs_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CELL_W-1:0] mk(int s, int d, int q, int b);
    return {16'(s), 16'(d), 16'(q), 16'(b)};
  endfunction

  logic [CELL_W-1:0] srcq [N][N][$];   // per input, per destination
  int cur [N];                          // destination offered now
  logic acc [N];                        // the offered cell was taken at the last edge

  always @(posedge clk) for (int i = 0; i < N; i++) acc[i] <= in_valid[i] && in_ready[i];
  int next_seq [N][N];
  int exp_seq  [N][N];
  int created = 0, delivered = 0, now = 0, loaded_out = 0, lone = -1;
  logic loaded = 0;
  int ev_multi = 0, ev_bypass = 0, ev_wait = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o]) begin
          int s, d, q, b;
          s = int'(out_data[o][63:48]);
          d = int'(out_data[o][47:32]);
          q = int'(out_data[o][31:16]);
          b = int'(out_data[o][15:0]);
          checks++;
          if (d != o || s >= N || q != (exp_seq[s][d] & 16'hffff)) begin
            failures++;
            $display("output %0d: cell %0d->%0d seq %0d out of order", o, s, d, q);
          end else exp_seq[s][d]++;
          delivered++;
          if (loaded) loaded_out++;
          if (lone < 0) lone = (now - b) & 16'hffff;
        end
        checks++;
        if (oq_overflow[o]) begin failures++; $display("overflow at output %0d", o); end
      end
      ev_multi  += $countones(oq_multi);
      ev_bypass += $countones(oq_bypass);
      ev_wait   += $countones(gs_waiting);
      now++;
    end
  end

  task automatic tick(input real load);
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      if (acc[i]) void'(srcq[i][cur[i]].pop_front());
      if (load > 0.0 && (real'($urandom % 10000) / 10000.0) < load) begin
        int d;
        d = int'($urandom % N);
        srcq[i][d].push_back(mk(i, d, next_seq[i][d] & 16'hffff, now & 16'hffff));
        next_seq[i][d]++;
        created++;
      end
      // offer the next destination with a backlog, round-robin, so that a
      // full VOQ does not hold up cells for other outputs
      for (int k = 1; k <= N; k++)
        if (srcq[i][(cur[i] + k) % N].size() > 0) begin
          cur[i] = (cur[i] + k) % N;
          break;
        end
      in_valid[i] = srcq[i][cur[i]].size() > 0;
      in_cell[i]  = in_valid[i] ? srcq[i][cur[i]][0] : '0;
      in_dest[i]  = IW'(cur[i]);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_cell[i] = '0; cur[i] = 0;
      for (int o = 0; o < N; o++) begin next_seq[i][o] = 0; exp_seq[i][o] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    srcq[5][17].push_back(mk(5, 17, 0, now & 16'hffff));
    cur[5] = 17;
    next_seq[5][17]++;
    created++;
    in_valid[5] = 1; in_cell[5] = srcq[5][17][0]; in_dest[5] = IW'(17);
    repeat (20) tick(0.0);
    checks++;
    if (lone != 5 + SD_DEF + 3 * P_DEF) begin
      failures++;
      $display("lone cell latency %0d, expected %0d", lone, 5 + SD_DEF + 3 * P_DEF);
    end
    repeat (200) tick(0.9);
    loaded = 1;
    repeat (1500) tick(0.9);
    loaded = 0;
    $display("load 0.9 uniform: outputs busy %0.3f", real'(loaded_out) / real'(N * 1500));
    checks++;
    if (real'(loaded_out) / real'(N * 1500) < 0.85) begin failures++; $display("throughput low"); end
    for (int t = 0; t < 5000 && delivered < created; t++) tick(0.0);
    repeat (10) tick(0.0);
    checks++;
    if (delivered != created) begin
      failures++;
      $display("%0d cells created, %0d delivered", created, delivered);
    end
    $display("%0d cells; concurrent arrivals %0d, cut-through %0d, pending grants %0d", created,
             ev_multi, ev_bypass, ev_wait);
    checks++;
    if (ev_multi == 0 || ev_bypass == 0 || ev_wait == 0) begin
      failures++;
      $display("a scheduling event never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
