// tb_workloads -- the evaluation workloads, run on the switch at its default
// size (32 x 32, Q = 12, SD = 2, R = 1, P = 0).
//   1. Uniform Bernoulli arrivals at loads 0.2 ... 0.95 (delay against load).
//      For each load the mean cell delay is printed with the idle latency
//      (7 cell times of request, grant and pipeline) removed, and the switch
//      must carry the offered load: output rate within 3% of the input rate.
//   2. Unbalanced Bernoulli arrivals at 100% input load: input i sends to
//      output i with probability w + (1 - w)/N and uniformly otherwise, for
//      w = 0, 0.25, 0.5, 0.75, 1. With 12 credits per output the throughput
//      must stay above 0.93 for every w.
// Cells are checked for order and loss as in the other end-to-end tests.
module tb_workloads;
  import sbs_pkg::*;
  localparam int N = N_DEF, CELL_W = CELL_W_DEF, QD = Q_DEF;
  localparam int IW = $clog2(N);
  localparam int IDLE = 5 + SD_DEF + 3 * P_DEF;
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

  always #50 clk = ~clk;   // long cell time: the sources probe in_ready in 1-unit steps

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CELL_W-1:0] mk(int s, int d, int q, int b);
    return {16'(s), 16'(d), 16'(q), 16'(b)};
  endfunction

  logic [CELL_W-1:0] srcq [N][N][$];
  int cur [N];
  logic acc [N];
  int next_seq [N][N];
  int exp_seq  [N][N];
  int now = 0, win_out = 0, win_in = 0, win_cnt = 0;
  longint win_delay = 0;
  logic measuring = 0;

  always @(posedge clk) for (int i = 0; i < N; i++) acc[i] <= in_valid[i] && in_ready[i];

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
          if (measuring) begin
            win_out++;
            win_delay += longint'(((now - b) & 16'hffff) - IDLE);
          end
        end
        if (oq_overflow[o]) begin failures++; $display("overflow at output %0d", o); end
      end
      now++;
    end
  end

  // load: cell probability per input per cell time; w: unbalanced factor
  task automatic tick(input real load, input real w);
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      if (acc[i]) void'(srcq[i][cur[i]].pop_front());
      if ((real'($urandom % 10000) / 10000.0) < load) begin
        int d;
        if ((real'($urandom % 10000) / 10000.0) < w) d = i;
        else d = int'($urandom % N);
        srcq[i][d].push_back(mk(i, d, next_seq[i][d] & 16'hffff, now & 16'hffff));
        next_seq[i][d]++;
        if (measuring) win_in++;
      end
    end
    // Each input offers the next backlogged destination, round-robin, whose
    // VOQ has room (found by probing in_ready), as a line card with a full
    // VOQ would still take cells for its other outputs.
    for (int i = 0; i < N; i++) begin
      int start;
      start = cur[i];
      in_valid[i] = 1'b0;
      in_cell[i]  = '0;
      for (int k = 1; k <= N; k++) begin
        int d;
        d = (start + k) % N;
        if (srcq[i][d].size() > 0) begin
          in_dest[i] = IW'(d);
          #1;
          if (in_ready[i]) begin
            cur[i]      = d;
            in_valid[i] = 1'b1;
            in_cell[i]  = srcq[i][d][0];
            break;
          end
        end
      end
      if (!in_valid[i]) in_dest[i] = IW'(cur[i]);
    end
  endtask

  task automatic flush();
    for (int i = 0; i < N; i++) in_valid[i] = 1'b0;
    for (int i = 0; i < N; i++)
      for (int d = 0; d < N; d++) begin
        // drop what the sources still hold; the scoreboard skips those numbers
        while (srcq[i][d].size() > 0) begin
          void'(srcq[i][d].pop_back());
          next_seq[i][d]--;
        end
      end
    // let the switch empty
    repeat (3000) tick(0.0, 0.0);
    for (int i = 0; i < N; i++)
      for (int d = 0; d < N; d++) begin
        checks++;
        if (exp_seq[i][d] != next_seq[i][d]) begin
          failures++;
          $display("flow %0d->%0d: %0d cells sent, %0d arrived", i, d, next_seq[i][d], exp_seq[i][d]);
        end
      end
  endtask

  initial begin
    real loads [5] = '{0.2, 0.5, 0.8, 0.9, 0.95};
    real ws [5] = '{0.0, 0.25, 0.5, 0.75, 1.0};
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_cell[i] = '0; cur[i] = 0;
      for (int o = 0; o < N; o++) begin next_seq[i][o] = 0; exp_seq[i][o] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. uniform, delay against load
    foreach (loads[k]) begin
      repeat (400) tick(loads[k], 0.0);
      measuring = 1; win_in = 0; win_out = 0; win_delay = 0;
      repeat (2000) tick(loads[k], 0.0);
      measuring = 0;
      $display("uniform load %0.2f: mean delay %0.2f cell times beyond the idle latency, carried %0.3f",
               loads[k], real'(win_delay) / real'(win_out), real'(win_out) / real'(N * 2000));
      checks++;
      if (real'(win_out) < 0.97 * real'(win_in)) begin
        failures++;
        $display("  offered %0d cells, carried %0d", win_in, win_out);
      end
    end
    repeat (1000) tick(0.0, 0.0);
    // 2. unbalanced, throughput at 100% input load
    foreach (ws[k]) begin
      real tput;
      repeat (500) tick(1.0, ws[k]);
      measuring = 1; win_in = 0; win_out = 0; win_delay = 0;
      repeat (2500) tick(1.0, ws[k]);
      measuring = 0;
      tput = real'(win_out) / real'(N * 2500);
      $display("unbalanced w=%0.2f: throughput %0.3f", ws[k], tput);
      checks++;
      if (tput < 0.93) begin failures++; $display("  throughput below 0.93"); end
      flush();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
