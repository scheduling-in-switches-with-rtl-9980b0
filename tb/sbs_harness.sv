// sbs_harness -- traffic source and scoreboard around one sbs_system.
//
// Every input is a Bernoulli source: each cell time it creates a cell with
// probability LOAD, addressed by the traffic pattern of the current phase.
// Cells wait in an unbounded source queue until the line card takes them, so
// backpressure loses nothing. Each cell carries its source, destination,
// per-flow sequence number and creation time. At the outputs the scoreboard
// checks that every cell arrives at the right output, exactly once and in flow
// order, and measures delay and throughput.
//
// Phases: (0) a lone cell, whose latency must be 5 + SD + 3P cell times,
// counted from the cell time it is offered at the input to the one in which it
// shows on the output;
// (1) uniform traffic at load 0.6; (2) uniform traffic at load 1.0, where the
// measured throughput must reach MIN_TPUT; (3) unbalanced traffic, w = 0.5,
// every input favouring the output of its own number; (4) every input sends to
// output 0 (a hot spot); then a drain with no new cells, after which every
// cell created must have been delivered. The scheduling events the design is
// built on (request window stalls, credit starvation, pending grants,
// concurrent arrivals at an output, cut-through, full VOQs) must each happen,
// and buffer overflow never.
module sbs_harness #(
  parameter int unsigned N         = 8,
  parameter int unsigned Q         = 4,
  parameter int unsigned R         = 1,
  parameter int unsigned SD        = 2,
  parameter int unsigned P         = 0,
  parameter int unsigned VOQ_DEPTH = 16,
  parameter int unsigned OQ_DEPTH  = Q,
  parameter int unsigned REQ_MAX   = VOQ_DEPTH,
  parameter int unsigned PHASE_CT  = 2000,
  parameter real         MIN_TPUT  = 0.9,
  parameter string       NAME      = "switch"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CELL_W = 64;

  logic rst_n;
  logic                 in_valid [N];
  logic [IW-1:0]        in_dest  [N];
  logic [CELL_W-1:0]    in_cell  [N];
  logic                 in_ready [N];
  logic                 out_valid [N];
  logic [CELL_W-1:0]    out_data  [N];
  logic [N-1:0] lc_win_stall, cs_starved, gs_waiting, oq_bypass, oq_multi, oq_overflow;
  logic [$clog2(OQ_DEPTH+1)-1:0] oq_occupancy [N];

  sbs_system #(
    .N(N), .Q(Q), .R(R), .SD(SD), .P(P), .CELL_W(CELL_W), .VOQ_DEPTH(VOQ_DEPTH),
    .OQ_DEPTH(OQ_DEPTH), .REQ_MAX(REQ_MAX)
  ) dut (.*);

  // cell format: {src[15:0], dst[15:0], seq[15:0], birth[15:0]}
  function automatic logic [CELL_W-1:0] mk(int s, int d, int q, int b);
    return {16'(s), 16'(d), 16'(q), 16'(b)};
  endfunction

  logic [CELL_W-1:0] srcq [N][N][$];   // per input, per destination
  int cur [N];                          // destination offered now
  logic acc [N];                        // the offered cell was taken at the last edge

  always @(posedge clk) for (int i = 0; i < N; i++) acc[i] <= in_valid[i] && in_ready[i];
  int next_seq [N][N];
  int exp_seq  [N][N];
  int created, delivered, now, phase, out_in_window;
  longint delay_sum;
  real load;
  int ev_stall, ev_starved, ev_waiting, ev_bypass, ev_multi, ev_full, ev_overflow;
  int lone_latency;

  // ---------------------------------------------------------------- outputs
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
            $display("%s: output %0d got cell %0d->%0d seq %0d, expected seq %0d", NAME, o, s, d,
                     q, exp_seq[s < N ? s : 0][d < N ? d : 0]);
          end else begin
            exp_seq[s][d]++;
          end
          delivered++;
          out_in_window++;
          delay_sum += longint'((now - b) & 16'hffff);
          if (phase == 0) lone_latency = (now - b) & 16'hffff;
        end
      end
      ev_stall    += $countones(lc_win_stall);
      ev_starved  += $countones(cs_starved);
      ev_waiting  += $countones(gs_waiting);
      ev_bypass   += $countones(oq_bypass & {N{1'b1}});
      ev_multi    += $countones(oq_multi);
      ev_overflow += $countones(oq_overflow);
      for (int i = 0; i < N; i++) if (in_valid[i] && !in_ready[i]) ev_full++;
      now++;
    end
  end

  // ---------------------------------------------------------------- sources
  function automatic int pick_dest(int i);
    case (phase)
      3: begin
        // unbalanced: own output with probability w + (1-w)/N, w = 0.5
        if ($urandom % 2 == 0) return i;
        return $urandom % N;
      end
      4: return 0;
      default: return $urandom % N;
    endcase
  endfunction

  task automatic source_step(logic gen);
    for (int i = 0; i < N; i++) begin
      if (acc[i]) void'(srcq[i][cur[i]].pop_front());
      if (gen && (real'($urandom % 10000) / 10000.0) < load) begin
        int d;
        d = pick_dest(i);
        srcq[i][d].push_back(mk(i, d, next_seq[i][d] & 16'hffff, now & 16'hffff));
        next_seq[i][d]++;
        created++;
      end
    end
  endtask

  task automatic present();
    for (int i = 0; i < N; i++) begin
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

  task automatic run(int p, real l, int cts);
    phase = p;
    load  = l;
    out_in_window = 0;
    for (int t = 0; t < cts; t++) begin
      @(posedge clk);
      #1;
      source_step(1'b1);
      present();
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; rst_n = 0; now = 0;
    created = 0; delivered = 0; delay_sum = 0; phase = 0; load = 0.0; out_in_window = 0;
    ev_stall = 0; ev_starved = 0; ev_waiting = 0; ev_bypass = 0; ev_multi = 0; ev_full = 0;
    ev_overflow = 0; lone_latency = -1;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_cell[i] = '0; cur[i] = 0;
      for (int o = 0; o < N; o++) begin next_seq[i][o] = 0; exp_seq[i][o] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 0: one lone cell into the idle switch
    @(posedge clk);
    #1;
    srcq[1][2].push_back(mk(1, 2, 0, now & 16'hffff));
    cur[1] = 1;
    next_seq[1][2]++;
    created++;
    present();
    @(posedge clk);
    #1;
    source_step(1'b0);
    present();
    repeat (20 + 3 * P) @(posedge clk);
    checks++;
    if (lone_latency != int'(5 + SD + 3 * P)) begin
      failures++;
      $display("%s: lone cell latency %0d, expected %0d", NAME, lone_latency, 5 + SD + 3 * P);
    end
    // phase 1..4
    run(1, 0.6, PHASE_CT);
    $display("%s: load 0.6 uniform: mean delay %0.2f cell times", NAME,
             real'(delay_sum) / real'(delivered));
    run(2, 1.0, PHASE_CT / 4);
    run(2, 1.0, PHASE_CT);
    begin
      real tput;
      tput = real'(out_in_window) / real'(N * PHASE_CT);
      $display("%s: load 1.0 uniform: throughput %0.3f", NAME, tput);
      checks++;
      if (tput < MIN_TPUT) begin
        failures++;
        $display("%s: throughput below %0.2f", NAME, MIN_TPUT);
      end
    end
    run(3, 1.0, PHASE_CT);
    $display("%s: load 1.0 unbalanced w=0.5: throughput %0.3f", NAME,
             real'(out_in_window) / real'(N * PHASE_CT));
    run(4, 0.5, PHASE_CT / 4);
    // drain
    begin
      int t;
      t = 0;
      phase = 5;
      while (delivered < created && t < 200 * N * VOQ_DEPTH) begin
        @(posedge clk);
        #1;
        source_step(1'b0);
        present();
        t++;
      end
      repeat (10) @(posedge clk);
    end
    checks++;
    if (delivered != created) begin
      failures++;
      $display("%s: %0d cells created, %0d delivered", NAME, created, delivered);
    end
    $display("%s: %0d cells; events: window stall %0d, no credit %0d, pending grant %0d,",
             NAME, created, ev_stall, ev_starved, ev_waiting);
    $display("%s:   concurrent arrivals %0d, cut-through %0d, VOQ full %0d, overflow %0d", NAME,
             ev_multi, ev_bypass, ev_full, ev_overflow);
    checks++;
    if (ev_stall == 0 || ev_starved == 0 || ev_waiting == 0 || ev_multi == 0 || ev_bypass == 0
        || ev_full == 0) begin
      failures++;
      $display("%s: a scheduling event never happened", NAME);
    end
    checks++;
    if (ev_overflow != 0) failures++;
    done = 1;
  end

endmodule
