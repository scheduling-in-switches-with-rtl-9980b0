// tb_switch_core -- self-checking test of the switch chip on its own.
// The test plays N ideal line cards with endless backlogs: each keeps at most
// REQ_MAX requests outstanding per output and answers every grant with a cell
// in the same cell time. It checks that
//   * a request into an idle chip is granted SD + 1 cell times later,
//   * grants only come for outputs the input has requested,
//   * every cell leaves its output once and in flow order, with no buffer
//     overflow,
//   * under saturated uniform requests the outputs are busy at least 95% of
//     the time (the schedulers desynchronise),
//   * requests from all inputs to one output are served round-robin: over any
//     window of N consecutive grants of that output each input gets one.
module tb_switch_core;
  import sbs_pkg::*;
  localparam int N = 4, Q = 2, SD = 2, W = 32;
  localparam int REQ_MAX = req_window(0, SD);
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic req_valid [N];
  logic [1:0] req_dest [N];
  logic gnt_valid [N];
  logic [1:0] gnt_out [N];
  logic cell_valid [N];
  logic [1:0] cell_dest [N];
  logic [W-1:0] cell_data [N];
  logic out_valid [N];
  logic [W-1:0] out_data [N];
  logic [N-1:0] cs_starved, gs_waiting, oq_bypass, oq_multi, oq_overflow;
  logic [$clog2(Q+1)-1:0] oq_occupancy [N];

  switch_core #(.N(N), .Q(Q), .R(1), .SD(SD), .CELL_W(W), .OQ_DEPTH(Q), .REQ_MAX(REQ_MAX))
    dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int outst [N][N];      // requests not yet granted
  int sent  [N][N];      // cells sent per flow
  int recv  [N][N];      // cells received per flow
  int busy, mode, t_now, lone_req_t, lone_gnt_t;
  int last_src [N][$];   // inputs served by each output, in order

  // one cell time of line-card behaviour, evaluated just after the clock edge
  task automatic step();
    for (int i = 0; i < N; i++) begin
      // grant from last edge -> cell now
      cell_valid[i] = 1'b0;
      cell_dest[i]  = '0;
      cell_data[i]  = '0;
      if (gnt_valid[i]) begin
        int o;
        o = int'(gnt_out[i]);
        checks++;
        if (outst[i][o] == 0) begin
          failures++;
          $display("t=%0d input %0d granted output %0d without a request", t_now, i, o);
        end else outst[i][o]--;
        if (mode == 0 && lone_gnt_t < 0) lone_gnt_t = t_now;
        cell_valid[i] = 1'b1;
        cell_dest[i]  = 2'(o);
        cell_data[i]  = {8'(i), 8'(o), 16'(sent[i][o])};
        sent[i][o]++;
      end
      // requests
      req_valid[i] = 1'b0;
      req_dest[i]  = '0;
      if (mode > 0) begin
        int o, r;
        // saturated: from a random start, the first output with window left
        r = int'($urandom % N);
        o = r;
        for (int k = N - 1; k >= 0; k--) if (outst[i][(r + k) % N] < REQ_MAX) o = (r + k) % N;
        if (mode == 2) o = 0;
        if (outst[i][o] < REQ_MAX) begin
          req_valid[i] = 1'b1;
          req_dest[i]  = 2'(o);
          outst[i][o]++;
        end
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N; o++) begin
        if (out_valid[o]) begin
          int s, d, q;
          s = int'(out_data[o][31:24]);
          d = int'(out_data[o][23:16]);
          q = int'(out_data[o][15:0]);
          checks++;
          if (d != o || s >= N || q != recv[s][d]) begin
            failures++;
            $display("t=%0d output %0d: cell %0d->%0d #%0d out of order", t_now, o, s, d, q);
          end else recv[s][d]++;
          if (mode == 1) busy++;
        end
        checks++;
        if (oq_overflow[o]) begin failures++; $display("overflow at output %0d", o); end
      end
      for (int i = 0; i < N; i++)
        if (mode == 2 && gnt_valid[i] && gnt_out[i] == 0) last_src[0].push_back(i);
      t_now++;
    end
  end

  initial begin
    mode = 0; busy = 0; t_now = 0; lone_gnt_t = -1;
    for (int i = 0; i < N; i++) begin
      req_valid[i] = 0; req_dest[i] = '0; cell_valid[i] = 0; cell_dest[i] = '0; cell_data[i] = '0;
      for (int o = 0; o < N; o++) begin outst[i][o] = 0; sent[i][o] = 0; recv[i][o] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one lone request
    @(posedge clk);
    #1;
    req_valid[2] = 1; req_dest[2] = 2'd1; outst[2][1] = 1;
    lone_req_t = t_now;
    @(posedge clk);
    #1;
    req_valid[2] = 0;
    repeat (10) begin @(posedge clk); #1; step(); end
    checks++;
    if (lone_gnt_t - lone_req_t != SD + 1) begin
      failures++;
      $display("lone request granted after %0d cell times, expected %0d", lone_gnt_t - lone_req_t, SD + 1);
    end
    // saturated uniform requests
    mode = 1;
    repeat (200) begin @(posedge clk); #1; step(); end
    busy = 0;
    repeat (2000) begin @(posedge clk); #1; step(); end
    $display("saturated uniform: outputs busy %0.3f", real'(busy) / real'(N * 2000));
    checks++;
    if (real'(busy) / real'(N * 2000) < 0.95) begin
      failures++;
      $display("throughput too low");
    end
    // every input asks output 0 only
    mode = 2;
    repeat (100) begin @(posedge clk); #1; step(); end
    last_src[0].delete();
    repeat (400) begin @(posedge clk); #1; step(); end
    for (int k = 0; k + N <= last_src[0].size(); k += N) begin
      logic [N-1:0] seen;
      seen = '0;
      for (int j = 0; j < N; j++) seen[last_src[0][k + j]] = 1'b1;
      checks++;
      if (seen != '1) begin failures++; $display("hot spot: grants not round-robin at %0d", k); end
    end
    // drain
    mode = 0;
    repeat (200) begin @(posedge clk); #1; step(); end
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++) begin
        checks++;
        if (recv[i][o] != sent[i][o] || outst[i][o] != 0) begin
          failures++;
          $display("flow %0d->%0d: sent %0d received %0d, %0d requests left", i, o, sent[i][o],
                   recv[i][o], outst[i][o]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
