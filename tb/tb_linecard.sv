// tb_linecard -- self-checking test of the input line card.
// The test plays the switch. Phase A: random arrivals to random outputs, and
// grants issued at random for outputs that have requests outstanding. Every
// cell that leaves must be the oldest unsent cell of the granted VOQ, one
// clock after the grant; requests never exceed the cells stored nor the
// request window; in_ready must drop exactly when the VOQ is full. Phase B:
// a single saturated flow whose requests are answered by grants three cell
// times later (the switch's loop at P = 0, SD = 2); with a window of
// req_window(0, 2) cells the flow must leave at one cell per cell time.
module tb_linecard;
  import sbs_pkg::*;
  localparam int N = 4, W = 16, DEPTH = 8;
  localparam int REQ_MAX = req_window(0, 2);
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int stall_seen = 0, full_seen = 0;

  logic in_valid, in_ready, req_valid, gnt_valid, cell_valid, win_stall;
  logic [1:0] in_dest, req_dest, gnt_out, cell_dest;
  logic [W-1:0] in_cell, cell_data;

  linecard #(.N(N), .CELL_W(W), .VOQ_DEPTH(DEPTH), .REQ_MAX(REQ_MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] voq [N][$];     // cells stored, oldest first
  int stored [N], reqd [N], outst [N];
  logic exp_cv; int exp_cd; logic [W-1:0] exp_data;
  int gpipe [$];                // phase B: grant pipeline, -1 = none
  logic [W-1:0] seq;
  int sent_b;

  task automatic cycle(input int phase, input int t);
    // outputs of the last edge
    checks++;
    if (cell_valid !== exp_cv || (exp_cv && (cell_dest != exp_cd || cell_data !== exp_data))) begin
      failures++;
      $display("t=%0d cell v=%0d d=%0d %h expected v=%0d d=%0d %h", t, cell_valid, cell_dest,
               cell_data, exp_cv, exp_cd, exp_data);
    end
    if (phase == 1 && cell_valid) sent_b++;
    if (req_valid) begin
      reqd[req_dest]++;
      outst[req_dest]++;
      if (phase == 1) gpipe[$] = int'(req_dest);
    end
    for (int o = 0; o < N; o++) begin
      checks++;
      if (reqd[o] > stored[o] || outst[o] > REQ_MAX) begin
        failures++;
        $display("t=%0d output %0d: %0d requested of %0d stored, %0d outstanding", t, o, reqd[o],
                 stored[o], outst[o]);
      end
    end
    if (win_stall) stall_seen++;
    // new stimulus
    in_valid = (phase == 1) ? 1'b1 : (phase == 2) ? 1'b0 : ($urandom % 4 != 0);
    in_dest  = (phase == 1) ? 2'd2 : 2'($urandom % ((t / 200) % 2 ? 4 : 2));
    in_cell  = seq;
    gnt_valid = 0;
    gnt_out   = '0;
    if (phase != 1) begin
      if ($urandom % 2 == 0) begin
        int o;
        o = $urandom % N;
        if (outst[o] > 0) begin gnt_valid = 1; gnt_out = 2'(o); end
      end
    end else begin
      int g;
      g = gpipe.pop_front();
      gpipe.push_back(-1);
      if (g >= 0) begin gnt_valid = 1; gnt_out = 2'(g); end
    end
    #1;
    checks++;
    if (in_ready !== (stored[in_dest] < DEPTH)) begin
      failures++;
      $display("t=%0d in_ready %0d with %0d stored", t, in_ready, stored[in_dest]);
    end
    if (!in_ready) full_seen++;
    exp_cv = gnt_valid;
    exp_cd = int'(gnt_out);
    if (gnt_valid) begin
      exp_data = voq[gnt_out].pop_front();
      stored[gnt_out]--;
      reqd[gnt_out]--;
      outst[gnt_out]--;
    end
    if (in_valid && in_ready) begin
      voq[in_dest].push_back(seq);
      stored[in_dest]++;
      seq++;
    end
  endtask

  initial begin
    in_valid = 0; in_dest = '0; in_cell = '0; gnt_valid = 0; gnt_out = '0;
    exp_cv = 0; exp_cd = 0; exp_data = '0; seq = 1; sent_b = 0;
    for (int o = 0; o < N; o++) begin stored[o] = 0; reqd[o] = 0; outst[o] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cycle(0, t);
    end
    // drain phase A: grant everything outstanding, no arrivals
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      cycle(2, t);
    end
    for (int k = 0; k < 3; k++) gpipe.push_back(-1);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      cycle(1, t);
      if (t == 99) sent_b = 0;
    end
    checks++;
    if (sent_b < 199) begin
      failures++;
      $display("single flow: %0d cells in 200 cell times", sent_b);
    end
    checks++;
    if (stall_seen == 0 || full_seen == 0) begin
      failures++;
      $display("coverage: window stall %0d, VOQ full %0d", stall_seen, full_seen);
    end
    $display("single flow: %0d cells in 200 cell times", sent_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
