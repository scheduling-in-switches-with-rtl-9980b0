// tb_credit_scheduler -- self-checking test of the per-output credit scheduler.
// Two instances run side by side: R = 1 (one grant per cell time, returned
// credits added at once) and R = 2 (up to two grants per cell time, returned
// credits released one per cell time). The test plays the inputs: it sends
// random requests within the request window and acknowledges random grants
// it has received, as grant schedulers would. A reference model kept here
// predicts every grant vector, the credit count and the starved flag.
// It also checks the rules of the protocol directly: never more grants
// outstanding than Q, never a grant without a request, at most R grants per
// cell time.
module tb_credit_scheduler;
  localparam int N = 4, Q = 3, REQ_MAX = 3;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int starved_seen = 0, multi_grant_seen = 0;

  logic [N-1:0] req_in [2], ack_in [2], gnt_out [2];
  logic [$clog2(Q+1)-1:0] credits [2];
  logic starved [2];

  credit_scheduler #(.N(N), .Q(Q), .R(1), .REQ_MAX(REQ_MAX)) dut1 (
    .clk, .rst_n, .req_in(req_in[0]), .ack_in(ack_in[0]), .gnt_out(gnt_out[0]),
    .credits(credits[0]), .starved(starved[0]));
  credit_scheduler #(.N(N), .Q(Q), .R(2), .REQ_MAX(REQ_MAX)) dut2 (
    .clk, .rst_n, .req_in(req_in[1]), .ack_in(ack_in[1]), .gnt_out(gnt_out[1]),
    .credits(credits[1]), .starved(starved[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state per instance
  int m_req [2][N];
  int m_out [2][N];      // grants to input i not yet acknowledged
  int m_credit [2], m_pend [2], m_ptr [2];

  task automatic check(input int d, input int rr);
    logic [N-1:0] exp;
    int avail, ng, p;
    exp = '0; ng = 0; p = m_ptr[d];
    for (int r = 0; r < rr; r++) begin
      if (r < m_credit[d]) begin
        for (int k = 0; k < N; k++) begin
          int i;
          i = (m_ptr[d] + k) % N;
          if (m_req[d][i] > 0 && !exp[i]) begin
            exp[i] = 1'b1; ng++; p = (i + 1) % N; break;
          end
        end
      end
    end
    checks++;
    if (gnt_out[d] !== exp) begin
      failures++;
      $display("R=%0d grant %b expected %b (credit %0d)", rr, gnt_out[d], exp, m_credit[d]);
    end
    checks++;
    if (credits[d] != m_credit[d]) begin
      failures++;
      $display("R=%0d credits %0d expected %0d", rr, credits[d], m_credit[d]);
    end
    avail = 0;
    for (int i = 0; i < N; i++) if (m_req[d][i] > 0) avail = 1;
    checks++;
    if (starved[d] !== (avail == 1 && m_credit[d] == 0)) begin
      failures++;
      $display("R=%0d starved flag wrong", rr);
    end
    if (starved[d]) starved_seen++;
    if ($countones(gnt_out[d]) > 1) multi_grant_seen++;
    // protocol rules
    checks++;
    begin
      int outst;
      outst = 0;
      for (int i = 0; i < N; i++) outst += m_out[d][i];
      if (outst + m_credit[d] + m_pend[d] != Q || $countones(gnt_out[d]) > rr) begin
        failures++;
        $display("R=%0d credit conservation broken", rr);
      end
    end
    // advance the model with what the design does at the edge (the inputs
    // act on the grants they really get, so a wrong grant is counted once and
    // does not derail the rest of the run)
    ng = $countones(gnt_out[d]);
    for (int i = 0; i < N; i++) begin
      m_req[d][i] += int'(req_in[d][i]) - int'(gnt_out[d][i]);
      m_out[d][i] += int'(gnt_out[d][i]) - int'(ack_in[d][i]);
    end
    begin
      int nack, inc;
      nack = $countones(ack_in[d]);
      if (rr == 1) inc = nack;
      else inc = (m_pend[d] + nack > 0) ? 1 : 0;
      m_credit[d] = m_credit[d] - ng + inc;
      m_pend[d]   = m_pend[d] + nack - inc;
    end
    m_ptr[d] = p;
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      req_in[d] = '0; ack_in[d] = '0;
      m_credit[d] = Q; m_pend[d] = 0; m_ptr[d] = 0;
      for (int i = 0; i < N; i++) begin m_req[d][i] = 0; m_out[d][i] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        int load;
        load = (t / 500) % 2 == 0 ? 3 : 1;   // alternate heavy and light phases
        for (int i = 0; i < N; i++) begin
          req_in[d][i] = (m_req[d][i] + m_out[d][i] < REQ_MAX) && ($urandom % 4 < load);
          ack_in[d][i] = (m_out[d][i] > 0) && ($urandom % 3 == 0);
        end
      end
      #1;
      check(0, 1);
      check(1, 2);
    end
    checks++;
    if (starved_seen == 0 || multi_grant_seen == 0) begin
      failures++;
      $display("coverage: starved %0d multi-grant %0d", starved_seen, multi_grant_seen);
    end
    $display("starved cell times %0d, cell times with two grants %0d", starved_seen, multi_grant_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
