// credit_scheduler -- the per-output credit scheduler of the request-grant protocol.
//
// One instance sits beside each output queue. It holds
//   * one request counter per input (the "request queues", kept as counters
//     because cells are of fixed size),
//   * the shared credit counter of its output queue, Q credits at reset.
// Every cell time it serves, in round-robin order over the inputs, up to R
// inputs whose request counter is non-zero, but only as many as it has
// credits: each grant takes one credit and one request. Grants go to the grant
// queues of the inputs (grant_scheduler). A credit comes back when an input's
// grant scheduler accepts one of this output's grants (ack_in), not when the
// cell leaves the output queue: the departure is already committed then, and
// returning the credit early removes the line-card propagation delay from the
// round trip that sizes the output queue.
//
// With R = 1 returned credits are added at once. With R > 1 they are released
// into the counter at most one per cell time, as the design requires so that no
// more than one new cell per cell time can be driven into the queue; the rest
// wait in ret_pend. Request counters saturate at REQ_MAX, which the line cards
// never exceed because they hold a window of REQ_MAX requests per output.
//
// Timing: req_in and ack_in are counted at the clock edge; gnt_out is a
// combinational function of the registered counters (this is the first of the
// two scheduler pipeline stages). Reset: no requests, Q credits, pointer 0.
module credit_scheduler
  import sbs_pkg::*;
#(
  parameter int unsigned N       = N_DEF,
  parameter int unsigned Q       = Q_DEF,
  parameter int unsigned R       = R_DEF,
  parameter int unsigned REQ_MAX = VOQ_DEPTH_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req_in,     // one new request from input i
  input  logic [N-1:0] ack_in,     // input i accepted one of our grants: credit returns
  output logic [N-1:0] gnt_out,    // grant issued to input i this cell time
  output logic [$clog2(Q+1)-1:0] credits,      // credits currently available
  output logic         starved     // requests wait but no credit is available
);
  localparam int unsigned RW = $clog2(REQ_MAX + 1);
  localparam int unsigned CW = $clog2(Q + 1);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned NW = $clog2(N + 1);

  logic [RW-1:0] reqcnt [N];
  logic [CW-1:0] credit;
  logic [NW-1:0] ret_pend;
  logic [IW-1:0] ptr;

  logic [N-1:0]  eligible;
  logic [IW-1:0] ptr_nxt;
  int unsigned   ngnt;

  // Round-robin search: first set bit of r at or after position p, wrapping.
  function automatic logic [IW:0] rr_first(input logic [N-1:0] r, input logic [IW-1:0] p);
    logic [IW:0] hit;
    int unsigned k;
    hit = '0;
    for (int unsigned j = 0; j < N; j++) begin
      k = int'(p) + j;
      if (k >= N) k = k - N;
      if (!hit[IW] && r[k]) hit = {1'b1, IW'(k)};
    end
    return hit;
  endfunction

  always_comb begin
    logic [N-1:0] cand;
    logic [IW:0]  res;
    for (int i = 0; i < N; i++) eligible[i] = (reqcnt[i] != '0);
    cand    = eligible;
    gnt_out = '0;
    ngnt    = 0;
    ptr_nxt = ptr;
    for (int unsigned r = 0; r < R; r++) begin
      res = rr_first(cand, ptr);
      if (r < credit && res[IW]) begin
        gnt_out[res[IW-1:0]] = 1'b1;
        cand[res[IW-1:0]]    = 1'b0;
        ngnt                 = ngnt + 1;
        ptr_nxt              = (int'(res[IW-1:0]) == N - 1) ? '0 : res[IW-1:0] + 1'b1;
      end
    end
  end

  assign credits = credit;
  assign starved = (|eligible) && (credit == '0);

  // credits coming back this cell time
  int unsigned nack;
  int unsigned inc;
  always_comb begin
    nack = 0;
    for (int i = 0; i < N; i++) nack = nack + int'(ack_in[i]);
    if (R == 1) inc = nack;
    else        inc = ((int'(ret_pend) + nack) > 0) ? 1 : 0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) reqcnt[i] <= '0;
      credit   <= CW'(Q);
      ret_pend <= '0;
      ptr      <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        reqcnt[i] <= reqcnt[i] + RW'(req_in[i]) - RW'(gnt_out[i]);
      credit   <= CW'(int'(credit) - ngnt + inc);
      ret_pend <= NW'(int'(ret_pend) + nack - inc);
      ptr      <= ptr_nxt;
    end
  end

  // The protocol keeps every counter inside its range.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(credit) - ngnt + inc <= Q) else $error("credit_scheduler: credit above Q");
      for (int i = 0; i < N; i++)
        assert (!(req_in[i] && !gnt_out[i] && reqcnt[i] == RW'(REQ_MAX)))
          else $error("credit_scheduler: request counter overflow");
    end
  end

endmodule
