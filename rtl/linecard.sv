// linecard -- input line card: virtual output queues and the request side of
// the request-grant protocol.
//
// Arriving cells are stored in one FIFO per output (VOQ). For every stored cell
// the line card must first obtain a credit of the destination's output queue:
// it sends a request to that output's credit scheduler, and sends the cell only
// when a grant for that output comes back. Requests are sent one per cell time,
// chosen round-robin among the outputs that have unrequested cells. To keep the
// switch's request counters from overflowing, each output has a request window
// of REQ_MAX: a request takes one unit, and each grant returns one. The window
// must cover one round trip of the request/grant loop (req_window(P, SD), 4 cell
// times at P = 0, SD = 2) for a lone busy flow to be granted every cell time;
// by default it equals the VOQ depth, so every stored cell may be requested.
//
// On a grant for output o the head of VOQ o leaves on the next clock edge.
// Grants ask for the oldest cell of the VOQ; a grant for an empty VOQ cannot
// happen because every grant answers one request and every request stands for
// a stored cell.
//
// Interface: in_* is a valid/ready port, at most one cell per cell time (the
// line rate); in_ready is low when the destination's VOQ is full. req_* and
// cell_* are registered. Grants (gnt_*) may arrive every cell time.
// The VOQ depth and the one-request-per-cell-time rule are this design's
// choices; queue organisation and the window rule follow the scheme.
module linecard
  import sbs_pkg::*;
#(
  parameter int unsigned N         = N_DEF,
  parameter int unsigned CELL_W    = CELL_W_DEF,
  parameter int unsigned VOQ_DEPTH = VOQ_DEPTH_DEF,
  parameter int unsigned REQ_MAX   = VOQ_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // arriving traffic
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_dest,
  input  logic [CELL_W-1:0]    in_cell,
  output logic                 in_ready,
  // requests to the credit schedulers
  output logic                 req_valid,
  output logic [$clog2(N)-1:0] req_dest,
  // grants from the grant scheduler
  input  logic                 gnt_valid,
  input  logic [$clog2(N)-1:0] gnt_out,
  // cells into the switch
  output logic                 cell_valid,
  output logic [$clog2(N)-1:0] cell_dest,
  output logic [CELL_W-1:0]    cell_data,
  // status
  output logic                 win_stall   // a cell waits to be requested but its window is used up
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned DW = $clog2(VOQ_DEPTH);
  localparam int unsigned CW = $clog2(VOQ_DEPTH + 1);
  localparam int unsigned WW = $clog2(REQ_MAX + 1);

  logic [CELL_W-1:0] mem [N * VOQ_DEPTH];
  logic [DW-1:0] head   [N];
  logic [DW-1:0] tail   [N];
  logic [CW-1:0] count  [N];   // cells stored
  logic [CW-1:0] unreq  [N];   // stored cells not yet requested
  logic [WW-1:0] window [N];   // requests still allowed

  logic          push;
  logic [N-1:0]  can_req;
  logic [N-1:0]  blocked;
  logic          arb_valid;
  logic [IW-1:0] arb_idx;
  logic [N-1:0]  arb_oh;

  assign in_ready = (count[in_dest] != CW'(VOQ_DEPTH));
  assign push     = in_valid && in_ready;

  // A grant arriving now frees a window unit that may be used at once.
  always_comb begin
    for (int o = 0; o < N; o++) begin
      can_req[o] = (unreq[o] != '0) &&
                   ((window[o] != '0) || (gnt_valid && gnt_out == IW'(o)));
      blocked[o] = (unreq[o] != '0) && !can_req[o];
    end
  end
  assign win_stall = |blocked;

  rr_arbiter #(.N(N)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (can_req),
    .accept (1'b1),
    .valid  (arb_valid),
    .idx    (arb_idx),
    .onehot (arb_oh)
  );

  always_ff @(posedge clk) begin
    if (push) mem[int'(in_dest) * VOQ_DEPTH + int'(tail[in_dest])] <= in_cell;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) begin
        head[o]   <= '0;
        tail[o]   <= '0;
        count[o]  <= '0;
        unreq[o]  <= '0;
        window[o] <= WW'(REQ_MAX);
      end
      req_valid  <= 1'b0;
      req_dest   <= '0;
      cell_valid <= 1'b0;
      cell_dest  <= '0;
      cell_data  <= '0;
    end else begin
      for (int o = 0; o < N; o++) begin
        logic in_o, out_o;
        in_o  = push && in_dest == IW'(o);
        out_o = gnt_valid && gnt_out == IW'(o);
        if (in_o)  tail[o] <= tail[o] + 1'b1;
        if (out_o) head[o] <= head[o] + 1'b1;
        count[o]  <= count[o] + CW'(in_o) - CW'(out_o);
        unreq[o]  <= unreq[o] + CW'(in_o) - CW'(arb_oh[o]);
        window[o] <= window[o] + WW'(out_o) - WW'(arb_oh[o]);
      end
      req_valid  <= arb_valid;
      req_dest   <= arb_idx;
      cell_valid <= gnt_valid;
      cell_dest  <= gnt_out;
      cell_data  <= mem[int'(gnt_out) * VOQ_DEPTH + int'(head[gnt_out])];
    end
  end

  initial begin
    assert (VOQ_DEPTH >= 2 && (VOQ_DEPTH & (VOQ_DEPTH - 1)) == 0)
      else $error("linecard: VOQ_DEPTH must be a power of two");
  end

  always_ff @(posedge clk) begin
    if (rst_n && gnt_valid)
      assert (count[gnt_out] != '0) else $error("linecard: grant for an empty VOQ");
  end

endmodule
