// grant_scheduler -- the per-input grant scheduler, on the switch chip.
//
// Several credit schedulers may grant the same input in the same cell time.
// Every grant is counted in this input's grant queue for that output (a counter
// per output, since cells have fixed size). Each cell time the scheduler
// accepts at most one pending grant, chosen round-robin over the outputs, and
// sends it to the line card, which answers with a cell for that output. Grants
// not accepted stay pending until they are; this persistence is what lets the
// independent schedulers desynchronise, as in iSLIP.
//
// The accepted grant is also the credit return (ack_out, one-hot by output):
// once the grant leaves, the cell's departure from the output queue is
// committed, so the credit scheduler next to us may reuse the credit without
// waiting for the cell to cross the line twice.
//
// Timing: with SD = 2 (default) the choice is made over the registered grant
// counters, so a grant issued in cell time t can be accepted at the end of t+1:
// the credit and grant schedulers form a two-stage pipeline. With SD = 1 the
// grants arriving in the same cell time are visible to the choice as well.
// sel_valid/sel_out are registered; ack_out is combinational, in the cell time
// of the choice, so that a credit is back at its credit scheduler SD cell times
// after it was handed out. Synchronous active-low reset clears all counters.
module grant_scheduler
  import sbs_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned Q  = Q_DEF,
  parameter int unsigned SD = SD_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         gnt_in,     // grant from output o this cell time
  output logic                 sel_valid,  // grant sent to the line card
  output logic [$clog2(N)-1:0] sel_out,    // ... for this output
  output logic [N-1:0]         ack_out,    // credit return to output o
  output logic                 waiting     // last cell time a selectable grant was left pending
);
  localparam int unsigned GW = $clog2(Q + 1);
  localparam int unsigned IW = $clog2(N);

  logic [GW-1:0] gq [N];
  logic [N-1:0]  avail;
  logic          arb_valid;
  logic [IW-1:0] arb_idx;
  logic [N-1:0]  arb_oh;

  always_comb begin
    for (int o = 0; o < N; o++)
      avail[o] = (gq[o] != '0) || (SD == 1 && gnt_in[o]);
  end

  // a grant that could have been taken this cell time was not
  logic left_behind;
  always_comb begin
    left_behind = 1'b0;
    for (int o = 0; o < N; o++)
      if ((gq[o] + GW'(SD == 1 && gnt_in[o]) - GW'(arb_oh[o])) != '0) left_behind = 1'b1;
  end

  rr_arbiter #(.N(N)) u_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (avail),
    .accept (1'b1),
    .valid  (arb_valid),
    .idx    (arb_idx),
    .onehot (arb_oh)
  );

  // The credit goes back in the cell time of the choice, so a credit scheduler
  // can reuse it SD cell times after it handed it out.
  assign ack_out = arb_oh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) gq[o] <= '0;
      sel_valid <= 1'b0;
      sel_out   <= '0;
      waiting   <= 1'b0;
    end else begin
      for (int o = 0; o < N; o++)
        gq[o] <= gq[o] + GW'(gnt_in[o]) - GW'(arb_oh[o]);
      sel_valid <= arb_valid;
      sel_out   <= arb_idx;
      waiting   <= left_behind;
    end
  end

  // A credit scheduler never has more than Q grants outstanding, so no grant
  // counter can pass Q.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int o = 0; o < N; o++)
        assert (!(gnt_in[o] && !arb_oh[o] && gq[o] == GW'(Q)))
          else $error("grant_scheduler: grant counter overflow");
  end

endmodule
