// switch_core -- the switch chip: N credit schedulers, N grant schedulers,
// the crossbar and N small output queues.
//
// Request path: a request from input i for output o increments request
// counter i of credit scheduler o. Each credit scheduler grants, round-robin,
// inputs with waiting requests while it holds credits for its output queue
// (Q of them). Each grant lands in the grant queue (a counter) of the input's
// grant scheduler, which independently accepts one pending grant per cell time
// and sends it out to the line card. The two scheduler stages never consult each
// other: several inputs may be granted the same output at once, and the output
// queue, fed through a crossbar with an output speed-up of Q, absorbs the
// conflict. The accepted grant doubles as the credit return to the credit
// scheduler of that output, on this chip, so the credit loop does not include
// the line-card propagation delay.
//
// Interface: per input a request port (req_*), a grant port (gnt_*) and a cell
// port (cell_*); per output a cell stream (out_*). Status outputs expose the
// events the design is built around. Timing follows the sub-blocks: a request
// counted at edge t can be granted in cell time t and accepted at edge t+2
// (SD = 2). Everything resets to empty with all credits at the credit
// schedulers.
module switch_core
  import sbs_pkg::*;
#(
  parameter int unsigned N        = N_DEF,
  parameter int unsigned Q        = Q_DEF,
  parameter int unsigned R        = R_DEF,
  parameter int unsigned SD       = SD_DEF,
  parameter int unsigned CELL_W   = CELL_W_DEF,
  parameter int unsigned OQ_DEPTH = Q,
  parameter int unsigned REQ_MAX  = VOQ_DEPTH_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the line cards
  input  logic                 req_valid [N],
  input  logic [$clog2(N)-1:0] req_dest  [N],
  // grants to the line cards
  output logic                 gnt_valid [N],
  output logic [$clog2(N)-1:0] gnt_out   [N],
  // cells from the line cards
  input  logic                 cell_valid [N],
  input  logic [$clog2(N)-1:0] cell_dest  [N],
  input  logic [CELL_W-1:0]    cell_data  [N],
  // output links
  output logic                 out_valid [N],
  output logic [CELL_W-1:0]    out_data  [N],
  // status, one bit per port
  output logic [N-1:0]         cs_starved,   // output: requests wait, no credit
  output logic [N-1:0]         gs_waiting,   // input: a grant stays pending
  output logic [N-1:0]         oq_bypass,    // output: last cell cut through
  output logic [N-1:0]         oq_multi,     // output: several cells arrive this cell time
  output logic [N-1:0]         oq_overflow,  // output: buffer or crossbar overflow
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_occupancy [N]
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0] cs_req [N];   // [output][input]
  logic [N-1:0] cs_gnt [N];   // [output][input]
  logic [N-1:0] cs_ack [N];   // [output][input]
  logic [N-1:0] gs_gnt [N];   // [input][output]
  logic [N-1:0] gs_ack [N];   // [input][output]

  always_comb begin
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++) begin
        cs_req[o][i] = req_valid[i] && req_dest[i] == IW'(o);
        gs_gnt[i][o] = cs_gnt[o][i];
        cs_ack[o][i] = gs_ack[i][o];
      end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    credit_scheduler #(.N(N), .Q(Q), .R(R), .REQ_MAX(REQ_MAX)) u_cs (
      .clk     (clk),
      .rst_n   (rst_n),
      .req_in  (cs_req[o]),
      .ack_in  (cs_ack[o]),
      .gnt_out (cs_gnt[o]),
      .credits (),
      .starved (cs_starved[o])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    grant_scheduler #(.N(N), .Q(Q), .SD(SD)) u_gs (
      .clk       (clk),
      .rst_n     (rst_n),
      .gnt_in    (gs_gnt[i]),
      .sel_valid (gnt_valid[i]),
      .sel_out   (gnt_out[i]),
      .ack_out   (gs_ack[i]),
      .waiting   (gs_waiting[i])
    );
  end

  logic [Q-1:0]      lane_valid [N];
  logic [CELL_W-1:0] lane_data  [N][Q];
  logic [N-1:0]      xb_overflow;

  crossbar #(.N(N), .S(Q), .CELL_W(CELL_W)) u_xbar (
    .in_valid   (cell_valid),
    .in_dest    (cell_dest),
    .in_data    (cell_data),
    .lane_valid (lane_valid),
    .lane_data  (lane_data),
    .overflow   (xb_overflow)
  );

  for (genvar o = 0; o < N; o++) begin : g_oq
    logic q_overflow;
    output_queue #(.S(Q), .DEPTH(OQ_DEPTH), .CELL_W(CELL_W)) u_oq (
      .clk        (clk),
      .rst_n      (rst_n),
      .lane_valid (lane_valid[o]),
      .lane_data  (lane_data[o]),
      .out_valid  (out_valid[o]),
      .out_data   (out_data[o]),
      .occupancy  (oq_occupancy[o]),
      .bypass     (oq_bypass[o]),
      .overflow   (q_overflow)
    );
    assign oq_multi[o]    = $countones(lane_valid[o]) > 1;
    assign oq_overflow[o] = q_overflow || xb_overflow[o];
  end

endmodule
