// sbs_system -- a complete N x N switch with small output queues: N input line
// cards, the lines joining them to the switch chip, and the chip itself.
//
// A cell entering input i for output o waits in the line card's VOQ o. The
// line card asks output o's credit scheduler for a credit (a request), the
// credit scheduler grants it when a slot of output o's Q-cell queue is free,
// input i's grant scheduler accepts that grant (one per cell time among all
// outputs that granted i) and the line card sends the cell, which enters the
// output queue and leaves on the output link. All schedulers are independent
// round-robin schedulers working in a two-stage pipeline; conflicts between
// them are absorbed by the output queues, which accept several cells per cell
// time. Credits are returned on the chip when a grant is accepted, so the
// output queues stay Q cells deep whatever the line delay P.
//
// Interface: per input a valid/ready cell port (in_*), per output a cell
// stream (out_*), and status bits that show the scheduling events. One clock
// is one cell time. Parameters: N ports, Q credits per output, R grants per
// cell time per credit scheduler, SD scheduler latency (1 or 2), P line delay
// in cell times, plus cell width, VOQ depth, output-buffer depth and the
// request window REQ_MAX. The window must cover at least one request/grant
// round trip, req_window(P, SD); by default it equals the VOQ depth, so a line
// card may have a request outstanding for every cell it holds.
module sbs_system
  import sbs_pkg::*;
#(
  parameter int unsigned N         = N_DEF,
  parameter int unsigned Q         = Q_DEF,
  parameter int unsigned R         = R_DEF,
  parameter int unsigned SD        = SD_DEF,
  parameter int unsigned P         = P_DEF,
  parameter int unsigned CELL_W    = CELL_W_DEF,
  parameter int unsigned VOQ_DEPTH = VOQ_DEPTH_DEF,
  parameter int unsigned OQ_DEPTH  = Q,
  parameter int unsigned REQ_MAX   = VOQ_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid [N],
  input  logic [$clog2(N)-1:0] in_dest  [N],
  input  logic [CELL_W-1:0]    in_cell  [N],
  output logic                 in_ready [N],
  output logic                 out_valid [N],
  output logic [CELL_W-1:0]    out_data  [N],
  output logic [N-1:0]         lc_win_stall,
  output logic [N-1:0]         cs_starved,
  output logic [N-1:0]         gs_waiting,
  output logic [N-1:0]         oq_bypass,
  output logic [N-1:0]         oq_multi,
  output logic [N-1:0]         oq_overflow,
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_occupancy [N]
);
  localparam int unsigned IW = $clog2(N);

  initial begin
    assert (REQ_MAX >= req_window(P, SD))
      else $error("sbs_system: request window shorter than the request/grant round trip");
  end

  // line card side
  logic                 lc_req_v  [N];
  logic [IW-1:0]        lc_req_d  [N];
  logic                 lc_gnt_v  [N];
  logic [IW-1:0]        lc_gnt_o  [N];
  logic                 lc_cell_v [N];
  logic [IW-1:0]        lc_cell_d [N];
  logic [CELL_W-1:0]    lc_cell_x [N];
  // switch side
  logic                 sw_req_v  [N];
  logic [IW-1:0]        sw_req_d  [N];
  logic                 sw_gnt_v  [N];
  logic [IW-1:0]        sw_gnt_o  [N];
  logic                 sw_cell_v [N];
  logic [IW-1:0]        sw_cell_d [N];
  logic [CELL_W-1:0]    sw_cell_x [N];

  for (genvar i = 0; i < N; i++) begin : g_port
    linecard #(.N(N), .CELL_W(CELL_W), .VOQ_DEPTH(VOQ_DEPTH), .REQ_MAX(REQ_MAX)) u_lc (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid[i]),
      .in_dest    (in_dest[i]),
      .in_cell    (in_cell[i]),
      .in_ready   (in_ready[i]),
      .req_valid  (lc_req_v[i]),
      .req_dest   (lc_req_d[i]),
      .gnt_valid  (lc_gnt_v[i]),
      .gnt_out    (lc_gnt_o[i]),
      .cell_valid (lc_cell_v[i]),
      .cell_dest  (lc_cell_d[i]),
      .cell_data  (lc_cell_x[i]),
      .win_stall  (lc_win_stall[i])
    );

    link_delay #(.DELAY(P), .W(IW)) u_req_line (
      .clk (clk), .rst_n (rst_n),
      .in_valid  (lc_req_v[i]), .in_data  (lc_req_d[i]),
      .out_valid (sw_req_v[i]), .out_data (sw_req_d[i])
    );

    link_delay #(.DELAY(P), .W(IW)) u_gnt_line (
      .clk (clk), .rst_n (rst_n),
      .in_valid  (sw_gnt_v[i]), .in_data  (sw_gnt_o[i]),
      .out_valid (lc_gnt_v[i]), .out_data (lc_gnt_o[i])
    );

    link_delay #(.DELAY(P), .W(IW + CELL_W)) u_cell_line (
      .clk (clk), .rst_n (rst_n),
      .in_valid  (lc_cell_v[i]), .in_data  ({lc_cell_d[i], lc_cell_x[i]}),
      .out_valid (sw_cell_v[i]), .out_data ({sw_cell_d[i], sw_cell_x[i]})
    );
  end

  switch_core #(
    .N(N), .Q(Q), .R(R), .SD(SD), .CELL_W(CELL_W), .OQ_DEPTH(OQ_DEPTH), .REQ_MAX(REQ_MAX)
  ) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_valid    (sw_req_v),
    .req_dest     (sw_req_d),
    .gnt_valid    (sw_gnt_v),
    .gnt_out      (sw_gnt_o),
    .cell_valid   (sw_cell_v),
    .cell_dest    (sw_cell_d),
    .cell_data    (sw_cell_x),
    .out_valid    (out_valid),
    .out_data     (out_data),
    .cs_starved   (cs_starved),
    .gs_waiting   (gs_waiting),
    .oq_bypass    (oq_bypass),
    .oq_multi     (oq_multi),
    .oq_overflow  (oq_overflow),
    .oq_occupancy (oq_occupancy)
  );

endmodule
