// crossbar -- the switch's data path, with an output speed-up of S cells.
//
// Each input delivers at most one cell per cell time, tagged with its output.
// Because the schedulers let up to Q inputs send to the same output at once,
// every output has S write lanes into its queue rather than one. For output o,
// lane 0 carries the cell of the lowest-numbered input sending to o, lane 1 the
// next, and so on, so the queue sees its arrivals packed from lane 0 upward.
// A column with more senders than lanes would lose cells; the credit protocol
// rules it out (S >= Q), and `overflow` flags it should it ever happen.
//
// Purely combinational: per output a prefix count ranks the senders and each
// lane selects its input by index. That inputs are served in index order within a cell
// time is this design's choice; the scheme only requires that all of them get
// in.
module crossbar
  import sbs_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned S      = Q_DEF,
  parameter int unsigned CELL_W = CELL_W_DEF
) (
  input  logic                 in_valid [N],
  input  logic [$clog2(N)-1:0] in_dest  [N],
  input  logic [CELL_W-1:0]    in_data  [N],
  output logic [S-1:0]         lane_valid [N],
  output logic [CELL_W-1:0]    lane_data  [N][S],
  output logic [N-1:0]         overflow
);
  localparam int unsigned IW = $clog2(N);

  localparam int unsigned CW = $clog2(N + 1);

  // For output o: hit[i] marks the inputs sending to o, rank[i] counts the
  // hits below input i, and lane k takes the input whose rank is k.
  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0]  hit;
    logic [CW-1:0] rank [N];
    logic [CW-1:0] total;
    logic [IW-1:0] src  [S];

    always_comb begin
      total = '0;
      for (int i = 0; i < N; i++) begin
        hit[i]  = in_valid[i] && in_dest[i] == IW'(o);
        rank[i] = total;
        total   = total + CW'(hit[i]);
      end
      for (int k = 0; k < S; k++) begin
        lane_valid[o][k] = 1'b0;
        src[k]           = '0;
        for (int i = 0; i < N; i++)
          if (hit[i] && rank[i] == CW'(k)) begin
            lane_valid[o][k] = 1'b1;
            src[k]           = IW'(i);
          end
        lane_data[o][k] = in_data[src[k]];
      end
    end

    assign overflow[o] = int'(total) > S;
  end

endmodule
