// output_queue -- the small buffer in front of one switch output.
//
// Up to S cells may arrive in one cell time (packed from lane 0, see crossbar)
// and one cell leaves per cell time at line rate. The queue is a circular
// buffer of DEPTH cells with S write ports. Departure is cut-through: when the
// buffer is empty, the first arriving cell bypasses it and leaves in the same
// cell time, and only the others are stored; in the next cell time a stored
// cell leaves while a new arrival takes its place. This is what lets an output
// run with fewer buffer cells than pending grants (for example Q = 2 with a
// one-cell buffer).
//
// The credit scheduler of this output hands out no more credits than the
// buffer can absorb, so the queue never overflows; an assertion checks it and
// `overflow` reports it. The buffer is sized DEPTH = Q by default (12 cells),
// the buffer count the design is evaluated with.
//
// Timing: arrivals are taken at the clock edge; out_valid/out_data are
// registered, so a bypassing cell appears one clock after it arrived.
// Reset empties the queue.
module output_queue
  import sbs_pkg::*;
#(
  parameter int unsigned S      = Q_DEF,
  parameter int unsigned DEPTH  = Q_DEF,
  parameter int unsigned CELL_W = CELL_W_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [S-1:0]            lane_valid,
  input  logic [CELL_W-1:0]       lane_data [S],
  output logic                    out_valid,
  output logic [CELL_W-1:0]       out_data,
  output logic [$clog2(DEPTH+1)-1:0] occupancy,
  output logic                    bypass,     // last departure cut through an empty buffer
  output logic                    overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CELL_W-1:0] mem [DEPTH];
  logic [AW-1:0]     head;
  logic [CW-1:0]     cnt;
  int unsigned       nin;
  int unsigned       first_store;   // first lane that is written into the buffer
  logic              dep;
  logic              dep_bypass;
  logic [CELL_W-1:0] dep_data;

  function automatic logic [AW-1:0] wrap(input int unsigned a);
    return AW'(a % DEPTH);
  endfunction

  always_comb begin
    nin = 0;
    for (int s = 0; s < S; s++) nin = nin + int'(lane_valid[s]);
    if (cnt != '0) begin
      dep         = 1'b1;
      dep_bypass  = 1'b0;
      dep_data    = mem[head];
      first_store = 0;
    end else if (nin != 0) begin
      dep         = 1'b1;
      dep_bypass  = 1'b1;
      dep_data    = lane_data[0];
      first_store = 1;
    end else begin
      dep         = 1'b0;
      dep_bypass  = 1'b0;
      dep_data    = '0;
      first_store = 0;
    end
  end

  assign occupancy = cnt;
  assign overflow  = (int'(cnt) + nin - int'(dep)) > DEPTH;

  // free slots this cell time; the head slot counts when its cell leaves now
  int unsigned room;
  assign room = DEPTH - int'(cnt) + int'(dep && !dep_bypass);

  always_ff @(posedge clk) begin
    for (int s = 0; s < S; s++)
      if (lane_valid[s] && s >= first_store && (s - first_store) < room)
        mem[wrap(int'(head) + int'(cnt) + s - first_store)] <= lane_data[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head      <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      bypass    <= 1'b0;
    end else begin
      if (dep && !dep_bypass) head <= wrap(int'(head) + 1);
      cnt       <= overflow ? CW'(DEPTH) : CW'(int'(cnt) + nin - int'(dep));
      out_valid <= dep;
      out_data  <= dep_data;
      bypass    <= dep_bypass;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!overflow) else $error("output_queue: buffer overflow");
  end

endmodule
