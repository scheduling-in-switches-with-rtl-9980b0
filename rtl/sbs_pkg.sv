// sbs_pkg -- constants and helpers shared by the small-output-buffer switch.
//
// The switch is scheduled in cell times: every module advances one cell time
// per clock edge. The defaults below are the configuration the design is built
// around: a 32x32 switch (N), 12 credits and 12 cell buffers per output (Q),
// a two-stage credit/grant scheduler pipeline (SD = 2), credit schedulers that
// hand out one credit per cell time (R = 1) and no propagation delay between
// the line cards and the switch (P = 0). Cell width and VOQ depth are this
// design's own choices; the scheduling scheme does not depend on them.
//
// req_window() gives the request window each line card holds per output.
package sbs_pkg;

  localparam int unsigned N_DEF         = 32;  // switch ports
  localparam int unsigned Q_DEF         = 12;  // credits (pending grants) per output
  localparam int unsigned SD_DEF        = 2;   // scheduling latency, cell times (1 or 2)
  localparam int unsigned R_DEF         = 1;   // grants per cell time per credit scheduler
  localparam int unsigned P_DEF         = 0;   // line card <-> switch propagation delay, cell times
  localparam int unsigned CELL_W_DEF    = 64;  // bits carried per cell
  localparam int unsigned VOQ_DEPTH_DEF = 64;  // cells per virtual output queue

  // Round-trip window of requests a line card may have outstanding per output:
  // one round trip of the request -> grant -> request loop, 2*P + SD + 2 cell
  // times in this pipeline (the +2 are the line card's own request register and
  // the cell time it takes to turn a grant into a new request).
  function automatic int unsigned req_window(input int unsigned p, input int unsigned sd);
    return 2 * p + sd + 2;
  endfunction

endpackage
