// rr_arbiter -- round-robin arbiter, the "RR" scheduler used throughout the switch.
//
// Each cell time it picks one of the N requesters, searching from a rotating
// pointer. The pick is combinational from req and the pointer. When the caller
// raises `accept`, the choice has been used and the pointer moves to the entry
// just after the winner, so the winner has lowest priority next time (the
// classic iSLIP-style update). Without `accept` the pointer stays put, so an
// unused choice is offered again. Round-robin order is what the design uses for
// all its schedulers; the exact pointer-update rule is this design's choice.
//
// Interface: req[N] in, valid/idx/onehot out (combinational), accept in.
// Timing: the pointer updates on the clock edge; reset sets it to 0.
module rr_arbiter
  import sbs_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 accept,
  output logic                 valid,
  output logic [$clog2(N)-1:0] idx,
  output logic [N-1:0]         onehot
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;
  logic [IW:0]   res;

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
    res    = rr_first(req, ptr);
    valid  = res[IW];
    idx    = res[IW-1:0];
    onehot = valid ? (N'(1) << idx) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (accept && valid) ptr <= (int'(idx) == N - 1) ? '0 : idx + 1'b1;
  end

  initial begin
    assert (N >= 2) else $error("rr_arbiter: N out of range");
  end

endmodule
