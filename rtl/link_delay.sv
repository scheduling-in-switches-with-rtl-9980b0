// link_delay -- the line between a line card and the switch chip.
//
// Requests and grants travel over it in one direction each, cells towards the
// switch. It delays a valid-qualified word by DELAY cell times (the
// propagation delay P of the design), as a shift register; DELAY = 0 is a
// plain wire. Nothing is lost or reordered. The switch is built so that the
// size of its output queues does not depend on DELAY: credits are returned
// on the switch chip when a grant is accepted, before the grant and the cell
// make their trips over this line.
//
// Timing: in_* presented in cell time t appear on out_* in cell time t+DELAY.
// Reset clears the valid bits in flight.
module link_delay
  import sbs_pkg::*;
#(
  parameter int unsigned DELAY = 1,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DELAY == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_pipe
    logic         v [DELAY];
    logic [W-1:0] d [DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < DELAY; k++) begin
          v[k] <= 1'b0;
          d[k] <= '0;
        end
      end else begin
        v[0] <= in_valid;
        d[0] <= in_data;
        for (int k = 1; k < DELAY; k++) begin
          v[k] <= v[k-1];
          d[k] <= d[k-1];
        end
      end
    end
    assign out_valid = v[DELAY-1];
    assign out_data  = d[DELAY-1];
  end

endmodule
