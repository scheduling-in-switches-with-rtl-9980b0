// tb_rr_arbiter -- self-checking test of the round-robin arbiter.
// Random request vectors and random accepts; a reference pointer kept here
// predicts the winner (first request at or after the pointer, wrapping) and
// the pointer move (one past the winner, only on accept).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic accept, valid;
  logic [$clog2(N)-1:0] idx;
  logic [N-1:0] onehot;
  int checks = 0, failures = 0;
  int ref_ptr, exp_idx;
  logic exp_valid;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; accept = 0; ref_ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req    = N'($urandom);
      if (t % 7 == 0) req = '0;
      accept = ($urandom % 4) != 0;
      #1;
      exp_valid = 1'b0;
      exp_idx   = 0;
      for (int k = 0; k < N; k++)
        if (!exp_valid && req[(ref_ptr + k) % N]) begin
          exp_valid = 1'b1;
          exp_idx   = (ref_ptr + k) % N;
        end
      checks++;
      if (valid !== exp_valid || (exp_valid && (idx != exp_idx || onehot != N'(1) << exp_idx))
          || (!exp_valid && onehot != '0)) begin
        failures++;
        $display("t=%0d req=%b ptr=%0d got v=%0d i=%0d oh=%b exp v=%0d i=%0d",
                 t, req, ref_ptr, valid, idx, onehot, exp_valid, exp_idx);
      end
      @(posedge clk);
      if (accept && exp_valid) ref_ptr = (exp_idx + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
