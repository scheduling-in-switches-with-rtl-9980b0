// tb_link_delay -- self-checking test of the propagation-delay line.
// Random words go in every cell time; each must come out exactly DELAY cell
// times later, valid bits included.
module tb_link_delay;
  localparam int DELAY = 3, W = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [W-1:0] in_data, out_data;
  logic hv [$];
  logic [W-1:0] hd [$];
  int checks = 0, failures = 0;

  link_delay #(.DELAY(DELAY), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < DELAY; k++) begin hv.push_back(1'b0); hd.push_back('0); end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 2) == 1;
      in_data  = W'($urandom);
      hv.push_back(in_valid);
      hd.push_back(in_data);
      #1;
      begin
        logic ev; logic [W-1:0] ed;
        ev = hv.pop_front();
        ed = hd.pop_front();
        checks++;
        if (out_valid !== ev || (ev && out_data !== ed)) begin
          failures++;
          $display("t=%0d got %0d/%h exp %0d/%h", t, out_valid, out_data, ev, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
