// tb_crossbar -- self-checking test of the crossbar with output speed-up.
// Random cells with random destinations enter all inputs at once; for every
// output the expected lanes are the cells addressed to it in input order,
// packed from lane 0, and the overflow flag must be raised exactly when more
// than S inputs address the same output.
module tb_crossbar;
  localparam int N = 6, S = 3, W = 16;
  logic in_valid [N];
  logic [$clog2(N)-1:0] in_dest [N];
  logic [W-1:0] in_data [N];
  logic [S-1:0] lane_valid [N];
  logic [W-1:0] lane_data [N][S];
  logic [N-1:0] overflow;
  int checks = 0, failures = 0, ovf_seen = 0;

  crossbar #(.N(N), .S(S), .CELL_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom % 3) != 0;
        in_dest[i]  = $clog2(N)'($urandom % ((t % 2) ? N : 2));
        in_data[i]  = W'($urandom);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        int k;
        k = 0;
        for (int i = 0; i < N; i++)
          if (in_valid[i] && in_dest[i] == o) begin
            if (k < S) begin
              checks++;
              if (!lane_valid[o][k] || lane_data[o][k] !== in_data[i]) begin
                failures++;
                $display("out %0d lane %0d wrong", o, k);
              end
            end
            k++;
          end
        for (int s = k; s < S; s++) begin
          checks++;
          if (lane_valid[o][s]) begin failures++; $display("out %0d lane %0d spurious", o, s); end
        end
        checks++;
        if (overflow[o] !== (k > S)) begin failures++; $display("out %0d overflow flag", o); end
        if (k > S) ovf_seen++;
      end
      #1;
    end
    checks++;
    if (ovf_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
