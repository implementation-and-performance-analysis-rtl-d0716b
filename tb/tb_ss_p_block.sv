// tb_ss_p_block: random requests and priority levels; the winner must be
// the requester with the highest level (lowest number on a tie) and
// `equal` must tell whether all requesters share one level.
`timescale 1ns/1ps
module tb_ss_p_block;
  localparam int N = 4;
  logic [N-1:0] req;
  logic [2:0]   level [N];
  logic [1:0]   idx;
  logic         valid, equal;

  ss_p_block #(.NUM_MASTERS(N), .LEVEL_W(3)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int e, best;
      bit eq;
      req = 4'($urandom);
      for (int m = 0; m < N; m++) level[m] = (i % 3 == 0) ? 3'($urandom % 2) : 3'($urandom);
      #1;
      e = -1; best = -1; eq = 1;
      for (int m = 0; m < N; m++)
        if (req[m]) begin
          if (int'(level[m]) > best) begin best = int'(level[m]); e = m; end
        end
      // equal: compare every requester with every other
      eq = 1;
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++)
          if (req[m] && req[n] && level[m] != level[n]) eq = 0;
      checks++;
      if (valid != (req != 0) || (valid && int'(idx) != e) || equal != eq) begin
        failures++;
        $display("FAIL: req=%b lv=%0d,%0d,%0d,%0d got %0d v%0d eq%0d exp %0d eq%0d",
                 req, level[0], level[1], level[2], level[3], idx, valid, equal, e, eq);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
