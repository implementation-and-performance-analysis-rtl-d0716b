// tb_ss_rr_block: random requests against a reference round-robin pointer.
// The expected winner is the first requester after the last master that
// was granted with `load` high.
`timescale 1ns/1ps
module tb_ss_rr_block;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req;
  logic         load;
  logic [1:0]   idx;
  logic         valid;

  ss_rr_block #(.NUM_MASTERS(N)) dut (.*);

  int checks = 0, failures = 0;
  int last = N - 1;
  int grants [N] = '{0, 0, 0, 0};

  initial begin
    req = '0; load = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int e;
      @(negedge clk);
      req  = (i < 400) ? 4'hF : 4'($urandom);
      load = (i < 400) ? 1'b1 : 1'($urandom);
      #1;
      e = -1;
      for (int k = 1; k <= N; k++)
        if (e < 0 && req[(last + k) % N]) e = (last + k) % N;
      checks++;
      if (valid != (req != 0) || (valid && int'(idx) != e)) begin
        failures++;
        $display("FAIL %0d: req=%b last=%0d got %0d/%0d exp %0d", i, req, last, idx, valid, e);
      end
      @(posedge clk);
      if (load && e >= 0) begin
        last = e;
        grants[e]++;
      end
    end
    // with all four requesting and loading, grants are shared evenly
    for (int m = 0; m < N; m++) begin
      checks++;
      if (grants[m] < 100) begin
        failures++;
        $display("FAIL: master %0d got %0d grants", m, grants[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
