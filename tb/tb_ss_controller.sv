// tb_ss_controller: directed walk through every rule of the controller:
// No-Port after reset and with no requests, first choice by round robin
// (equal levels) and by priority, counting down of the transfer length,
// handover at the edge that accepts the last allotted transfer, no change
// while HREADY is low, HMASTLOCK keeping the owner past expiry, the lone
// owner kept with a reloaded counter, and release on an early end of the
// owner's requests (No-Port, or a new choice when others wait).
`timescale 1ns/1ps
module tb_ss_controller;
  import ahb_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]     req, lock;
  logic [CNT_W-1:0] len [N];
  logic             equal, hready;
  logic [1:0]       rr_idx, p_idx, sel;
  logic             no_port, rr_load, xfer, rearb;
  logic [CNT_W-1:0] count;

  ss_controller #(.NUM_MASTERS(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_state(bit np, int s, int c, string what);
    checks++;
    if (no_port != np || (!np && (int'(sel) != s || int'(count) != c))) begin
      failures++;
      $display("FAIL %s: no_port=%0d sel=%0d count=%0d, expected %0d/%0d/%0d",
               what, no_port, sel, count, np, s, c);
    end
  endtask

  // drive inputs after the edge, look at the state just before the next
  task automatic step(logic [N-1:0] r, logic rdy = 1'b1);
    @(negedge clk);
    req = r; hready = rdy;
    @(posedge clk); #1;
  endtask

  initial begin
    req = '0; lock = '0; equal = 1'b1; hready = 1'b1; rr_idx = '0; p_idx = '0;
    len = '{CNT_W'(3), CNT_W'(2), CNT_W'(4), CNT_W'(1)};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 expect_state(1, 0, 0, "after reset");
    step('0);
    expect_state(1, 0, 0, "no request");

    // step 2b: equal levels -> round-robin result
    equal = 1'b1; rr_idx = 2'd1; p_idx = 2'd2;
    @(negedge clk); req = 4'b0110; #1;
    checks++; if (!rr_load) begin failures++; $display("FAIL rr_load"); end
    @(posedge clk); #1;
    expect_state(0, 1, 2, "RR choice loads len[1]");
    // step 3b: transfers count down; others wait, P result now
    equal = 1'b0;
    step(4'b0110);                       // transfer 1 of 2 accepted
    expect_state(0, 1, 1, "count down");
    step(4'b0110, 1'b0);                 // HREADY low: nothing moves
    expect_state(0, 1, 1, "hready low");
    // step 3a(ii): last allotted transfer accepted -> priority choice
    @(negedge clk); hready = 1'b1; #1;
    checks++; if (!xfer || !rearb || rr_load) begin failures++; $display("FAIL handover flags"); end
    @(posedge clk); #1;
    expect_state(0, 2, 4, "handover to P choice");

    // step 1: locked owner stays past its count
    lock[2] = 1'b1; p_idx = 2'd1;
    for (int i = 0; i < 6; i++) step(4'b0110);
    expect_state(0, 2, 0, "locked owner kept");
    lock[2] = 1'b0;
    // expired with others waiting: new choice
    step(4'b0110);
    expect_state(0, 1, 2, "after lock, new choice");

    // step 3c: owner stops before expiry, nobody else -> No-Port
    step(4'b0010);
    expect_state(0, 1, 1, "owner alone");
    @(negedge clk); req = 4'b0000; @(posedge clk); #1;
    expect_state(1, 0, 0, "early end, no others -> No-Port");

    // step 3a(i): lone owner keeps the port with a reloaded counter
    rr_idx = 2'd3; equal = 1'b1;
    step(4'b1000);
    expect_state(0, 3, 1, "choose master 3 (len 1)");
    step(4'b1000);
    expect_state(0, 3, 1, "lone owner reloaded");
    step(4'b1000);
    expect_state(0, 3, 1, "lone owner reloaded again");
    // step 3a(i): expired and owner gone -> No-Port
    @(negedge clk); req = 4'b0000; @(posedge clk); #1;
    expect_state(1, 0, 0, "expired, owner gone -> No-Port");

    // step 3c with others waiting: new choice
    rr_idx = 2'd0;
    step(4'b0001);
    expect_state(0, 0, 3, "choose master 0");
    rr_idx = 2'd2;
    step(4'b0100);
    expect_state(0, 2, 4, "early end with other waiting -> new choice");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
