// tb_ss_arbiter: the nine arbitration schemes of one slave port.
//
// The four masters keep requesting (an always-ready slave accepts a transfer
// every cycle) and the owner of every accepted transfer is compared with the
// sequence the scheme implies, worked out by hand:
//   FIXED   master 0 highest, so among {1,2,3} master 1 keeps the port;
//   RR      equal levels, the port rotates 0,1,2,3 with grants of
//           1 (transfer), HBURST beats (transaction) or T_Length+1 (desired);
//   DYNAMIC P_Level decides; equal P_Levels fall back to round robin.
// The first transfer must be accepted two cycles after the requests appear
// (one cycle to choose, then the transfer), and the scheme is also changed
// without a reset.
`timescale 1ns/1ps
module tb_ss_arbiter;
  import ahb_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arb_cfg_t         cfg;
  logic [N-1:0]     req;
  ahb_req_t         mreq [N];
  logic             hready;
  logic [1:0]       sel;
  logic             no_port, xfer, rearb, rr_used;
  logic [CNT_W-1:0] count;

  ss_arbiter #(.NUM_MASTERS(N)) dut (.*);

  int checks = 0, failures = 0;
  int got[$];

  always @(posedge clk) if (xfer) got.push_back(int'(sel));

  function automatic arb_cfg_t mkcfg(arb_policy_e p, len_mode_e l);
    arb_cfg_t c; c.policy = p; c.len_mode = l; return c;
  endfunction

  task automatic setm(int m, int lvl, int tl, hburst_e b);
    mreq[m] = '0;
    mreq[m].haddr.p_level  = 3'(lvl);
    mreq[m].haddr.t_length = 4'(tl);
    mreq[m].htrans = HTRANS_SEQ;
    mreq[m].hburst = b;
  endtask

  task automatic run(string name, arb_cfg_t c, logic [N-1:0] r, int exp[], bit do_reset = 1);
    int wait_cycles;
    @(negedge clk);
    if (do_reset) begin
      rst_n = 1'b0; #1; rst_n = 1'b1;
    end
    cfg = c; req = '0;
    @(posedge clk); #1;
    got.delete();
    @(negedge clk);
    req = r;
    wait_cycles = 0;
    while (got.size() == 0) begin @(posedge clk); #1; wait_cycles++; end
    if (do_reset) begin
      checks++;
      if (wait_cycles != 2) begin
        failures++; $display("FAIL %s: first transfer after %0d cycles", name, wait_cycles);
      end
    end
    while (got.size() < exp.size()) @(posedge clk);
    #1;
    for (int i = 0; i < exp.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        $display("FAIL %s: transfer %0d by m%0d, expected m%0d", name, i, got[i], exp[i]);
      end
    end
  endtask

  initial begin
    hready = 1'b1; req = '0; cfg = mkcfg(POL_RR, LEN_TRANSFER);
    for (int m = 0; m < N; m++) setm(m, 0, 0, HBURST_INCR4);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // round robin
    run("RT", mkcfg(POL_RR, LEN_TRANSFER), 4'hF, '{0,1,2,3,0,1,2,3,0});
    run("RR", mkcfg(POL_RR, LEN_TRANSACTION), 4'hF, '{0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,0});
    for (int m = 0; m < N; m++) setm(m, 0, m, HBURST_INCR4);
    run("RL", mkcfg(POL_RR, LEN_DESIRED), 4'hF, '{0,1,1,2,2,2,3,3,3,3,0,1});

    // fixed priority: master 1 is the highest of {1,2,3}
    run("FT", mkcfg(POL_FIXED, LEN_TRANSFER),    4'hE, '{1,1,1,1,1,1});
    run("FR", mkcfg(POL_FIXED, LEN_TRANSACTION), 4'hE, '{1,1,1,1,1,1});
    run("FL", mkcfg(POL_FIXED, LEN_DESIRED),     4'hC, '{2,2,2,2,2,2});

    // dynamic priority from P_Level
    setm(0, 2, 0, HBURST_INCR8); setm(1, 1, 1, HBURST_INCR8);
    setm(2, 6, 2, HBURST_INCR8); setm(3, 4, 3, HBURST_INCR8);
    run("DT", mkcfg(POL_DYNAMIC, LEN_TRANSFER),    4'hF, '{2,2,2,2,2});
    run("DR", mkcfg(POL_DYNAMIC, LEN_TRANSACTION), 4'hB, '{3,3,3,3,3,3,3,3,3,3});
    for (int m = 0; m < N; m++) setm(m, 5, 1, HBURST_INCR8);
    run("DL", mkcfg(POL_DYNAMIC, LEN_DESIRED),     4'hF, '{0,0,1,1,2,2,3,3,0});

    // scheme change at run time, no reset: RR per transaction -> RR per transfer
    for (int m = 0; m < N; m++) setm(m, 0, 0, HBURST_INCR4);
    run("RR again", mkcfg(POL_RR, LEN_TRANSACTION), 4'h3, '{0,0,0,0,1,1,1,1});
    run("switch to RT", mkcfg(POL_RR, LEN_TRANSFER), 4'h3, '{1,0,1,0,1,0}, 1'b0);

    // HREADY low holds the owner and the counter
    @(negedge clk); hready = 1'b0;
    begin
      logic [1:0] s0; logic [CNT_W-1:0] c0;
      s0 = sel; c0 = count;
      repeat (4) @(posedge clk);
      #1;
      checks++;
      if (sel != s0 || count != c0 || xfer) begin
        failures++; $display("FAIL: moved while HREADY low");
      end
    end
    hready = 1'b1;

    // nobody requests: No-Port
    @(negedge clk); req = '0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (!no_port) begin failures++; $display("FAIL: No-Port not asserted"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
