// tb_ss_ahb_system: end-to-end test of the SS-arbitrated AHB system at its
// default size (4 masters, 8 memory slaves of 256 words).
//
// For each of the nine arbitration schemes the four masters start write
// bursts to one shared slave in the same cycle, each into its own region,
// and then read them back.  A shadow memory in the testbench checks every
// read word.  The order in which the masters finish is checked against the
// scheme (fixed: master 0 first; round robin: 0,1,2,3; dynamic: by the
// P_Level each master sends), and the interleaving of transfers at the slave
// against the length mode (none inside a burst for transaction grants, some
// for transfer and desired-length grants).  Further phases check the
// latency of an uncontended burst (burst length + 3 cycles), parallel
// bursts to different slaves, a locked burst under per-transfer grants, an
// ERROR response, and a change of scheme while traffic runs.  Mechanism
// counters (stall, round-robin and priority decisions, No-Port, lock, error,
// mid-burst handover, scheme change) must all be non-zero at the end.
`timescale 1ns/1ps
module tb_ss_ahb_system;
  import ahb_pkg::*;

  localparam int NM = 4, NS = 8, MW = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arb_cfg_t          cfg       [NS];
  logic              cmd_valid [NM];
  logic              cmd_ready [NM];
  ss_cmd_t           cmd       [NM];
  logic [3:0]        wbeat     [NM];
  logic [DATA_W-1:0] wdata     [NM];
  logic              rd_valid  [NM];
  logic [3:0]        rd_beat   [NM];
  logic [DATA_W-1:0] rd_data   [NM];
  logic              done      [NM];
  logic              done_err  [NM];
  logic              m_held    [NM];
  logic              no_port   [NS];
  logic [1:0]        hmaster   [NS];
  logic              rearb     [NS];
  logic              rr_used   [NS];
  logic              s_active  [NS];
  logic [CNT_W-1:0]  grant_left[NS];

  ss_ahb_system dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------------
  // data: write data is a function of master, slave, offset and beat
  function automatic logic [31:0] pattern(int m, ss_cmd_t c, int beat, int tag);
    return {8'(tag), 4'(m), 4'(c.addr.s_number), 12'(c.addr.offset[13:2]), 4'(beat)};
  endfunction

  ss_cmd_t cur [NM];
  int      tagv [NM];
  logic [31:0] shadow [NS][MW];

  always_comb
    for (int m = 0; m < NM; m++)
      wdata[m] = pattern(m, cur[m], int'(wbeat[m]), tagv[m]);

  int rd_words = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) begin
      if (rd_valid[m]) begin
        int w;
        w = int'(cur[m].addr.offset[21:2]) + int'(rd_beat[m]);
        check(rd_data[m] == shadow[cur[m].addr.s_number][w],
              $sformatf("m%0d read s%0d w%0d got %h exp %h", m,
                        cur[m].addr.s_number, w, rd_data[m],
                        shadow[cur[m].addr.s_number][w]));
        rd_words++;
      end
      if (done[m] && !done_err[m] && cur[m].write)
        for (int b = 0; b < int'(burst_beats(cur[m].hburst)); b++)
          shadow[cur[m].addr.s_number][int'(cur[m].addr.offset[21:2]) + b]
            = pattern(m, cur[m], b, tagv[m]);
    end
  end

  // ------------------------------------------------------------------
  // mechanism counters
  int n_stall = 0, n_rr = 0, n_prio = 0, n_noport = 0, n_lock = 0;
  int n_err = 0, n_handover = 0, n_switch = 0;
  bit seen_owner [NS];
  int last_m [NS];
  int left_m [NM];              // transfers left in each master's burst
  int interleave [NS];

  initial for (int s = 0; s < NS; s++) begin
    seen_owner[s] = 0; last_m[s] = -1; interleave[s] = 0;
  end
  initial for (int m = 0; m < NM; m++) left_m[m] = 0;

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) if (m_held[m]) n_stall++;
    for (int s = 0; s < NS; s++) begin
      if (rearb[s] && rr_used[s])  n_rr++;
      if (rearb[s] && !rr_used[s]) n_prio++;
      if (no_port[s] && seen_owner[s]) n_noport++;
      if (!no_port[s]) seen_owner[s] = 1;
      if (s_active[s]) begin
        int o;
        o = int'(hmaster[s]);
        if (last_m[s] >= 0 && last_m[s] != o && left_m[last_m[s]] > 0) begin
          interleave[s]++;
          n_handover++;
        end
        if (dut.u_matrix.s_req[s].htrans == HTRANS_NONSEQ)
          left_m[o] = int'(burst_beats(dut.u_matrix.s_req[s].hburst));
        left_m[o]--;
        if (dut.u_matrix.s_req[s].hmastlock && left_m[o] > 0) n_lock++;
        last_m[s] = o;
      end
    end
    for (int m = 0; m < NM; m++) if (done_err[m]) n_err++;
  end

  // ------------------------------------------------------------------
  // burst driver
  int order[$];
  int t_start [NM], t_done [NM];
  bit last_err [NM];

  task automatic burst(int m, ss_cmd_t c, int tag);
    @(negedge clk);
    cur[m]       = c;
    tagv[m]      = tag;
    cmd[m]       = c;
    cmd_valid[m] = 1'b1;
    @(posedge clk);
    while (!cmd_ready[m]) @(posedge clk);
    t_start[m] = cyc;
    @(negedge clk);
    cmd_valid[m] = 1'b0;
    while (!done[m]) @(negedge clk);
    t_done[m] = cyc;
    last_err[m] = done_err[m];
    order.push_back(m);
    @(posedge clk);
  endtask

  function automatic ss_cmd_t mk(int s, int lvl, int tl, int word, hburst_e b,
                                 bit wr, bit lk = 0);
    ss_cmd_t c;
    c.addr.s_number = 3'(s);
    c.addr.p_level  = 3'(lvl);
    c.addr.t_length = 4'(tl);
    c.addr.offset   = 22'(word * 4);
    c.hburst = b;
    c.write  = wr;
    c.lock   = lk;
    return c;
  endfunction

  function automatic arb_cfg_t scheme(int k);
    arb_cfg_t c;
    c.policy   = arb_policy_e'(k / 3);
    c.len_mode = len_mode_e'(k % 3);
    return c;
  endfunction

  // levels for the dynamic policy, and the finishing order they imply
  int lvl [NM] = '{1, 5, 3, 7};
  int dyn_order [NM] = '{3, 1, 2, 0};

  task automatic contend(int k);
    int s;
    hburst_e bt;
    s  = k % NS;
    bt = HBURST_INCR8;
    for (int i = 0; i < NS; i++) cfg[i] = scheme(k);
    for (int pass = 0; pass < 2; pass++) begin
      order.delete();
      for (int i = 0; i < NS; i++) interleave[i] = 0;
      fork
        burst(0, mk(s, lvl[0], 1, 0*64 + k*4, bt, pass == 0), k);
        burst(1, mk(s, lvl[1], 1, 1*64 + k*4, bt, pass == 0), k);
        burst(2, mk(s, lvl[2], 1, 2*64 + k*4, bt, pass == 0), k);
        burst(3, mk(s, lvl[3], 1, 3*64 + k*4, bt, pass == 0), k);
      join
      check(order.size() == NM, $sformatf("scheme %0d: all masters done", k));
      for (int i = 0; i < NM && i < order.size(); i++) begin
        int e;
        // round robin: a rotation of 0..3 starting where the pointer stood
        e = (k / 3 == 2) ? dyn_order[i] : (k / 3 == 1) ? (order[0] + i) % NM : i;
        check(order[i] == e, $sformatf("scheme %0d pass %0d: position %0d is m%0d, expected m%0d",
                                       k, pass, i, order[i], e));
      end
      if (k % 3 == 1)
        check(interleave[s] == 0, $sformatf("scheme %0d: transaction grant interleaved %0d",
                                            k, interleave[s]));
      else if (k / 3 == 1)
        check(interleave[s] > 0, $sformatf("scheme %0d: round robin per transfer/length did not interleave", k));
      repeat (3) @(posedge clk);
    end
  endtask

  // ------------------------------------------------------------------
  initial begin
    for (int i = 0; i < NS; i++) cfg[i] = scheme(4);
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] = 1'b0; cmd[m] = '0; cur[m] = '0; tagv[m] = 0;
    end
    for (int s = 0; s < NS; s++) for (int w = 0; w < MW; w++) shadow[s][w] = 'x;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. latency of an uncontended burst: beats + 3 cycles
    begin
      static hburst_e bl [4] = '{HBURST_SINGLE, HBURST_INCR4, HBURST_INCR8, HBURST_INCR16};
      for (int i = 0; i < 4; i++) begin
        burst(0, mk(5, 0, 0, 200, bl[i], 1'b1), 50 + i);
        check(t_done[0] - t_start[0] == int'(burst_beats(bl[i])) + 2,
              $sformatf("latency %s: %0d cycles", bl[i].name(), t_done[0] - t_start[0] + 1));
        check(!last_err[0], "no error on a good burst");
        burst(0, mk(5, 0, 0, 200, bl[i], 1'b0), 50 + i);
      end
    end

    // 2. parallel bursts to four different slaves finish together
    fork
      burst(0, mk(0, 0, 0, 100, HBURST_INCR16, 1'b1), 60);
      burst(1, mk(1, 0, 0, 100, HBURST_INCR16, 1'b1), 60);
      burst(2, mk(2, 0, 0, 100, HBURST_INCR16, 1'b1), 60);
      burst(3, mk(3, 0, 0, 100, HBURST_INCR16, 1'b1), 60);
    join
    for (int m = 0; m < NM; m++)
      check(t_done[m] - t_start[m] == 18, $sformatf("parallel m%0d took %0d", m, t_done[m] - t_start[m]));
    fork
      burst(0, mk(0, 0, 0, 100, HBURST_INCR16, 1'b0), 60);
      burst(1, mk(1, 0, 0, 100, HBURST_INCR16, 1'b0), 60);
      burst(2, mk(2, 0, 0, 100, HBURST_INCR16, 1'b0), 60);
      burst(3, mk(3, 0, 0, 100, HBURST_INCR16, 1'b0), 60);
    join

    // 3. the nine schemes under contention at one slave
    for (int k = 0; k < 9; k++) contend(k);

    // 4. locked burst under round robin per transfer: not interleaved
    for (int i = 0; i < NS; i++) cfg[i] = scheme(3);   // RT
    for (int i = 0; i < NS; i++) interleave[i] = 0;
    fork
      burst(0, mk(6, 0, 0, 10, HBURST_INCR8, 1'b1, 1'b1), 70);
      burst(1, mk(6, 0, 0, 40, HBURST_INCR8, 1'b1), 70);
    join
    check(interleave[6] == 1, $sformatf("locked burst: %0d handovers inside a burst", interleave[6]));
    fork
      burst(0, mk(6, 0, 0, 10, HBURST_INCR8, 1'b0), 70);
      burst(1, mk(6, 0, 0, 40, HBURST_INCR8, 1'b0), 70);
    join

    // 5. ERROR response: offset beyond the memory
    burst(2, mk(7, 0, 0, 300, HBURST_INCR4, 1'b0), 80);
    check(last_err[2], "error burst reported");
    burst(2, mk(7, 0, 0, 8, HBURST_INCR4, 1'b1), 81);
    burst(2, mk(7, 0, 0, 8, HBURST_INCR4, 1'b0), 81);

    // 6. scheme changed while traffic runs: FR -> RT on slave 4
    for (int i = 0; i < NS; i++) cfg[i] = scheme(1);
    for (int i = 0; i < NS; i++) interleave[i] = 0;
    fork
      burst(0, mk(4, 0, 0, 120, HBURST_INCR16, 1'b1), 90);
      burst(1, mk(4, 0, 0, 150, HBURST_INCR16, 1'b1), 90);
      burst(2, mk(4, 0, 0, 180, HBURST_INCR16, 1'b1), 90);
      begin
        repeat (6) @(negedge clk);
        check(interleave[4] == 0, "no handover before the switch");
        cfg[4] = scheme(3);
        n_switch++;
      end
    join
    check(interleave[4] > 0, "round robin per transfer after the switch");
    fork
      burst(0, mk(4, 0, 0, 120, HBURST_INCR16, 1'b0), 90);
      burst(1, mk(4, 0, 0, 150, HBURST_INCR16, 1'b0), 90);
      burst(2, mk(4, 0, 0, 180, HBURST_INCR16, 1'b0), 90);
    join

    repeat (5) @(posedge clk);
    check(rd_words > 400, $sformatf("read words checked: %0d", rd_words));
    $display("mechanisms: stall=%0d rr=%0d prio=%0d noport=%0d lock=%0d error=%0d handover=%0d switch=%0d",
             n_stall, n_rr, n_prio, n_noport, n_lock, n_err, n_handover, n_switch);
    check(n_stall > 0,    "stall happened");
    check(n_rr > 0,       "round-robin decision happened");
    check(n_prio > 0,     "priority decision happened");
    check(n_noport > 0,   "No-Port happened");
    check(n_lock > 0,     "lock held the slave");
    check(n_err > 0,      "error response happened");
    check(n_handover > 0, "mid-burst handover happened");
    check(n_switch > 0,   "scheme switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
