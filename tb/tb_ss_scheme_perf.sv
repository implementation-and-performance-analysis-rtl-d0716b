// tb_ss_scheme_perf: performance comparison of the nine arbitration schemes.
//
// The system at its default size runs the same traffic under each scheme:
// four masters replay one sequence of eight bursts (four writes, then reads
// of the same words) of random length to two shared slaves, each master in
// its own region, so the slaves are heavily contended.  Masters send
// P_Levels 1, 5, 3 and 7; T_Length is random per burst.
// Per scheme the testbench prints the cycles taken, the use of the two slaves
// (accepted transfers per cycle) and each master's mean burst latency,
// and checks:
//   - every read word against a shadow memory, every burst completed;
//   - the transfers accepted at the slaves equal the beats commanded;
//   - fixed priority: master 0 waits less than master 3;
//   - dynamic priority: master 3 (level 7) waits less than master 0 (level 1);
//   - round robin: no master waits more than twice as long as another.
`timescale 1ns/1ps
module tb_ss_scheme_perf;
  import ahb_pkg::*;

  localparam int NM = 4, NS = 8, NB = 8;

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
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // traffic, generated once and replayed for every scheme
  ss_cmd_t plan [NM][NB];
  int      lvl  [NM] = '{1, 5, 3, 7};
  int      run_id = 0;

  function automatic logic [31:0] pattern(int m, int s, int w, int r);
    return {8'(r), 4'(m), 4'(s), 16'(w)};
  endfunction

  ss_cmd_t cur [NM];
  always_comb
    for (int m = 0; m < NM; m++)
      wdata[m] = pattern(m, int'(cur[m].addr.s_number),
                         int'(cur[m].addr.offset[21:2]) + int'(wbeat[m]), run_id);

  int xfers = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) if (s_active[s]) xfers++;
    for (int m = 0; m < NM; m++)
      if (rd_valid[m]) begin
        int s, w;
        s = int'(cur[m].addr.s_number);
        w = int'(cur[m].addr.offset[21:2]) + int'(rd_beat[m]);
        check(rd_data[m] == pattern(m, s, w, run_id),
              $sformatf("run %0d m%0d read s%0d w%0d: %h", run_id, m, s, w, rd_data[m]));
      end
  end

  int lat_sum [NM];
  int ndone   [NM];

  task automatic play(int m);
    for (int i = 0; i < NB; i++) begin
      int t0;
      @(negedge clk);
      cur[m] = plan[m][i];
      cmd[m] = plan[m][i];
      cmd_valid[m] = 1'b1;
      @(posedge clk);
      while (!cmd_ready[m]) @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      cmd_valid[m] = 1'b0;
      while (!done[m]) @(negedge clk);
      check(!done_err[m], "no ERROR");
      lat_sum[m] += cyc - t0;
      ndone[m]++;
      @(posedge clk);
    end
  endtask

  initial begin
    static hburst_e bl [4] = '{HBURST_SINGLE, HBURST_INCR4, HBURST_INCR8, HBURST_INCR16};
    int beats;
    beats = 0;
    // one burst sequence, replayed by every master in its own region
    for (int i = 0; i < NB / 2; i++) begin
      ss_cmd_t c;
      c.addr.s_number = 3'($urandom % 2);
      c.addr.t_length = 4'($urandom % 4);
      c.addr.p_level  = '0;
      c.addr.offset   = 22'(i * 16 * 4);
      c.hburst = bl[1 + $urandom % 3];
      c.write  = 1'b1;
      c.lock   = 1'b0;
      for (int m = 0; m < NM; m++) begin
        plan[m][i] = c;
        plan[m][i].addr.p_level = 3'(lvl[m]);
        plan[m][i].addr.offset  = c.addr.offset + 22'(m * 64 * 4);
        plan[m][i + NB / 2] = plan[m][i];
        plan[m][i + NB / 2].write = 1'b0;
        beats += 2 * int'(burst_beats(c.hburst));
      end
    end
    for (int m = 0; m < NM; m++) begin
      cmd_valid[m] = 1'b0; cmd[m] = '0; cur[m] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    $display("scheme  cycles  slave-use  mean latency m0 m1 m2 m3");
    for (int k = 0; k < 9; k++) begin
      int t0, t1, x0;
      real lat [NM];
      string nm;
      arb_cfg_t c;
      c.policy = arb_policy_e'(k / 3);
      c.len_mode = len_mode_e'(k % 3);
      for (int s = 0; s < NS; s++) cfg[s] = c;
      run_id = k + 1;
      for (int m = 0; m < NM; m++) begin lat_sum[m] = 0; ndone[m] = 0; end
      @(negedge clk);
      t0 = cyc; x0 = xfers;
      fork play(0); play(1); play(2); play(3); join
      repeat (2) @(posedge clk);
      t1 = cyc;
      nm = {(k / 3 == 0) ? "F" : (k / 3 == 1) ? "R" : "D",
            (k % 3 == 0) ? "T" : (k % 3 == 1) ? "R" : "L"};
      for (int m = 0; m < NM; m++) begin
        check(ndone[m] == NB, $sformatf("%s: m%0d finished %0d bursts", nm, m, ndone[m]));
        lat[m] = real'(lat_sum[m]) / NB;
      end
      $display("  %s    %6d     %5.2f        %6.1f %6.1f %6.1f %6.1f", nm, t1 - t0,
               real'(xfers - x0) / real'(t1 - t0) / 2.0, lat[0], lat[1], lat[2], lat[3]);
      check(xfers - x0 == beats, $sformatf("%s: %0d transfers for %0d beats", nm, xfers - x0, beats));
      if (k / 3 == 0) check(lat[0] < lat[3], $sformatf("%s: master 0 favoured", nm));
      if (k / 3 == 2) check(lat[3] < lat[0], $sformatf("%s: level 7 favoured over level 1", nm));
      if (k / 3 == 1)
        for (int a = 0; a < NM; a++)
          for (int b = 0; b < NM; b++)
            check(lat[a] <= 2.0 * lat[b], $sformatf("%s: m%0d waits over twice m%0d", nm, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
