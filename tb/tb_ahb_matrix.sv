// tb_ahb_matrix: the bus matrix between testbench masters and slave models.
//
// Four masters make single AHB transfers; six slave models (slave 1 with two
// wait states) sit behind the matrix, so S_Number 6 and 7 reach the default
// slave.  Checks: an uncontended transfer takes three cycles (one for the
// arbiter to choose); transfers to different slaves proceed in parallel;
// four masters meeting at one slave are served one per cycle with all but the
// first held in their input stage; HMASTER and HWDATA routing at the
// slaves; the ERROR answer of the default slave; and random traffic under
// random schemes, every read checked against a shadow copy.
`timescale 1ns/1ps
module tb_ahb_matrix;
  import ahb_pkg::*;
  localparam int NM = 4, NS = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  arb_cfg_t          cfg        [NS];
  ahb_req_t          m_req      [NM];
  logic [DATA_W-1:0] m_hwdata   [NM];
  logic              m_hready   [NM];
  hresp_e            m_hresp    [NM];
  logic [DATA_W-1:0] m_hrdata   [NM];
  logic              m_held     [NM];
  logic              s_hsel     [NS];
  ahb_req_t          s_req      [NS];
  logic [DATA_W-1:0] s_hwdata   [NS];
  logic [1:0]        s_hmaster  [NS];
  logic              s_hreadyout[NS];
  hresp_e            s_hresp    [NS];
  logic [DATA_W-1:0] s_hrdata   [NS];
  logic              s_no_port  [NS];
  logic              s_rearb    [NS];
  logic              s_rr_used  [NS];
  logic [CNT_W-1:0]  s_count    [NS];

  ahb_matrix #(.NUM_MASTERS(NM), .NUM_SLAVES(NS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- slave models ----------------
  logic [31:0] mem [NS][64];
  bit   d_act [NS], d_wr [NS];
  int   d_w [NS], d_m [NS], d_wait [NS];
  int   held_cycles = 0;

  always_comb
    for (int s = 0; s < NS; s++) begin
      s_hreadyout[s] = !d_act[s] || (s != 1) || d_wait[s] >= 2;
      s_hresp[s]     = HRESP_OKAY;
      s_hrdata[s]    = d_act[s] ? mem[s][d_w[s]] : '0;
    end

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) if (m_held[m]) held_cycles++;
    for (int s = 0; s < NS; s++) begin
      if (d_act[s] && !s_hreadyout[s]) d_wait[s]++;
      else begin
        if (d_act[s] && d_wr[s]) begin
          check(s_hwdata[s][31:24] == 8'(d_m[s]), $sformatf("HWDATA at s%0d from m%0d: %h", s, d_m[s], s_hwdata[s]));
          mem[s][d_w[s]] = s_hwdata[s];
        end
        d_act[s] = s_hsel[s] && is_active(s_req[s].htrans);
        if (d_act[s]) begin
          check(s_req[s].haddr.p_level == 3'(s_hmaster[s]), $sformatf("HMASTER at s%0d", s));
          d_wr[s] = s_req[s].hwrite;
          d_w[s]  = int'(s_req[s].haddr.offset[7:2]);
          d_m[s]  = int'(s_hmaster[s]);
          d_wait[s] = 0;
        end
      end
    end
  end

  // ---------------- master tasks ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // one single transfer; the master number is also sent as P_Level so the
  // slave model can check HMASTER
  task automatic single(int m, int s, int w, bit wr, logic [31:0] d,
                        output logic [31:0] rd, output hresp_e resp, output int cycles);
    int t0;
    @(negedge clk);
    m_req[m] = '0;
    m_req[m].htrans = HTRANS_NONSEQ;
    m_req[m].hwrite = wr;
    m_req[m].hsize  = 3'd2;
    m_req[m].haddr.s_number = 3'(s);
    m_req[m].haddr.p_level  = 3'(m);
    m_req[m].haddr.offset   = 22'(w * 4);
    t0 = cyc;
    @(posedge clk);
    while (!m_hready[m]) @(posedge clk);
    @(negedge clk);
    m_req[m].htrans = HTRANS_IDLE;
    m_hwdata[m] = d;
    @(posedge clk);
    while (!m_hready[m]) @(posedge clk);
    rd = m_hrdata[m]; resp = m_hresp[m];
    cycles = cyc - t0 + 1;
  endtask

  logic [31:0] shadow [NM][NS][16];
  int done_at [NM];

  task automatic traffic(int m, int n);
    logic [31:0] rd; hresp_e resp; int c;
    for (int i = 0; i < n; i++) begin
      int s, w; bit wr; logic [31:0] d;
      s  = $urandom % 8;
      w  = $urandom % 16;
      wr = $urandom % 2;
      d  = {8'(m), 24'($urandom)};
      single(m, s, m * 16 + w, wr, d, rd, resp, c);
      if (s >= NS) check(resp == HRESP_ERROR, $sformatf("m%0d: default slave ERROR", m));
      else begin
        check(resp == HRESP_OKAY, "OKAY");
        if (wr) shadow[m][s][w] = d;
        else check(rd == shadow[m][s][w], $sformatf("m%0d read s%0d w%0d: %h exp %h", m, s, w, rd, shadow[m][s][w]));
      end
      if ($urandom % 4 == 0) @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] rd; hresp_e resp; int c;
    for (int s = 0; s < NS; s++) begin
      cfg[s] = '{policy: POL_RR, len_mode: LEN_TRANSFER};
      d_act[s] = 0; d_wr[s] = 0; d_w[s] = 0; d_m[s] = 0; d_wait[s] = 0;
      for (int w = 0; w < 64; w++) mem[s][w] = {8'hEE, 8'(s), 16'(w)};
    end
    for (int m = 0; m < NM; m++) begin
      m_req[m] = '0; m_hwdata[m] = '0;
      for (int s = 0; s < NS; s++) for (int w = 0; w < 16; w++)
        shadow[m][s][w] = {8'hEE, 8'(s), 16'(m * 16 + w)};
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // uncontended read: 3 cycles, data from the right slave
    single(0, 3, 5, 0, '0, rd, resp, c);
    check(c == 3 && rd == {8'hEE, 8'd3, 16'd5} && resp == HRESP_OKAY,
          $sformatf("single read: %0d cycles data %h", c, rd));
    // slave with two wait states: 5 cycles; the default slave answers
    // without arbitration: ERROR in cycles 2 and 3
    single(2, 1, 33, 1, 32'h0200_1234, rd, resp, c);
    check(c == 5, $sformatf("write to waiting slave: %0d cycles", c));
    @(negedge clk);
    check(mem[1][33] == 32'h0200_1234, "write stored");
    shadow[2][1][1] = 32'h0200_1234;     // word 33 lies in master 2's region
    // default slave
    single(1, 7, 0, 0, '0, rd, resp, c);
    check(resp == HRESP_ERROR && c == 3, $sformatf("default slave: %s after %0d cycles", resp.name(), c));

    // parallel: four masters, four slaves
    fork
      begin single(0, 0, 1, 0, '0, rd, resp, c); done_at[0] = cyc; end
      begin single(1, 2, 1, 0, '0, rd, resp, c); done_at[1] = cyc; end
      begin single(2, 4, 1, 0, '0, rd, resp, c); done_at[2] = cyc; end
      begin single(3, 5, 1, 0, '0, rd, resp, c); done_at[3] = cyc; end
    join
    check(done_at[0] == done_at[1] && done_at[1] == done_at[2] && done_at[2] == done_at[3],
          "parallel transfers finish together");

    // contention: four masters at slave 2, served one per cycle
    held_cycles = 0;
    fork
      begin single(0, 2, 16 * 0, 0, '0, rd, resp, c); done_at[0] = cyc; end
      begin single(1, 2, 16 * 1, 0, '0, rd, resp, c); done_at[1] = cyc; end
      begin single(2, 2, 16 * 2, 0, '0, rd, resp, c); done_at[2] = cyc; end
      begin single(3, 2, 16 * 3, 0, '0, rd, resp, c); done_at[3] = cyc; end
    join
    begin
      int mn, mx;
      mn = done_at[0]; mx = done_at[0];
      for (int m = 1; m < NM; m++) begin
        if (done_at[m] < mn) mn = done_at[m];
        if (done_at[m] > mx) mx = done_at[m];
        for (int n = 0; n < m; n++) check(done_at[m] != done_at[n], "one transfer per cycle");
      end
      check(mx - mn == 3, $sformatf("four contending transfers spread over %0d cycles", mx - mn + 1));
      check(held_cycles == 4 + 3 + 2 + 1, $sformatf("input stages held for %0d cycles", held_cycles));
    end

    // random traffic under random schemes
    for (int round = 0; round < 6; round++) begin
      for (int s = 0; s < NS; s++) begin
        cfg[s].policy   = arb_policy_e'($urandom % 3);
        cfg[s].len_mode = len_mode_e'($urandom % 3);
      end
      fork
        traffic(0, 40);
        traffic(1, 40);
        traffic(2, 40);
        traffic(3, 40);
      join
    end
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
