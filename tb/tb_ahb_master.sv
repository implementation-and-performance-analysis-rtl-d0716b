// tb_ahb_master: the burst master against a slave model in the testbench
// that inserts random wait states and can answer one beat with ERROR.
// Every accepted address phase is checked (NONSEQ first, then SEQ, offset
// stepping by four, S_Number/P_Level/T_Length unchanged, HBURST, HWRITE,
// HMASTLOCK), write data at the end of each data phase, read data and its
// beat number, the `done` pulse, the IDLE cycle after every burst, and that
// an ERROR ends the burst early with `done_err`.  With no wait states a
// burst of n beats takes n+1 cycles after the command is taken.
`timescale 1ns/1ps
module tb_ahb_master;
  import ahb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cmd_valid, cmd_ready;
  ss_cmd_t           cmd;
  ahb_req_t          hreq;
  logic [DATA_W-1:0] hwdata, hrdata, wdata, rd_data;
  logic              hready;
  hresp_e            hresp;
  logic [3:0]        wbeat, rd_beat;
  logic              rd_valid, done, done_err;

  ahb_master dut (.hclk(clk), .hresetn(rst_n), .*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign wdata = 32'hC0DE_0000 | 32'(wbeat);

  // ---------------- slave model ----------------
  int  wait_pct = 0;       // chance of a wait state, percent
  int  err_beat = -1;      // beat answered with ERROR
  bit  d_act = 0, d_wr = 0, e1 = 0;
  int  d_beat = 0;
  int  a_beats = 0;        // address phases accepted in the current burst
  ss_cmd_t cur;
  bit  stall;

  always_comb begin
    hready = 1'b1; hresp = HRESP_OKAY;
    if (d_act && d_beat == err_beat) begin
      hresp = HRESP_ERROR; hready = e1;
    end else if (d_act && stall) hready = 1'b0;
  end
  assign hrdata = 32'h5EED_0000 | 32'(d_beat);

  int rd_seen = 0, idle_between = 1;
  always @(posedge clk) if (rst_n) begin
    if (d_act && hready) begin
      if (d_wr && hresp == HRESP_OKAY)
        check(hwdata == (32'hC0DE_0000 | 32'(d_beat)), $sformatf("write data beat %0d: %h", d_beat, hwdata));
    end
    if (rd_valid) begin
      check(rd_data == (32'h5EED_0000 | 32'(rd_beat)) && rd_beat == 4'(rd_seen),
            $sformatf("read beat %0d data %h", rd_beat, rd_data));
      rd_seen++;
    end
    if (d_act && hresp == HRESP_ERROR && !hready) e1 <= 1'b1;
    else e1 <= 1'b0;
    if (hready) begin
      if (is_active(hreq.htrans)) begin
        ss_addr_t ea;
        ea = cur.addr;
        ea.offset = cur.addr.offset + 22'(a_beats * 4);
        check(hreq.htrans == ((a_beats == 0) ? HTRANS_NONSEQ : HTRANS_SEQ), "HTRANS kind");
        check(hreq.haddr == ea, $sformatf("address of beat %0d: %h exp %h", a_beats, hreq.haddr, ea));
        check(hreq.hburst == cur.hburst && hreq.hwrite == cur.write &&
              hreq.hmastlock == cur.lock && hreq.hsize == 3'd2, "control signals");
        check(a_beats > 0 || idle_between == 1, "IDLE before a new burst");
        d_act  <= 1'b1;
        d_wr   <= hreq.hwrite;
        d_beat <= a_beats;
        a_beats++;
        idle_between = 0;
      end else begin
        d_act <= 1'b0;
        idle_between = 1;
      end
    end
    stall <= ($urandom % 100) < wait_pct;
  end

  task automatic run(ss_cmd_t c, int wp, int eb, output int cycles, output bit err);
    int t0;
    wait_pct = wp; err_beat = eb;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cur = c; a_beats = 0; rd_seen = 0;
    cmd = c; cmd_valid = 1'b1;
    @(posedge clk); t0 = 0;
    @(negedge clk); cmd_valid = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    err = done_err;
    @(posedge clk); #1;
    if (!c.write && !err)
      check(rd_seen == int'(burst_beats(c.hburst)), $sformatf("%0d read beats delivered", rd_seen));
  endtask

  initial begin
    int cyc; bit err;
    static hburst_e bl [4] = '{HBURST_SINGLE, HBURST_INCR4, HBURST_INCR8, HBURST_INCR16};
    cmd_valid = 1'b0; cmd = '0; cur = '0; stall = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 24; r++) begin
      ss_cmd_t c;
      c.addr = ss_addr_t'($urandom);
      c.addr.offset[1:0] = 2'b00;
      c.hburst = bl[r % 4];
      c.write  = r[2];
      c.lock   = r[3];
      run(c, (r < 8) ? 0 : 40, -1, cyc, err);
      check(!err, "no error");
      if (r < 8)
        check(cyc == int'(burst_beats(c.hburst)) + 1,
              $sformatf("%s took %0d cycles", c.hburst.name(), cyc));
    end
    // ERROR on beat 2 of an INCR8: burst ends at beat 2
    begin
      ss_cmd_t c;
      c = '0; c.addr.s_number = 3'd4; c.addr.offset = 22'h100; c.hburst = HBURST_INCR8; c.write = 1'b0;
      run(c, 0, 2, cyc, err);
      check(err, "ERROR reported");
      check(a_beats == 3, $sformatf("%0d address phases after ERROR on beat 2", a_beats));
      c.write = 1'b1; c.hburst = HBURST_INCR4;
      run(c, 30, 0, cyc, err);
      check(err && a_beats == 1, "ERROR on first beat of a write");
      run(c, 0, -1, cyc, err);
      check(!err, "next burst after ERROR is fine");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
