// tb_ahb_sram_slave: AHB memory slave driven directly with AHB transfers.
// Checks pipelined word writes and reads, byte and halfword writes merged
// into a word, the wait states of a slave with WAIT_STATES = 2 (a data
// phase then lasts three cycles), and the two-cycle ERROR response for an
// offset past the memory, which must leave the memory unchanged.
`timescale 1ns/1ps
module tb_ahb_sram_slave;
  import ahb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // two slaves: no wait states, two wait states
  logic              hsel [2];
  ahb_req_t          hreq [2];
  logic [DATA_W-1:0] hwdata [2];
  logic              hreadyout [2];
  hresp_e            hresp [2];
  logic [DATA_W-1:0] hrdata [2];

  ahb_sram_slave #(.MEM_WORDS(64), .WAIT_STATES(0)) u0 (
    .hclk(clk), .hresetn(rst_n), .hsel(hsel[0]), .hreq(hreq[0]), .hready(hreadyout[0]),
    .hwdata(hwdata[0]), .hreadyout(hreadyout[0]), .hresp(hresp[0]), .hrdata(hrdata[0]));
  ahb_sram_slave #(.MEM_WORDS(64), .WAIT_STATES(2)) u1 (
    .hclk(clk), .hresetn(rst_n), .hsel(hsel[1]), .hreq(hreq[1]), .hready(hreadyout[1]),
    .hwdata(hwdata[1]), .hreadyout(hreadyout[1]), .hresp(hresp[1]), .hrdata(hrdata[1]));

  logic [31:0] model [2][64];
  int wtag = 0;
  function automatic logic [31:0] wd(int w);
    return (32'hA500_0000 + 32'(w) * 32'h0101) ^ (32'(wtag) * 32'h3C3C_3C3C);
  endfunction

  // One pipelined burst of n transfers starting at word w: address phase of
  // beat i overlaps data phase of beat i-1.  Returns cycles used.
  task automatic xfer(int s, int w, int n, bit wr, int size, int bofs,
                      output int cycles, output bit err);
    int beat_a, beat_d;
    bit dact;
    logic [31:0] rd;
    beat_a = 0; beat_d = 0; dact = 0; cycles = 0; err = 0;
    while (beat_d < n) begin
      @(negedge clk);
      if (beat_a < n && !err) begin
        hsel[s] = 1'b1;
        hreq[s] = '0;
        hreq[s].htrans = (beat_a == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
        hreq[s].hwrite = wr;
        hreq[s].hsize  = 3'(size);
        hreq[s].haddr.offset = 22'((w + beat_a) * 4 + bofs);
      end else begin
        hsel[s] = 1'b0; hreq[s].htrans = HTRANS_IDLE;
      end
      if (dact) hwdata[s] = wd(w + beat_d);
      @(posedge clk);
      cycles++;
      if (hreadyout[s]) begin
        if (dact) begin
          if (hresp[s] == HRESP_ERROR) err = 1;
          else if (!wr) begin
            checks++;
            if (hrdata[s] != model[s][w + beat_d]) begin
              failures++;
              $display("FAIL read s%0d w%0d got %h exp %h", s, w + beat_d, hrdata[s], model[s][w + beat_d]);
            end
          end else if (w + beat_d < 64) begin
            logic [31:0] d;
            d = wd(w + beat_d);
            for (int b = 0; b < 4; b++) begin
              bit en;
              en = (size == 2) || (size == 1 && b / 2 == bofs / 2) || (size == 0 && b == bofs);
              if (en) model[s][w + beat_d][8*b +: 8] = d[8*b +: 8];
            end
          end
          beat_d++;
          if (err) beat_d = n;
        end
        dact = (beat_a < n) && !err;
        if (beat_a < n) beat_a++;
      end else if (dact && hresp[s] == HRESP_ERROR) begin
        err = 1;
      end
    end
    @(negedge clk);
    hsel[s] = 1'b0; hreq[s].htrans = HTRANS_IDLE;
  endtask

  initial begin
    int cyc; bit err;
    for (int s = 0; s < 2; s++) begin
      hsel[s] = 1'b0; hreq[s] = '0; hwdata[s] = '0;
      for (int w = 0; w < 64; w++) model[s][w] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      // fill, then read back: word burst of 16 = 17 cycles with no waits
      xfer(s, 0, 16, 1, 2, 0, cyc, err);
      xfer(s, 16, 16, 1, 2, 0, cyc, err);
      xfer(s, 32, 16, 1, 2, 0, cyc, err);
      xfer(s, 48, 16, 1, 2, 0, cyc, err);
      xfer(s, 0, 16, 0, 2, 0, cyc, err);
      checks++;
      if (cyc != 1 + 16 * (1 + 2 * s)) begin
        failures++; $display("FAIL slave %0d: 16 reads took %0d cycles", s, cyc);
      end
      xfer(s, 16, 16, 0, 2, 0, cyc, err);
      xfer(s, 32, 16, 0, 2, 0, cyc, err);
      xfer(s, 48, 16, 0, 2, 0, cyc, err);
      // byte and halfword writes, with data unlike what is stored
      wtag = 1;
      xfer(s, 5, 1, 1, 0, 2, cyc, err);
      xfer(s, 6, 1, 1, 1, 2, cyc, err);
      xfer(s, 7, 1, 1, 0, 1, cyc, err);
      xfer(s, 4, 4, 0, 2, 0, cyc, err);
      // error past the end
      xfer(s, 70, 2, 1, 2, 0, cyc, err);
      checks++;
      if (!err) begin failures++; $display("FAIL slave %0d: no ERROR past the end", s); end
      xfer(s, 6, 1, 0, 2, 0, cyc, err);
      wtag = 0;
      checks++;
      if (err) begin failures++; $display("FAIL slave %0d: ERROR inside memory", s); end
    end
    // memory modulo: word 70 would alias word 6; it was checked unchanged above
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
