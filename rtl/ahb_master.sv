// ahb_master: AHB burst master of the SS-arbitrated bus.
//
// It takes one burst command at a time (`cmd_valid`/`cmd_ready`) and runs
// it as an AHB burst: a NONSEQ transfer followed by SEQ transfers, word
// sized, with the address offset stepping by four bytes.  The upper address
// bits carry the command's S_Number, P_Level and T_Length unchanged through
// the burst, which is how the master tells the slave-side arbiter its target,
// priority and desired transfer length.  The bursts supported are SINGLE,
// INCR4, INCR8 and INCR16.  After each burst the master drives IDLE for at
// least one cycle.  HMASTLOCK is driven for the whole burst of a locked
// command.  On an ERROR response the master drops the rest of the burst
// (IDLE from the first ERROR cycle) and reports it with `done_err`.
//
// Write data: the master shows on `wbeat` the beat whose data phase is in
// progress and drives `wdata` on HWDATA, so the data source may compute
// it from the beat number.  Read data appears with `rd_valid`, `rd_beat` and
// `rd_data` in the cycle its data phase completes.  `done` pulses in the
// cycle the last data phase completes.
//
// Going to IDLE after each burst and retrying nothing by itself follow the
// bus description; the command and data interfaces are this design's own.
module ahb_master
  import ahb_pkg::*;
(
  input  logic              hclk,
  input  logic              hresetn,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  ss_cmd_t           cmd,
  // AHB master interface
  output ahb_req_t          hreq,
  output logic [DATA_W-1:0] hwdata,
  input  logic              hready,
  input  hresp_e            hresp,
  input  logic [DATA_W-1:0] hrdata,
  // data side
  output logic [3:0]        wbeat,
  input  logic [DATA_W-1:0] wdata,
  output logic              rd_valid,
  output logic [3:0]        rd_beat,
  output logic [DATA_W-1:0] rd_data,
  output logic              done,
  output logic              done_err
);

  ss_cmd_t    cmd_q;
  logic       active_q;
  logic [4:0] acnt_q;      // address phases accepted
  logic [4:0] beats;
  logic       dph_q;       // a data phase is in progress
  logic [3:0] dbeat_q;     // its beat number
  logic       err_q;       // ERROR seen: stop issuing

  logic addr_on, err_now, dph_done, last;

  always_comb begin
    beats    = burst_beats(cmd_q.hburst);
    err_now  = dph_q && hresp == HRESP_ERROR;
    addr_on  = active_q && !err_q && !err_now && acnt_q < beats;
    dph_done = dph_q && hready;
    last     = dph_done && (err_now || 5'(dbeat_q) + 5'd1 == beats);

    hreq           = '0;
    hreq.haddr     = cmd_q.addr;
    hreq.haddr.offset = cmd_q.addr.offset + OFFSET_W'({acnt_q, 2'b00});
    hreq.htrans    = !addr_on ? HTRANS_IDLE :
                     (acnt_q == '0) ? HTRANS_NONSEQ : HTRANS_SEQ;
    hreq.hwrite    = cmd_q.write;
    hreq.hsize     = 3'd2;
    hreq.hburst    = cmd_q.hburst;
    hreq.hmastlock = active_q && cmd_q.lock;

    cmd_ready = !active_q;
    wbeat     = dbeat_q;
    hwdata    = wdata;
    rd_valid  = dph_done && !cmd_q.write && !err_now;
    rd_beat   = dbeat_q;
    rd_data   = hrdata;
    done      = active_q && last;
    done_err  = done && err_now;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      cmd_q    <= '0;
      active_q <= 1'b0;
      acnt_q   <= '0;
      dph_q    <= 1'b0;
      dbeat_q  <= '0;
      err_q    <= 1'b0;
    end else begin
      if (!active_q) begin
        if (cmd_valid) begin
          cmd_q    <= cmd;
          active_q <= 1'b1;
          acnt_q   <= '0;
          err_q    <= 1'b0;
        end
      end else begin
        if (err_now) err_q <= 1'b1;
        if (hready) begin
          if (addr_on) begin
            acnt_q  <= acnt_q + 5'd1;
            dph_q   <= 1'b1;
            dbeat_q <= acnt_q[3:0];
          end else begin
            dph_q   <= 1'b0;
          end
        end
        if (last) active_q <= 1'b0;
      end
    end
  end

  a_burst_kind: assert property (@(posedge hclk) disable iff (!hresetn)
    (cmd_valid && cmd_ready) |-> cmd.hburst inside
      {HBURST_SINGLE, HBURST_INCR4, HBURST_INCR8, HBURST_INCR16});
  a_hold_addr: assert property (@(posedge hclk) disable iff (!hresetn)
    (is_active(hreq.htrans) && !hready && !err_now)
      |=> ($stable(hreq) || hresp == HRESP_ERROR));

endmodule
