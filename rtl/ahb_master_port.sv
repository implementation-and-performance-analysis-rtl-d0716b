// ahb_master_port: master-side input stage of the bus matrix.
//
// One instance sits on each master layer.  It decodes the master's address,
// offers the transfer to the slave ports and returns the response of the
// slave that holds the master's data phase.  Because a slave port may be
// owned by another master, an address phase the master has already had
// accepted (HREADY high) is kept in a holding register until the target
// port's arbiter grants it; the master sees HREADY low until that transfer
// has gone through the slave.  When the target is free the transfer goes
// straight through without the holding register, so a granted burst runs
// at one transfer per cycle.
//
// A transfer whose S_Number names no slave goes to a built-in default slave
// that answers with the two-cycle ERROR response.
//
// Interface: `m_*` is the master's AHB side.  `eff_req`/`eff_valid`/`eff_hsel`
// is the transfer offered to the slave ports this cycle; `issue` says a slave
// port accepted it.  `s_*` are the outputs of all slaves.  Timing: response
// signals are combinational from the slave outputs; holding register and data
// phase tracking are registered.
//
// The matrix structure (decoders, multiplexers, arbitration at the slave)
// follows the bus matrix described for the SS arbiter; the holding register
// and the default slave are this design's own.
module ahb_master_port
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 8,
  localparam int unsigned SIDX_W = $clog2(NUM_SLAVES + 1),
  localparam int unsigned SEL_W  = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // master side
  input  ahb_req_t              m_req,
  output logic                  m_hready,
  output hresp_e                m_hresp,
  output logic [DATA_W-1:0]     m_hrdata,
  // offered transfer
  output ahb_req_t              eff_req,
  output logic                  eff_valid,
  output logic [NUM_SLAVES-1:0] eff_hsel,
  input  logic                  issue,
  // slave outputs
  input  logic                  s_hreadyout [NUM_SLAVES],
  input  hresp_e                s_hresp     [NUM_SLAVES],
  input  logic [DATA_W-1:0]     s_hrdata    [NUM_SLAVES],
  output logic                  held         // a transfer waits for a grant
);

  localparam logic [SIDX_W-1:0] DEF_SLV = SIDX_W'(NUM_SLAVES);

  logic             held_q;
  ahb_req_t         hold_q;
  logic             dact_q;      // a data phase of this master is in progress
  logic [SIDX_W-1:0] dslv_q;     // slave holding it (DEF_SLV: default slave)
  logic             derr_q;      // default slave: second ERROR cycle

  logic live_ok, miss, accepted, ddone;

  always_comb begin
    if (!dact_q)                ddone = 1'b1;
    else if (dslv_q == DEF_SLV) ddone = derr_q;
    else                        ddone = s_hreadyout[dslv_q[SEL_W-1:0]];

    m_hready  = !held_q && ddone;
    live_ok   = m_hready && is_active(m_req.htrans);
    eff_req   = held_q ? hold_q : m_req;
    eff_valid = held_q || live_ok;
    accepted  = issue || (eff_valid && miss);

    m_hresp  = HRESP_OKAY;
    m_hrdata = '0;
    if (dact_q) begin
      if (dslv_q == DEF_SLV) begin
        m_hresp = HRESP_ERROR;
      end else begin
        m_hresp  = s_hresp[dslv_q[SEL_W-1:0]];
        m_hrdata = s_hrdata[dslv_q[SEL_W-1:0]];
      end
    end
  end

  ahb_decoder #(.NUM_SLAVES(NUM_SLAVES)) u_dec (
    .haddr(eff_req.haddr), .active(eff_valid), .hsel(eff_hsel), .miss);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q <= 1'b0;
      hold_q <= '0;
      dact_q <= 1'b0;
      dslv_q <= '0;
      derr_q <= 1'b0;
    end else begin
      if (live_ok && !accepted) begin
        held_q <= 1'b1;
        hold_q <= m_req;
      end else if (held_q && accepted) begin
        held_q <= 1'b0;
      end

      if (accepted) begin
        dact_q <= 1'b1;
        dslv_q <= miss ? DEF_SLV : SIDX_W'(eff_req.haddr.s_number);
        derr_q <= 1'b0;
      end else if (dact_q && ddone) begin
        dact_q <= 1'b0;
        derr_q <= 1'b0;
      end else if (dact_q && dslv_q == DEF_SLV) begin
        derr_q <= 1'b1;
      end
    end
  end

  assign held = held_q;

  // a slave port can only accept what is offered to it
  a_issue_offered: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (eff_valid && !miss));
  // while the input stage waits, the master is held in its data phase
  a_hold_stalls: assert property (@(posedge clk) disable iff (!rst_n)
    held_q |-> !m_hready);

endmodule
