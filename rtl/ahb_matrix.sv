// ahb_matrix: multi-layer AHB bus matrix with slave-side arbitration.
//
// Every master has a layer of its own (ahb_master_port: decoder, input stage
// and response multiplexer) and every slave a port of its own
// (ahb_slave_port: SS arbiter and address/write-data multiplexer), so
// masters that address different slaves transfer in parallel and only
// masters meeting at the same slave are arbitrated, by that slave's arbiter.
// Each slave port runs the arbitration scheme set by its own `cfg` entry,
// which may be changed at any time; the new scheme applies from the next
// arbitration decision.
//
// Interface: per master an AHB master interface (address phase as one
// ahb_req_t, HWDATA, HREADY, HRESP, HRDATA); per slave an AHB slave interface
// (HSEL, address phase, HWDATA, HREADYOUT, HRESP, HRDATA) plus the owning
// master number (HMASTER).  Status: No-Port and the current owner per slave,
// and `m_held`, set while a master's transfer waits for a grant.
//
// A master must not have a transfer waiting at one slave while it still
// addresses another; masters that end each burst with an IDLE cycle, as the
// masters of this design do, meet that rule.
module ahb_matrix
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_SLAVES  = 8,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  arb_cfg_t           cfg        [NUM_SLAVES],
  // master layers
  input  ahb_req_t           m_req      [NUM_MASTERS],
  input  logic [DATA_W-1:0]  m_hwdata   [NUM_MASTERS],
  output logic               m_hready   [NUM_MASTERS],
  output hresp_e             m_hresp    [NUM_MASTERS],
  output logic [DATA_W-1:0]  m_hrdata   [NUM_MASTERS],
  output logic               m_held     [NUM_MASTERS],
  // slave ports
  output logic               s_hsel     [NUM_SLAVES],
  output ahb_req_t           s_req      [NUM_SLAVES],
  output logic [DATA_W-1:0]  s_hwdata   [NUM_SLAVES],
  output logic [IDX_W-1:0]   s_hmaster  [NUM_SLAVES],
  input  logic               s_hreadyout[NUM_SLAVES],
  input  hresp_e             s_hresp    [NUM_SLAVES],
  input  logic [DATA_W-1:0]  s_hrdata   [NUM_SLAVES],
  // arbitration status
  output logic               s_no_port  [NUM_SLAVES],
  output logic               s_rearb    [NUM_SLAVES],
  output logic               s_rr_used  [NUM_SLAVES],
  output logic [CNT_W-1:0]   s_count    [NUM_SLAVES]
);

  ahb_req_t               eff_req   [NUM_MASTERS];
  logic                   eff_valid [NUM_MASTERS];
  logic [NUM_SLAVES-1:0]  eff_hsel  [NUM_MASTERS];
  logic [NUM_MASTERS-1:0] port_req  [NUM_SLAVES];
  logic [NUM_MASTERS-1:0] port_issue[NUM_SLAVES];
  logic [NUM_MASTERS-1:0] issue_m;

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_mport
    ahb_master_port #(.NUM_SLAVES(NUM_SLAVES)) u_mport (
      .clk, .rst_n,
      .m_req(m_req[m]), .m_hready(m_hready[m]), .m_hresp(m_hresp[m]),
      .m_hrdata(m_hrdata[m]),
      .eff_req(eff_req[m]), .eff_valid(eff_valid[m]), .eff_hsel(eff_hsel[m]),
      .issue(issue_m[m]),
      .s_hreadyout, .s_hresp, .s_hrdata,
      .held(m_held[m]));
  end

  always_comb begin
    issue_m = '0;
    for (int unsigned s = 0; s < NUM_SLAVES; s++) begin
      for (int unsigned m = 0; m < NUM_MASTERS; m++)
        port_req[s][m] = eff_valid[m] && eff_hsel[m][s];
      issue_m = issue_m | port_issue[s];
    end
  end

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_sport
    ahb_slave_port #(.NUM_MASTERS(NUM_MASTERS)) u_sport (
      .clk, .rst_n, .cfg(cfg[s]),
      .req(port_req[s]), .mreq(eff_req), .m_hwdata, .issue(port_issue[s]),
      .s_hsel(s_hsel[s]), .s_req(s_req[s]), .s_hwdata(s_hwdata[s]),
      .s_hready(s_hreadyout[s]),
      .owner(s_hmaster[s]), .no_port(s_no_port[s]), .rearb(s_rearb[s]),
      .rr_used(s_rr_used[s]), .count(s_count[s]));
  end

endmodule
