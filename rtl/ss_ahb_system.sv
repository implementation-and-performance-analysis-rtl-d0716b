// ss_ahb_system: AHB system with a slave-side arbitrated bus matrix.
//
// NUM_MASTERS burst masters (ahb_master) and NUM_SLAVES memory slaves
// (ahb_sram_slave) are joined by a multi-layer bus matrix (ahb_matrix) in
// which every slave port has its own SS arbiter.  Each master's burst
// commands carry the target slave, the priority level and the desired
// transfer length in the upper address bits; each slave port's arbitration
// scheme (one of nine: fixed / round-robin / dynamic priority, combined with
// per-transfer / per-transaction / desired-length grants) is set at run time
// through `cfg`.
//
// Interface: per master a command port (`cmd_*`), a write-data port
// (`wbeat` out, `wdata` in), read data (`rd_*`) and completion (`done`,
// `done_err`).  Per slave: the scheme `cfg`, and status outputs No-Port,
// owner (HMASTER) and, per master, `m_held` (transfer waiting for a grant).
// All of it is synchronous to `clk`, reset by the active-low `rst_n`.
//
// The organisation (masters, decoders, multiplexers, slave-side arbiters,
// slaves) follows the SS arbiter bus matrix; the counts of masters and
// slaves and the memory size are this design's choices.
module ss_ahb_system
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_SLAVES  = 8,
  parameter int unsigned MEM_WORDS   = 256,
  parameter int unsigned WAIT_STATES = 0,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  arb_cfg_t          cfg       [NUM_SLAVES],
  // masters
  input  logic              cmd_valid [NUM_MASTERS],
  output logic              cmd_ready [NUM_MASTERS],
  input  ss_cmd_t           cmd       [NUM_MASTERS],
  output logic [3:0]        wbeat     [NUM_MASTERS],
  input  logic [DATA_W-1:0] wdata     [NUM_MASTERS],
  output logic              rd_valid  [NUM_MASTERS],
  output logic [3:0]        rd_beat   [NUM_MASTERS],
  output logic [DATA_W-1:0] rd_data   [NUM_MASTERS],
  output logic              done      [NUM_MASTERS],
  output logic              done_err  [NUM_MASTERS],
  output logic              m_held    [NUM_MASTERS],
  // arbitration status per slave
  output logic              no_port   [NUM_SLAVES],
  output logic [IDX_W-1:0]  hmaster   [NUM_SLAVES],
  output logic              rearb     [NUM_SLAVES],
  output logic              rr_used   [NUM_SLAVES],
  output logic              s_active  [NUM_SLAVES],  // slave accepts a transfer
  output logic [CNT_W-1:0]  grant_left[NUM_SLAVES]   // transfers left to owner
);

  ahb_req_t          m_req    [NUM_MASTERS];
  logic [DATA_W-1:0] m_hwdata [NUM_MASTERS];
  logic              m_hready [NUM_MASTERS];
  hresp_e            m_hresp  [NUM_MASTERS];
  logic [DATA_W-1:0] m_hrdata [NUM_MASTERS];

  logic              s_hsel      [NUM_SLAVES];
  ahb_req_t          s_req       [NUM_SLAVES];
  logic [DATA_W-1:0] s_hwdata    [NUM_SLAVES];
  logic              s_hreadyout [NUM_SLAVES];
  hresp_e            s_hresp     [NUM_SLAVES];
  logic [DATA_W-1:0] s_hrdata    [NUM_SLAVES];

  for (genvar m = 0; m < NUM_MASTERS; m++) begin : g_master
    ahb_master u_master (
      .hclk(clk), .hresetn(rst_n),
      .cmd_valid(cmd_valid[m]), .cmd_ready(cmd_ready[m]), .cmd(cmd[m]),
      .hreq(m_req[m]), .hwdata(m_hwdata[m]), .hready(m_hready[m]),
      .hresp(m_hresp[m]), .hrdata(m_hrdata[m]),
      .wbeat(wbeat[m]), .wdata(wdata[m]),
      .rd_valid(rd_valid[m]), .rd_beat(rd_beat[m]), .rd_data(rd_data[m]),
      .done(done[m]), .done_err(done_err[m]));
  end

  ahb_matrix #(.NUM_MASTERS(NUM_MASTERS), .NUM_SLAVES(NUM_SLAVES)) u_matrix (
    .clk, .rst_n, .cfg,
    .m_req, .m_hwdata, .m_hready, .m_hresp, .m_hrdata, .m_held,
    .s_hsel, .s_req, .s_hwdata, .s_hmaster(hmaster),
    .s_hreadyout, .s_hresp, .s_hrdata,
    .s_no_port(no_port), .s_rearb(rearb), .s_rr_used(rr_used),
    .s_count(grant_left));

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slave
    ahb_sram_slave #(.MEM_WORDS(MEM_WORDS), .WAIT_STATES(WAIT_STATES)) u_slave (
      .hclk(clk), .hresetn(rst_n),
      .hsel(s_hsel[s]), .hreq(s_req[s]), .hready(s_hreadyout[s]),
      .hwdata(s_hwdata[s]),
      .hreadyout(s_hreadyout[s]), .hresp(s_hresp[s]), .hrdata(s_hrdata[s]));
    assign s_active[s] = s_hsel[s] && s_hreadyout[s];
  end

endmodule
