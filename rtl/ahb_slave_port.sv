// ahb_slave_port: one slave port of the bus matrix.
//
// The SS arbiter (ss_arbiter) decides which master owns the slave; the
// address multiplexer forwards that master's offered transfer (HSEL high)
// or an IDLE transfer when the owner has nothing for this slave or No-Port
// is asserted.  A forwarded transfer is accepted when the slave's HREADYOUT
// is high, which `issue` reports back to the master's input stage.  The
// master whose transfer was accepted is remembered for the data phase, and
// the write-data multiplexer passes that master's HWDATA to the slave.
//
// Interface: per master, `req` (offers a transfer to this slave) with its
// address phase `mreq` and write data `m_hwdata`; the slave's HSEL, address
// phase and HWDATA; `s_hready` is the slave's HREADYOUT, used as its HREADY
// input as well.  The owner is registered in the arbiter; the multiplexers
// are combinational.
//
// The multiplexers and the slave-side arbitration follow the bus matrix
// description; the signal-level handshake is standard AHB.
module ahb_slave_port
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  arb_cfg_t               cfg,
  input  logic [NUM_MASTERS-1:0] req,
  input  ahb_req_t               mreq     [NUM_MASTERS],
  input  logic [DATA_W-1:0]      m_hwdata [NUM_MASTERS],
  output logic [NUM_MASTERS-1:0] issue,
  // slave side
  output logic                   s_hsel,
  output ahb_req_t               s_req,
  output logic [DATA_W-1:0]      s_hwdata,
  input  logic                   s_hready,
  // status
  output logic [IDX_W-1:0]       owner,
  output logic                   no_port,
  output logic                   rearb,
  output logic                   rr_used,
  output logic [CNT_W-1:0]       count
);

  logic             xfer;
  logic [IDX_W-1:0] dmaster_q;

  ss_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arb (
    .clk, .rst_n, .cfg, .req, .mreq, .hready(s_hready),
    .sel(owner), .no_port, .xfer, .rearb, .rr_used, .count);

  always_comb begin
    s_hsel = !no_port && req[owner];
    s_req  = mreq[owner];
    if (!s_hsel) s_req.htrans = HTRANS_IDLE;
    issue  = '0;
    issue[owner] = s_hsel && s_hready;
    s_hwdata = m_hwdata[dmaster_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dmaster_q <= '0;
    else if (s_hready && s_hsel) dmaster_q <= owner;
  end

  a_issue_is_xfer: assert property (@(posedge clk) disable iff (!rst_n)
    (|issue) == xfer);

endmodule
