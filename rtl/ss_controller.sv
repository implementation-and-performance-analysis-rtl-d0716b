// ss_controller: controller of the slave-side (SS) arbiter.
//
// It holds the master currently owning the slave port (`sel`, valid when
// `no_port` is low) and a counter of the transfers that master may still
// make.  On every clock edge where HREADY is high it applies, in order:
//   1. the current master asserts HMASTLOCK: it stays selected;
//   2. no master is selected: if nobody requests, No-Port stays asserted,
//      else a new master is chosen (round robin if all requesters have equal
//      priority, priority otherwise) and the counter is loaded with its
//      transfer length;
//   3. a master is selected:
//      a. counter expired: with no other requester the current master stays
//         (counter reloaded) while it still addresses the slave, else
//         No-Port is asserted; with other requesters a new choice is made;
//      b. counter running and the master still addresses the slave: it
//         stays and the counter counts its transfers down;
//      c. the master stopped addressing the slave before the counter
//         expired: No-Port if nobody else requests, else a new choice.
// The counter expires at the edge that accepts the last allotted transfer,
// so the next owner can start in the following cycle without a bubble.
// Selection and counter are registered; `rr_load` tells the RR block that
// its result was taken.
//
// The three-step procedure is the arbiter's; counting accepted transfers
// (NONSEQ/SEQ with HREADY high) and deciding only when HREADY is high are
// choices of this design that follow AHB handover rules.
module ss_controller
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MASTERS-1:0] req,        // HSEL & active transfer, per master
  input  logic [NUM_MASTERS-1:0] lock,       // HMASTLOCK, per master
  input  logic [CNT_W-1:0]       len [NUM_MASTERS], // transfer length, 1..16
  input  logic                   equal,      // requesters have equal priority
  input  logic [IDX_W-1:0]       rr_idx,
  input  logic [IDX_W-1:0]       p_idx,
  input  logic                   hready,     // slave port ready: handover allowed
  output logic [IDX_W-1:0]       sel,
  output logic                   no_port,
  output logic                   rr_load,
  output logic                   xfer,       // a transfer of `sel` is accepted now
  output logic                   rearb,      // a new choice is taken at this edge
  output logic [CNT_W-1:0]       count
);

  logic [IDX_W-1:0] sel_q, sel_d;
  logic             own_q, own_d;     // a master owns the port (= !no_port)
  logic [CNT_W-1:0] cnt_q, cnt_d;

  logic [NUM_MASTERS-1:0] others;
  logic [IDX_W-1:0]       pick;
  logic                   cur_req, expired;

  always_comb begin
    others   = req;
    others[sel_q] = 1'b0;
    cur_req  = own_q && req[sel_q];
    xfer     = cur_req && hready;
    expired  = (cnt_q == '0) || (xfer && cnt_q == CNT_W'(1));
    pick     = equal ? rr_idx : p_idx;

    sel_d    = sel_q;
    own_d    = own_q;
    cnt_d    = (xfer && cnt_q != '0) ? cnt_q - CNT_W'(1) : cnt_q;
    rearb    = 1'b0;

    if (!hready) begin
      cnt_d = cnt_q;                       // no handover while a transfer waits
    end else if (own_q && lock[sel_q] && req[sel_q]) begin
      // step 1: locked transfer, keep the master
    end else if (!own_q) begin
      // step 2
      if (req != '0) begin
        rearb = 1'b1;
      end
    end else if (expired) begin
      // step 3a
      if (others == '0) begin
        if (cur_req) cnt_d = len[sel_q];   // same master, counter reloaded
        else         own_d = 1'b0;         // No-Port
      end else begin
        rearb = 1'b1;
      end
    end else if (cur_req) begin
      // step 3b: counter already decremented above
    end else begin
      // step 3c
      if (others == '0) own_d = 1'b0;
      else              rearb = 1'b1;
    end

    if (rearb) begin
      sel_d = pick;
      own_d = 1'b1;
      cnt_d = len[pick];
    end
    rr_load = rearb && equal;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
      own_q <= 1'b0;
      cnt_q <= '0;
    end else begin
      sel_q <= sel_d;
      own_q <= own_d;
      cnt_q <= cnt_d;
    end
  end

  assign sel     = sel_q;
  assign no_port = !own_q;
  assign count   = cnt_q;

endmodule
