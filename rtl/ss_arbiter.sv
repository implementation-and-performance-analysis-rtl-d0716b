// ss_arbiter: slave-side (SS) arbiter of one slave port of the bus matrix.
//
// Each master requesting this slave brings its priority level and desired
// transfer length in its address.  The arbiter is built from a round-robin
// block (ss_rr_block), a priority block (ss_p_block) and a controller
// (ss_controller) that picks one of the two results and counts the transfers
// of the owner.  Two run-time fields of `cfg` choose one of nine schemes:
//   policy   FIXED   level of master m is NUM_MASTERS-1-m (master 0 highest)
//            RR      all levels equal, so the round-robin block always decides
//            DYNAMIC level taken from P_Level (address bits 28:26)
//   len_mode TRANSFER    one transfer per grant
//            TRANSACTION the number of beats of HBURST
//            DESIRED     T_Length (address bits 25:22) plus one
// giving the FT/FR/FL, RT/RR/RL and DT/DR/DL schemes.  The owner
// (`sel`, `no_port`) is registered and changes only on an edge where
// `hready` is high.  A request for master m is expected to come with its
// address phase on `mreq[m]`.
//
// The block structure and the nine schemes follow the arbiter description;
// the FIXED level assignment and the length coding are this design's own.
module ss_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  arb_cfg_t               cfg,
  input  logic [NUM_MASTERS-1:0] req,
  input  ahb_req_t               mreq [NUM_MASTERS],
  input  logic                   hready,
  output logic [IDX_W-1:0]       sel,
  output logic                   no_port,
  output logic                   xfer,     // transfer of `sel` accepted now
  output logic                   rearb,    // new owner chosen at this edge
  output logic                   rr_used,  // ... and by the round-robin block
  output logic [CNT_W-1:0]       count     // transfers left to the owner
);

  logic [PLEVEL_W-1:0] level [NUM_MASTERS];
  logic [CNT_W-1:0]    len   [NUM_MASTERS];
  logic [NUM_MASTERS-1:0] lock;

  always_comb begin
    for (int unsigned m = 0; m < NUM_MASTERS; m++) begin
      unique case (cfg.policy)
        POL_FIXED:   level[m] = PLEVEL_W'(NUM_MASTERS - 1 - m);
        POL_DYNAMIC: level[m] = mreq[m].haddr.p_level;
        default:     level[m] = '0;
      endcase
      unique case (cfg.len_mode)
        LEN_TRANSACTION: len[m] = burst_beats(mreq[m].hburst);
        LEN_DESIRED:     len[m] = CNT_W'(mreq[m].haddr.t_length) + CNT_W'(1);
        default:         len[m] = CNT_W'(1);
      endcase
      lock[m] = mreq[m].hmastlock;
    end
  end

  logic [IDX_W-1:0] rr_idx, p_idx;
  logic             rr_valid, p_valid, equal, rr_load;


  ss_rr_block #(.NUM_MASTERS(NUM_MASTERS)) u_rr (
    .clk, .rst_n, .req, .load(rr_load), .idx(rr_idx), .valid(rr_valid));

  ss_p_block #(.NUM_MASTERS(NUM_MASTERS), .LEVEL_W(PLEVEL_W)) u_p (
    .req, .level, .idx(p_idx), .valid(p_valid), .equal);

  ss_controller #(.NUM_MASTERS(NUM_MASTERS)) u_ctrl (
    .clk, .rst_n, .req, .lock, .len, .equal, .rr_idx, .p_idx, .hready,
    .sel, .no_port, .rr_load, .xfer, .rearb, .count);

  assign rr_used = rr_load;

  // both blocks see the same request vector: they agree on "somebody asks"
  a_valid_agree: assert property (@(posedge clk) disable iff (!rst_n)
    rr_valid == p_valid);

endmodule
