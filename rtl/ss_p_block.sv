// ss_p_block: priority (P) block of the slave-side arbiter.
//
// Picks, among the requesting masters, the one with the highest priority
// level (larger value wins).  If several requesting masters share the
// highest level, the lowest-numbered of them wins.  It also reports whether
// all requesting masters have the same level (`equal`), which is what the
// controller uses to choose between this block and the round-robin block.
// Purely combinational.
//
// Highest-level selection follows the priority function of the arbiter; the
// level polarity and the tie rule are this design's choices.
module ss_p_block #(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned LEVEL_W     = 3,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic [NUM_MASTERS-1:0] req,
  input  logic [LEVEL_W-1:0]     level [NUM_MASTERS],
  output logic [IDX_W-1:0]       idx,
  output logic                   valid,
  output logic                   equal    // all requesters at one level
);

  logic [LEVEL_W-1:0] best;
  logic [LEVEL_W-1:0] low;

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    best  = '0;
    low   = '1;
    for (int unsigned m = 0; m < NUM_MASTERS; m++) begin
      if (req[m]) begin
        if (!valid || level[m] > best) begin
          best = level[m];
          idx  = IDX_W'(m);
        end
        if (level[m] < low)
          low = level[m];
        valid = 1'b1;
      end
    end
    equal = !valid || (best == low);
  end

endmodule
