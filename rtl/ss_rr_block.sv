// ss_rr_block: round-robin (RR) block of the slave-side arbiter.
//
// A rotating-priority search over the masked request vector: the first
// requesting master found after the one granted last wins.  `idx`/`valid`
// are combinational; the pointer of the last grant is a register that moves
// to `idx` on a clock edge where `load` is high (the controller raises it when
// it actually takes the round-robin decision).  After reset the pointer
// sits on the last master, so master 0 has precedence first.
//
// The search-and-advance behaviour follows the round-robin function of the
// arbiter; updating on the rising edge (instead of the falling edge) keeps
// the whole bus on a single clock edge and is this design's choice.
module ss_rr_block #(
  parameter int unsigned NUM_MASTERS = 4,
  localparam int unsigned IDX_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MASTERS-1:0] req,     // masked request vector
  input  logic                   load,    // take the decision at this edge
  output logic [IDX_W-1:0]       idx,
  output logic                   valid
);

  logic [IDX_W-1:0] last_q;

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int unsigned k = 1; k <= NUM_MASTERS; k++) begin
      int unsigned m;
      m = (32'(last_q) + k) % NUM_MASTERS;
      if (!valid && req[m]) begin
        idx   = IDX_W'(m);
        valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      last_q <= IDX_W'(NUM_MASTERS - 1);
    else if (load && valid)
      last_q <= idx;
  end

endmodule
