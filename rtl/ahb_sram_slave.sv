// ahb_sram_slave: AHB memory slave.
//
// A word-organised memory of MEM_WORDS words behind an AHB slave interface.
// The address phase (HSEL, HTRANS NONSEQ/SEQ, HREADY high) is registered;
// in the data phase a write stores the byte lanes given by HSIZE and
// HADDR[1:0], a read returns the addressed word.  WAIT_STATES wait cycles
// are inserted in every data phase.  An offset beyond the memory is
// answered with the two-cycle ERROR response and changes nothing.
//
// Interface: standard AHB slave signals, the address phase as one ahb_req_t;
// HREADY (`hready`) is the bus's ready, HREADYOUT (`hreadyout`) this slave's.
// Timing: HREADYOUT, HRESP and HRDATA depend only on registers and memory
// contents, never combinationally on the address phase.
//
// The slave's role (memory target answering OKAY or ERROR) follows the bus
// description; size, wait states and memory organisation are choices of
// this design.  The memory is not cleared at reset.  WAIT_STATES must stay
// below 256 (an 8-bit wait counter).
module ahb_sram_slave
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 256,
  parameter int unsigned WAIT_STATES = 0,
  localparam int unsigned AW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  ahb_req_t          hreq,
  input  logic              hready,
  input  logic [DATA_W-1:0] hwdata,
  output logic              hreadyout,
  output hresp_e            hresp,
  output logic [DATA_W-1:0] hrdata
);

  logic [DATA_W-1:0] mem [MEM_WORDS];

  logic          dact_q, dwrite_q, derr_q, err2_q;
  logic [AW-1:0] daddr_q;
  logic [3:0]    dstrb_q;
  logic [7:0]    wait_q;

  logic       start, in_range;
  logic [3:0] strb;
  logic       done;

  always_comb begin
    start    = hsel && hready && is_active(hreq.htrans);
    in_range = 32'(hreq.haddr.offset[OFFSET_W-1:2]) < MEM_WORDS;
    unique case (hreq.hsize)
      3'd0:    strb = 4'b0001 << hreq.haddr.offset[1:0];
      3'd1:    strb = hreq.haddr.offset[1] ? 4'b1100 : 4'b0011;
      default: strb = 4'b1111;
    endcase
    done      = dact_q && !derr_q && (32'(wait_q) == WAIT_STATES);
    hreadyout = !dact_q || (derr_q ? err2_q : done);
    hresp     = (dact_q && derr_q) ? HRESP_ERROR : HRESP_OKAY;
    hrdata    = (dact_q && !dwrite_q && !derr_q) ? mem[daddr_q] : '0;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dact_q   <= 1'b0;
      dwrite_q <= 1'b0;
      derr_q   <= 1'b0;
      err2_q   <= 1'b0;
      daddr_q  <= '0;
      dstrb_q  <= '0;
      wait_q   <= '0;
    end else begin
      if (dact_q && !hreadyout) begin
        wait_q <= wait_q + 8'd1;
        if (derr_q) err2_q <= 1'b1;
      end else if (start) begin
        dact_q   <= 1'b1;
        dwrite_q <= hreq.hwrite;
        derr_q   <= !in_range;
        err2_q   <= 1'b0;
        daddr_q  <= AW'(hreq.haddr.offset[OFFSET_W-1:2]);
        dstrb_q  <= strb;
        wait_q   <= '0;
      end else begin
        dact_q <= 1'b0;
        derr_q <= 1'b0;
        err2_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge hclk) begin
    if (done && dwrite_q)
      for (int b = 0; b < 4; b++)
        if (dstrb_q[b]) mem[daddr_q][8*b +: 8] <= hwdata[8*b +: 8];
  end

endmodule
