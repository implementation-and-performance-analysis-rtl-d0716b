// ahb_decoder: address decoder of one master layer of the bus matrix.
//
// The target slave is named directly by the S_Number field (bits 31:29) of
// the address, so decoding is a one-hot expansion of that field, qualified
// by an active transfer.  A transfer whose S_Number is not below NUM_SLAVES
// selects no slave and raises `miss`; the bus matrix answers such a transfer
// with an ERROR response.  Purely combinational.
//
// Using S_Number as the decode field follows the address map of the SS
// arbitration scheme; the miss/ERROR handling is this design's own choice.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 8
) (
  input  ss_addr_t              haddr,
  input  logic                  active,   // NONSEQ or SEQ transfer present
  output logic [NUM_SLAVES-1:0] hsel,
  output logic                  miss
);

  always_comb begin
    hsel = '0;
    miss = 1'b0;
    if (active) begin
      if (32'(haddr.s_number) < NUM_SLAVES)
        hsel[haddr.s_number] = 1'b1;
      else
        miss = 1'b1;
    end
  end

endmodule
