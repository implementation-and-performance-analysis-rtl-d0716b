// tb_ahb_decoder: exhaustive test of the S_Number decoder, once with the
// full eight slaves and once with five, where S_Number 5..7 must miss.
`timescale 1ns/1ps
module tb_ahb_decoder;
  import ahb_pkg::*;

  int checks = 0, failures = 0;

  ss_addr_t   a;
  logic       act;
  logic [7:0] hsel8;
  logic       miss8;
  logic [4:0] hsel5;
  logic       miss5;

  ahb_decoder #(.NUM_SLAVES(8)) u8 (.haddr(a), .active(act), .hsel(hsel8), .miss(miss8));
  ahb_decoder #(.NUM_SLAVES(5)) u5 (.haddr(a), .active(act), .hsel(hsel5), .miss(miss5));

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int t = 0; t < 2; t++) begin
        for (int r = 0; r < 8; r++) begin
          a = ss_addr_t'($urandom);
          a.s_number = 3'(s);
          act = t[0];
          #1;
          checks++;
          if (hsel8 != (act ? 8'(1 << s) : 8'h00) || miss8 != 1'b0) begin
            failures++;
            $display("FAIL: 8 slaves s=%0d act=%0d hsel=%b miss=%b", s, act, hsel8, miss8);
          end
          checks++;
          if (hsel5 != ((act && s < 5) ? 5'(1 << s) : 5'h00) || miss5 != (act && s >= 5)) begin
            failures++;
            $display("FAIL: 5 slaves s=%0d act=%0d hsel=%b miss=%b", s, act, hsel5, miss5);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
