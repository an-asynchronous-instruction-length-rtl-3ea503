// tb_ack_gen: all input combinations of AckGen against its definition.
`timescale 1ns/1ps
module tb_ack_gen;
  import rappid_pkg::*;
  logic [NROW-1:0] tag_out;
  logic [MAXSHORT-2:0] preempt_in;
  logic tag_ack, fired;
  int checks = 0, failures = 0;
  ack_gen dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < (1 << (NROW + MAXSHORT - 1)); i++) begin
      {tag_out, preempt_in} = i[NROW+MAXSHORT-2:0];
      #1;
      checks++;
      if (fired !== (tag_out != 0) || tag_ack !== (i != 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
