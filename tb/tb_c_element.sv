// tb_c_element: random inputs against a reference model of the C-element
// (output rises when both inputs are high, falls when both are low, else holds).
`timescale 1ns/1ps
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, y;
  logic ref_y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  c_element dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    ref_y = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk);
      if (a && b) ref_y = 1'b1; else if (!a && !b) ref_y = 1'b0;
      #1;
      checks++;
      if (y !== ref_y) begin failures++; $display("a=%b b=%b y=%b exp %b", a, b, y, ref_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
