// tb_output_buffer: random pushes (only when ready) and pops against a
// queue model; checks order, valid, ready and the DEPTH limit.
`timescale 1ns/1ps
module tb_output_buffer;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0, ready, valid;
  chan_t wdata, rdata;
  chan_t model [$];
  int checks = 0, failures = 0, full_seen = 0;
  always #5 clk = ~clk;
  output_buffer dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (valid !== (model.size() != 0) || ready !== (model.size() < 4)) failures++;
      if (valid && rdata !== model[0]) begin failures++; $display("data %h exp %h", rdata, model[0]); end
      if (!ready) full_seen++;
      push = ready && ($urandom % 100 < 55);
      pop  = ($urandom % 100 < 45);
      wdata = chan_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks++;
    if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
