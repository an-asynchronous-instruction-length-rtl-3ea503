// tb_byte_fifo: writes entries into one lane and reads them over the
// four-phase handshake in the three modes.  Normal: entries come out once,
// in order, and the lane empties; recirculate: the loaded entries repeat in
// order and the write port is closed while running; freeze: the head entry
// repeats.  Also checks that the lane refuses writes when full.
`timescale 1ns/1ps
module tb_byte_fifo;
  import rappid_pkg::*;
  localparam int D = FIFO_LINES;
  logic clk = 1'b0, rst_n = 1'b0;
  fifo_mode_e mode;
  logic run, wr_en, wr_ready, req, ack;
  fbyte_t wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  fbyte_t vals [$];
  always #5 clk = ~clk;
  byte_fifo dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic reset_lane();
    rst_n = 1'b0; run = 1'b0; wr_en = 1'b0; ack = 1'b0; wr_data = '0;
    @(negedge clk); rst_n = 1'b1; @(negedge clk);
  endtask
  task automatic write(fbyte_t v);
    wr_data = v; wr_en = 1'b1; @(negedge clk); wr_en = 1'b0;
  endtask
  // one complete handshake; returns the data seen
  task automatic read(output fbyte_t v);
    int w;
    w = 0;
    while (!req && w < 50) begin @(negedge clk); w++; end
    v = rd_data; ack = 1'b1;
    while (req) @(negedge clk);
    ack = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    fbyte_t v;
    // normal
    mode = FIFO_NORMAL;
    reset_lane();
    vals.delete();
    for (int i = 0; i < D; i++) begin vals.push_back(fbyte_t'($urandom)); write(vals[i]); end
    checks++; if (wr_ready || count != D) failures++;       // full
    write(fbyte_t'(11'h7FF));                                 // refused
    run = 1'b1;
    for (int i = 0; i < D; i++) begin
      read(v); checks++;
      if (v !== vals[i]) begin failures++; $display("normal %0d: %h exp %h", i, v, vals[i]); end
    end
    repeat (3) @(negedge clk);
    checks++; if (req || count != 0) failures++;
    // recirculate
    mode = FIFO_RECIRC;
    reset_lane();
    vals.delete();
    for (int i = 0; i < 3; i++) begin vals.push_back(fbyte_t'($urandom)); write(vals[i]); end
    run = 1'b1;
    @(negedge clk);
    checks++; if (wr_ready) failures++;
    for (int i = 0; i < 10; i++) begin
      read(v); checks++;
      if (v !== vals[i % 3]) begin failures++; $display("recirc %0d: %h exp %h", i, v, vals[i % 3]); end
    end
    // freeze
    mode = FIFO_FREEZE;
    reset_lane();
    vals.delete();
    for (int i = 0; i < 3; i++) begin vals.push_back(fbyte_t'($urandom)); write(vals[i]); end
    run = 1'b1;
    for (int i = 0; i < 5; i++) begin
      read(v); checks++;
      if (v !== vals[0]) begin failures++; $display("freeze %0d: %h exp %h", i, v, vals[0]); end
    end
    checks++; if (count != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
