// tb_decode_steer_unit: the decode and steer unit fed directly by sixteen
// byte lanes played by the testbench (four-phase handshakes with random
// delays, so columns receive their bytes at different times).  A random
// instruction stream with prefixes, long instructions and predicted-taken
// branches must come out of the four output buffers, read in rotation at
// random times, word for word in program order.
`timescale 1ns/1ps
module tb_decode_steer_unit;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCOL-1:0] lane_req, lane_ack;
  fbyte_t lane_data [NCOL];
  logic [NROW-1:0] out_valid, out_pop;
  logic [NDEBUG-1:0] debug_n;
  logic [NROW*NCOL+NCOL+NROW-1:0] dbg_state;
  chan_t out_word [NROW];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  decode_steer_unit dut (.*);

  `include "rappid_stream.svh"

  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [10:0] lane_q [NCOL][$];

  // lane drivers
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NCOL; k++) begin
      if (lane_req[k] && lane_ack[k]) begin
        lane_req[k] <= 1'b0;
        void'(lane_q[k].pop_front());
      end else if (!lane_req[k] && !lane_ack[k] && lane_q[k].size() != 0 && ($urandom % 3) == 0) begin
        lane_req[k]  <= 1'b1;
        lane_data[k] <= fbyte_t'(lane_q[k][0]);
      end
    end
  end

  initial begin
    int got, row;
    lane_req = '0; debug_n = '1; out_pop = '0;
    foreach (lane_data[k]) lane_data[k] = '0;
    s_pending_target = 1'b1;
    s_unused(5);
    for (int i = 0; i < 300; i++) begin
      if (($urandom % 100) < 8) s_add_branch($urandom % 4, $urandom % 12);
      else                      s_add_kind($urandom % 16);
    end
    s_fill_line();
    foreach (s_bytes[i]) lane_q[i % NCOL].push_back(s_bytes[i]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    got = 0; row = 0;
    while (got < s_exp.size()) begin
      @(negedge clk);
      out_pop = '0;
      if (out_valid[row] && ($urandom % 100) < 50) begin
        checks++;
        if (out_word[row] !== s_exp[got]) begin
          failures++;
          if (failures < 10) $display("word %0d: %h exp %h", got, out_word[row], s_exp[got]);
        end
        out_pop[row] = 1'b1;
        row = (row + 1) % NROW;
        got++;
      end
    end
    @(negedge clk);
    out_pop = '0;
    repeat (50) @(negedge clk);
    checks++;
    if (out_valid != 0) begin failures++; $display("extra output words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
