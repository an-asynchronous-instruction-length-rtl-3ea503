// tb_steering_switch: random firing column, length and data; the word must
// hold the instruction bytes taken from consecutive columns (wrapping from
// 15 to 0), zeros beyond the length, and the right marks.
`timescale 1ns/1ps
module tb_steering_switch;
  import rappid_pkg::*;
  logic [NCOL-1:0] fire, is_head, is_tail, is_prefix;
  logic [MAXSHORT-1:0] len_oh [NCOL];
  logic [7:0] data [NCOL];
  logic buf_ready, ss_rdy, push;
  chan_t word;
  int checks = 0, failures = 0;
  steering_switch dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (1000) begin
      int c, l;
      chan_t e;
      c = $urandom % NCOL;
      fire = '0;
      if ($urandom % 8 != 0) fire[c] = 1'b1;
      for (int k = 0; k < NCOL; k++) begin
        data[k] = 8'($urandom);
        len_oh[k] = '0;
        len_oh[k][$urandom % MAXSHORT] = 1'b1;
      end
      l = 1 + $urandom % MAXSHORT;
      len_oh[c] = '0; len_oh[c][l-1] = 1'b1;
      is_head = NCOL'($urandom); is_tail = NCOL'($urandom); is_prefix = NCOL'($urandom);
      buf_ready = 1'($urandom);
      #1;
      e = '0;
      if (fire != 0) begin
        for (int k = 0; k < l; k++) e.bytes[8*k +: 8] = data[(c + k) % NCOL];
        e.len = 3'(l); e.head = is_head[c]; e.tail = is_tail[c]; e.prefix = is_prefix[c];
      end
      checks++;
      if (word !== e || push !== (fire != 0) || ss_rdy !== buf_ready) begin
        failures++;
        $display("c=%0d l=%0d word %h exp %h", c, l, word, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
