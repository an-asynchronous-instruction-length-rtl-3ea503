// tb_byte_unit: one byte column with its neighbours played by the testbench.
// Directed cases: a plain 3-byte instruction (InstRdy waits for the two
// following bytes, firing preempts exactly them and opens the latch); an
// unused byte (dropped with a pulse); a preempted byte; an operand-size
// prefix (request to column i+1 with op16, length 1 only after the
// acknowledge); an 11-byte instruction (tail length 7 handed to column i+4,
// then a 4-byte head); a column receiving a long-tail request (length from
// the request); a column receiving a prefix request (operand size applied to
// its own decode); and a predicted-taken branch mark.
`timescale 1ns/1ps
module tb_byte_unit;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lane_req, lane_ack;
  fbyte_t lane_data;
  logic [7:0] data_dn [3];
  logic [MAXSHORT-2:0] byte_rdy_dn, preempt_in, preempt_out;
  plreq_t pref_req_in, pref_req_out, long_req_in, long_req_out;
  logic pref_ack_out, pref_ack_in, long_ack_out, long_ack_in;
  logic tag_arrived, debug_n = 1'b1;
  logic [NROW-1:0] tag_out;
  logic byte_rdy, t_bit, inst_rdy, br, is_head, is_tail, is_prefix, unused_pulse;
  logic [7:0] data;
  logic [1:0] seq;
  logic [MAXSHORT-1:0] len_oh;
  int checks = 0, failures = 0, pulses = 0;
  always #5 clk = ~clk;
  byte_unit dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (unused_pulse) pulses++;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (len_oh=%b rdy=%b inst=%b)", what, len_oh, byte_rdy, inst_rdy); end
  endtask

  task automatic offer(bit u, bit b, logic [7:0] d);
    @(negedge clk);
    lane_data = '{u: u, b: b, t: 1'b0, data: d};
    lane_req = 1'b1;
    while (!lane_ack) @(negedge clk);
    lane_req = 1'b0;
    while (lane_ack) @(negedge clk);
  endtask

  task automatic release_byte();
    @(negedge clk);
    preempt_in = 6'b000001;
    @(negedge clk);
    preempt_in = '0;
    #1 chk(!byte_rdy, "released by preempt");
  endtask

  initial begin
    lane_req = 0; lane_data = '0; data_dn = '{8'h00, 8'h00, 8'h00}; byte_rdy_dn = '0;
    preempt_in = '0; pref_req_in = '0; long_req_in = '0; pref_ack_in = 0; long_ack_in = 0;
    tag_arrived = 0; tag_out = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // plain ADD r,ib: 83 C0 05
    offer(1, 0, 8'h83);
    data_dn = '{8'hC0, 8'h05, 8'h90};
    #1 chk(byte_rdy && data == 8'h83, "latched");
    chk(len_oh == 7'b0000100 && !inst_rdy, "length 3, bytes missing");
    byte_rdy_dn = 6'b000001; #1 chk(!inst_rdy, "one byte missing");
    byte_rdy_dn = 6'b000011; #1 chk(inst_rdy, "ready");
    tag_out = 4'b0100; #1 chk(preempt_out == 6'b000011, "preempt two bytes");
    @(negedge clk); tag_out = '0; #1 chk(!byte_rdy, "latch opened");

    // unused byte
    offer(0, 0, 8'h55);
    #1 chk(!byte_rdy && pulses == 1, "unused byte dropped");

    // preempted byte
    offer(1, 0, 8'h90);
    release_byte();

    // operand-size prefix
    offer(1, 0, 8'h66);
    #1 chk(is_prefix && !inst_rdy && !pref_req_out.valid, "prefix waits for tag");
    tag_arrived = 1; #1 chk(pref_req_out.valid && pref_req_out.op16 && !pref_req_out.ad16, "prefix request");
    chk(!inst_rdy, "prefix waits for acknowledge");
    pref_ack_in = 1; #1 chk(inst_rdy && len_oh == 7'b1, "prefix is one byte");
    tag_out = 4'b0001;
    @(negedge clk); tag_out = '0; tag_arrived = 0; pref_ack_in = 0;
    #1 chk(!byte_rdy, "prefix consumed");

    // 11-byte MOV [esp+d32],id: C7 84 24
    offer(1, 0, 8'hC7);
    data_dn = '{8'h84, 8'h24, 8'h11};
    byte_rdy_dn = 6'b000000;
    tag_arrived = 1;
    #1 chk(is_head && !long_req_out.valid, "long waits for its bytes");
    byte_rdy_dn = 6'b000111;
    #1 chk(long_req_out.valid && long_req_out.is_long && long_req_out.tail_len == 3'd7, "tail request, length 7");
    chk(!inst_rdy, "head waits for acknowledge");
    long_ack_in = 1; #1 chk(inst_rdy && len_oh == 7'b0001000, "head of four bytes");
    tag_out = 4'b1000; #1 chk(preempt_out == 6'b000111, "head preempts three bytes");
    @(negedge clk); tag_out = '0; tag_arrived = 0; long_ack_in = 0; byte_rdy_dn = '0;

    // column receiving a long tail request
    offer(1, 0, 8'h44);
    long_req_in = '{valid: 1'b1, is_long: 1'b1, tail_len: 3'd5, op16: 1'b0, ad16: 1'b0, br: 1'b0};
    @(negedge clk);
    long_req_in = '0;
    #1 chk(long_ack_out && is_tail && len_oh == 7'b0010000, "tail of five bytes");
    byte_rdy_dn = 6'b001111; #1 chk(inst_rdy, "tail ready");
    release_byte();
    #1 chk(!long_ack_out, "tail request dropped with the byte");
    byte_rdy_dn = '0;

    // column receiving a prefix request: B8 iw with operand size 16 -> 3 bytes
    offer(1, 0, 8'hB8);
    #1 chk(len_oh == 7'b0010000, "B8 alone is five bytes");
    pref_req_in = '{valid: 1'b1, is_long: 1'b0, tail_len: 3'd0, op16: 1'b1, ad16: 1'b0, br: 1'b0};
    @(negedge clk);
    pref_req_in = '0;
    #1 chk(pref_ack_out && len_oh == 7'b0000100, "B8 after 66h is three bytes");
    release_byte();

    // predicted-taken branch
    offer(1, 1, 8'h75);
    #1 chk(br && len_oh == 7'b0000010, "branch mark");
    release_byte();
    chk(seq == 2'd3, "line counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
