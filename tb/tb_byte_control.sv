// tb_byte_control: the testbench plays the FIFO lane (four-phase Req/Ack)
// and the tag acknowledge.  A random sequence of used and unused bytes is
// offered; every used byte must be latched exactly once (latch_en) and hold
// byte_rdy until tag_ack, every unused byte must give exactly one
// unused_pulse, the line counter must count every byte, and Ack must follow
// the four-phase rules.  debug_n is dropped at random times: a byte
// acknowledged while it is low must drop byte_rdy and no new byte may be
// taken until debug_n is high again.
`timescale 1ns/1ps
module tb_byte_control;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, u = 1'b0, tag_ack = 1'b0, debug_n = 1'b1;
  bit spent_tb = 1'b0;
  int n_frozen = 0;
  logic ack, latch_en, byte_rdy, unused_pulse;
  logic [1:0] seq;
  int checks = 0, failures = 0;
  bit us [$];
  int n_offered = 0, n_latched = 0, n_unused = 0, idx = 0, rdy_cycles = 0;
  always #5 clk = ~clk;
  byte_control dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // protocol monitor: ack only rises while req is high, only falls while req is low
  logic ack_d, req_d, chk_seq = 1'b0, chk_drop = 1'b0;
  logic [1:0] exp_seq;
  always @(posedge clk) if (rst_n) begin
    if (spent_tb) begin
      checks++;
      if (latch_en || unused_pulse || byte_rdy) begin failures++; $display("frozen column moved"); end
    end
    if (tag_ack && byte_rdy && !debug_n) begin spent_tb <= 1'b1; n_frozen++; end
    else if (debug_n) spent_tb <= 1'b0;
    ack_d <= ack; req_d <= req;
    chk_seq <= 1'b0;
    chk_drop <= unused_pulse;
    if (chk_drop) begin
      checks++;
      if (byte_rdy) begin failures++; $display("unused byte made ready"); end
    end
    if (chk_seq) begin
      checks++;
      if (seq !== exp_seq) begin failures++; $display("seq %0d exp %0d", seq, exp_seq); end
    end
    if (ack && !ack_d && !req_d) begin failures++; $display("ack rose without req"); end
    if (!ack && ack_d && req_d)  begin failures++; $display("ack fell with req high"); end
    if (latch_en) begin
      checks++;
      n_latched++;
      if (!us[idx]) failures++;
      chk_seq <= 1'b1;
      exp_seq <= 2'(idx);
    end
    if (unused_pulse) begin
      checks++;
      n_unused++;
      if (us[idx]) failures++;
    end
  end

  initial begin
    for (int i = 0; i < 200; i++) us.push_back(($urandom % 3) != 0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (idx < us.size()) begin
      @(negedge clk);
      tag_ack = 1'b0;
      if ($urandom % 25 == 0) debug_n = !debug_n;
      // lane side
      if (req && ack) begin
        req = 1'b0;
        idx++;
      end else if (!req && !ack && idx < us.size()) begin
        req = 1'b1;
        u = us[idx];
      end
      // consumer side: hold the byte a few clocks, then acknowledge it
      if (byte_rdy) begin
        rdy_cycles++;
        if ($urandom % 4 == 0) tag_ack = 1'b1;
      end
    end
    debug_n = 1'b1;
    repeat (10) @(negedge clk);
    checks++;
    if (n_frozen == 0) begin failures++; $display("debug freeze never exercised"); end
    checks++;
    if (n_latched + n_unused != us.size()) begin
      failures++; $display("latched %0d unused %0d of %0d", n_latched, n_unused, us.size());
    end
    // the line counter advanced once per byte: 200 bytes -> back to 0, and the
    // last latched byte carries its own index modulo 4
    checks++;
    if (dut.cnt_q !== 2'(us.size())) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
