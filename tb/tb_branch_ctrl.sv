// tb_branch_ctrl: row 0 starts with inject set and tags the first T column of
// line 0; a BranchTagIn from the previous row sets inject again, and only a T
// byte of the following line number is tagged (a T byte of another line is
// ignored); inject clears when the branch tag is given.  Then a second
// instance at the default parameter (rows 1..3: inject clear after reset) and
// the first one are driven with random branch tags, line numbers and T bytes
// for 3000 clocks and compared every clock with a reference model.
`timescale 1ns/1ps
module tb_branch_ctrl;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCOL-1:0] br_tag_in, br_target, br_tag;
  logic [1:0] col_seq [NCOL];
  logic inject;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  branch_ctrl #(.INIT_INJECT(1'b1)) dut (.*);
  logic [NCOL-1:0] br_tag0;
  logic inject0;
  branch_ctrl dut0 (.clk, .rst_n, .br_tag_in, .col_seq, .br_target, .br_tag(br_tag0), .inject(inject0));

  // reference model state, one per instance
  bit m_inj [2];
  logic [1:0] m_exp [2];
  function automatic logic [NCOL-1:0] m_tag(int i);
    for (int c = 0; c < NCOL; c++)
      if (m_inj[i] && br_target[c] && col_seq[c] == m_exp[i]) return NCOL'(1) << c;
    return '0;
  endfunction
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_(logic [NCOL-1:0] tg, bit inj, string what);
    #1;
    checks++;
    if (br_tag !== tg || inject !== inj) begin
      failures++; $display("%s: br_tag=%h inject=%b", what, br_tag, inject);
    end
  endtask

  initial begin
    br_tag_in = '0; br_target = '0;
    foreach (col_seq[c]) col_seq[c] = 2'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_('0, 1, "waiting for target");
    br_target = 16'h0120;                       // columns 5 and 8, line 0
    expect_(16'h0020, 1, "first target");
    @(negedge clk);
    br_target = '0;
    expect_('0, 0, "inject cleared");
    // branch in column 9 of line 2
    col_seq[9] = 2'd2;
    br_tag_in[9] = 1'b1;
    @(negedge clk);
    br_tag_in = '0;
    expect_('0, 1, "inject set");
    col_seq[3] = 2'd0; br_target = 16'h0008;   // T byte of line 0: wrong line
    expect_('0, 1, "wrong line ignored");
    @(negedge clk);
    col_seq[12] = 2'd3; br_target = 16'h1008;  // T byte of line 3 in column 12
    expect_(16'h1000, 1, "target found");
    @(negedge clk);
    expect_('0, 0, "inject cleared again");

    // random run against the model, both instances from reset
    rst_n = 1'b0; br_tag_in = '0; br_target = '0;
    @(negedge clk); rst_n = 1'b1;
    m_inj[0] = 1'b1; m_inj[1] = 1'b0; m_exp[0] = 2'd0; m_exp[1] = 2'd0;
    for (int n = 0; n < 3000; n++) begin
      logic [NCOL-1:0] t0, t1;
      @(negedge clk);
      foreach (col_seq[c]) col_seq[c] = 2'($urandom);
      br_target = NCOL'($urandom) & NCOL'($urandom) & NCOL'($urandom);
      br_tag_in = ($urandom % 8 == 0) ? NCOL'(1) << ($urandom % NCOL) : '0;
      #1;
      t0 = m_tag(0); t1 = m_tag(1);
      checks++;
      if (br_tag !== t0 || inject !== m_inj[0] || br_tag0 !== t1 || inject0 !== m_inj[1]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: %h/%b exp %h/%b, %h/%b exp %h/%b", n,
                                    br_tag, inject, t0, m_inj[0], br_tag0, inject0, t1, m_inj[1]);
      end
      // model update at the coming edge
      for (int i = 0; i < 2; i++) begin
        if ((i == 0 ? t0 : t1) != '0) m_inj[i] = 1'b0;
        for (int c = 0; c < NCOL; c++)
          if (br_tag_in[c]) begin m_inj[i] = 1'b1; m_exp[i] = col_seq[c] + 2'd1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
