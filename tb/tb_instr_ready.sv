// tb_instr_ready: random lengths and byte-ready patterns; InstRdy must be
// high exactly when the length is known and the L-1 following bytes are
// latched, and Preempt must cover exactly those L-1 columns when fired.
`timescale 1ns/1ps
module tb_instr_ready;
  import rappid_pkg::*;
  logic [MAXSHORT-1:0] len_oh;
  logic len_ok, fired, inst_rdy;
  logic [MAXSHORT-2:0] byte_rdy_dn, preempt_dn;
  int checks = 0, failures = 0;
  instr_ready dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2000) begin
      int l;
      bit exp_rdy;
      logic [MAXSHORT-2:0] exp_pre;
      l = 1 + $urandom % MAXSHORT;
      len_oh = '0; len_oh[l-1] = 1'b1;
      len_ok = 1'($urandom);
      fired = 1'($urandom);
      byte_rdy_dn = (MAXSHORT-1)'($urandom);
      if ($urandom % 2) byte_rdy_dn = '1;
      #1;
      exp_rdy = len_ok;
      exp_pre = '0;
      for (int k = 0; k < l - 1; k++) begin
        if (!byte_rdy_dn[k]) exp_rdy = 1'b0;
        exp_pre[k] = fired;
      end
      checks++;
      if (inst_rdy !== exp_rdy || preempt_dn !== exp_pre) begin
        failures++;
        $display("L=%0d ok=%b rdy=%b fired=%b -> %b %b", l, len_ok, byte_rdy_dn, fired, inst_rdy, preempt_dn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
