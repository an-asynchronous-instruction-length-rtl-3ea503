// tb_tag_unit: directed cases for one tag unit.  The unit must fire only when
// TagArrived, InstRdy and SSRdy are all true, whatever their order; TagOut
// must be the length code for one clock; a branch sends br_tag_out instead;
// TagArrived must clear after firing; with debug_n low it must fire once,
// keep TagArrived, remember a tag arriving meanwhile and resume afterwards.
`timescale 1ns/1ps
module tb_tag_unit;
  import rappid_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [MAXSHORT-1:0] tag_in, len_oh, tag_out;
  logic br_tag, inst_rdy, ss_rdy, br, debug_n, tag_arrived, dbg_tag, fire, br_tag_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tag_unit dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_(bit f, logic [MAXSHORT-1:0] to, bit bo, bit arr, string what);
    #1;
    checks++;
    if (fire !== f || tag_out !== to || br_tag_out !== bo || tag_arrived !== arr) begin
      failures++;
      $display("%s: fire=%b out=%b br=%b arr=%b", what, fire, tag_out, br_tag_out, tag_arrived);
    end
  endtask

  initial begin
    tag_in = '0; br_tag = 0; inst_rdy = 0; ss_rdy = 0; len_oh = 7'b0000100; br = 0; debug_n = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // orders of the three events
    for (int order = 0; order < 6; order++) begin
      int seqv [3];
      case (order)
        0: seqv = '{0, 1, 2}; 1: seqv = '{0, 2, 1}; 2: seqv = '{1, 0, 2};
        3: seqv = '{1, 2, 0}; 4: seqv = '{2, 0, 1}; default: seqv = '{2, 1, 0};
      endcase
      len_oh = '0; len_oh[order] = 1'b1;
      for (int s = 0; s < 3; s++) begin
        @(negedge clk);
        tag_in = '0;
        case (seqv[s])
          0: tag_in[$urandom % MAXSHORT] = 1'b1;
          1: inst_rdy = 1'b1;
          default: ss_rdy = 1'b1;
        endcase
        if (s < 2) expect_(0, '0, 0, dut.arrived_q, "early");
      end
      // InstRdy/SSRdy act in the same clock; a tag is caught on the next edge
      if (seqv[2] == 0) begin
        @(negedge clk);
        tag_in = '0;
      end
      expect_(1, len_oh, 0, 1, "fire");
      @(negedge clk);
      expect_(0, '0, 0, 0, "after fire");
      inst_rdy = 0; ss_rdy = 0;
    end
    // branch
    @(negedge clk); br = 1; br_tag = 1; inst_rdy = 1; ss_rdy = 1;
    @(negedge clk); br_tag = 0;
    expect_(1, '0, 1, 1, "branch fire");
    @(negedge clk); br = 0; inst_rdy = 0;
    expect_(0, '0, 0, 0, "after branch");
    // debug freeze
    debug_n = 0;
    @(negedge clk); tag_in = 7'b1; inst_rdy = 1; ss_rdy = 1;
    @(negedge clk); tag_in = '0;
    expect_(1, len_oh, 0, 1, "debug fire");
    @(negedge clk);
    expect_(0, '0, 0, 0, "debug hold");
    checks++; if (!dut.arrived_q) begin failures++; $display("TagArrived not kept"); end
    tag_in = 7'b10;
    @(negedge clk); tag_in = '0;
    repeat (3) begin @(negedge clk); expect_(0, '0, 0, 0, "still held"); end
    debug_n = 1;
    @(negedge clk);
    expect_(1, len_oh, 0, 1, "resumed with remembered tag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
