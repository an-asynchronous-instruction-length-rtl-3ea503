// branch_ctrl: branch control of one row (inject logic).
//
// When a predicted-taken branch fires in the previous row, its tag unit sends
// BranchTagIn (br_tag_in[c]) instead of a normal tag, and this row's inject
// flag is set.  The target instruction's first byte carries the T bit.  While
// inject is set, the first column whose latched byte has T set (br_target)
// receives the branch tag (br_tag), and inject is cleared.  The bytes in
// between (U clear) are never tagged.  Row 0 starts with inject set, so the
// first cache line after reset is entered at its T byte.
// To be sure the T byte belongs to the cache line after the branch and not to
// a later one, inject also remembers the expected line number (branch line
// plus one, modulo four) and only matches a column whose byte has that line
// number; this check is this design's own addition.  One clock from
// BranchTagIn to inject, combinational from inject to br_tag.
module branch_ctrl
  import rappid_pkg::*;
#(
  parameter bit INIT_INJECT = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCOL-1:0] br_tag_in,       // from the previous row, per column
  input  logic [1:0]      col_seq [NCOL],  // line number of each column's byte
  input  logic [NCOL-1:0] br_target,       // column byte latched with T set
  output logic [NCOL-1:0] br_tag,
  output logic            inject
);
  logic [1:0] exp_q;
  logic [NCOL-1:0] match;

  always_comb begin
    br_tag = '0;
    for (int c = 0; c < NCOL; c++) match[c] = br_target[c] && (col_seq[c] == exp_q);
    for (int c = NCOL - 1; c >= 0; c--)
      if (inject && match[c]) br_tag = NCOL'(1) << c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inject <= INIT_INJECT;
      exp_q  <= '0;
    end else begin
      if (|br_tag) inject <= 1'b0;
      for (int c = 0; c < NCOL; c++)
        if (br_tag_in[c]) begin
          inject <= 1'b1;
          exp_q  <= col_seq[c] + 2'd1;
        end
    end
  end
endmodule
