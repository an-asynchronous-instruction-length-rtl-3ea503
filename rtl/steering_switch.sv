// steering_switch: steering switch (SS) of one row.
//
// A crossbar that takes the instruction whose tag unit fired in this row
// (fire[c], at most one column at a time) and aligns its bytes from the
// byte latches of columns c, c+1, ... (wrapping from column 15 to 0) into one
// 62-bit channel word for the row's output buffer: seven byte lanes, the
// length and the head/tail/prefix marks (see rappid_pkg::chan_t).  Bytes past
// the length are zero.  ss_rdy is the output buffer's free-space signal.
// Combinational: the word is written in the clock cycle of the firing.
// The 62-bit channel and the row-to-buffer wiring are published; the field
// layout of the word is this design's own.
module steering_switch
  import rappid_pkg::*;
(
  input  logic [NCOL-1:0]     fire,
  input  logic [MAXSHORT-1:0] len_oh [NCOL],
  input  logic [NCOL-1:0]     is_head,
  input  logic [NCOL-1:0]     is_tail,
  input  logic [NCOL-1:0]     is_prefix,
  input  logic [7:0]          data [NCOL],
  input  logic                buf_ready,
  output logic                ss_rdy,
  output logic                push,
  output chan_t               word
);
  assign ss_rdy = buf_ready;
  assign push   = |fire;

  always_comb begin
    word = '0;
    for (int c = 0; c < NCOL; c++) begin
      if (fire[c]) begin
        for (int l = 1; l <= MAXSHORT; l++)
          if (len_oh[c][l-1]) word.len = 3'(l);
        for (int k = 0; k < MAXSHORT; k++)
          if (k < int'(word.len)) word.bytes[8*k +: 8] = data[(c + k) % NCOL];
        word.head   = is_head[c];
        word.tail   = is_tail[c];
        word.prefix = is_prefix[c];
      end
    end
  end
endmodule
