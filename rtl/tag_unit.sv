// tag_unit: tag unit (TU) at one row and column of the torus.
//
// There is a single tag in the array, and it marks the byte column where the
// next instruction starts.  tag_in[k] (TagIn_{k+1}) comes from the tag unit
// k+1 columns upstream in the previous row; br_tag comes from the row's branch
// logic.  Either one sets TagArrived.  The unit fires when TagArrived,
// InstRdy (the column's instruction is complete in the byte latches) and
// SSRdy (the row's steering switch can take it) are all true, in any order.
// On firing it
//   - sends the tag to the column of the next instruction in the next row:
//     tag_out = the one-hot length, so TagOut_L goes to the tag unit L columns
//     downstream; for a predicted-taken branch it sends br_tag_out to the
//     next row's branch logic instead,
//   - makes the row's steering switch take the instruction (fire),
//   - and clears TagArrived.
// Tag outputs are one-clock pulses with no acknowledge, as in the published
// circuit; the pulse is caught by the receiver's TagArrived flip-flop on the
// next edge.  debug_n low blocks the clearing of TagArrived (the debug bit of
// the published circuit): the unit fires once and then keeps TagArrived set,
// a tag arriving meanwhile is remembered, and raising debug_n resumes.
// dbg_tag shows a tag held by the unit, including one caught while frozen.
module tag_unit
  import rappid_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [MAXSHORT-1:0] tag_in,
  input  logic                br_tag,
  input  logic                inst_rdy,
  input  logic                ss_rdy,
  input  logic [MAXSHORT-1:0] len_oh,
  input  logic                br,
  input  logic                debug_n,
  output logic                tag_arrived,
  output logic                dbg_tag,
  output logic                fire,
  output logic [MAXSHORT-1:0] tag_out,
  output logic                br_tag_out
);
  logic arrived_q, hold_q, pend_q, tag_now;

  assign tag_now     = (|tag_in) || br_tag;
  assign tag_arrived = arrived_q && !hold_q;
  assign dbg_tag     = (arrived_q && !hold_q) || pend_q;   // tag held here, for debug scan-out
  assign fire        = arrived_q && !hold_q && inst_rdy && ss_rdy;
  assign tag_out     = (fire && !br) ? len_oh : '0;
  assign br_tag_out  = fire && br;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arrived_q <= 1'b0;
      hold_q    <= 1'b0;
      pend_q    <= 1'b0;
    end else begin
      if (hold_q) begin
        if (tag_now) pend_q <= 1'b1;
        if (debug_n) begin
          hold_q    <= 1'b0;
          pend_q    <= 1'b0;
          arrived_q <= pend_q || tag_now;
        end
      end else if (fire) begin
        if (debug_n) arrived_q <= tag_now;
        else         hold_q    <= 1'b1;
      end else if (tag_now) begin
        arrived_q <= 1'b1;
      end
    end
  end
endmodule
