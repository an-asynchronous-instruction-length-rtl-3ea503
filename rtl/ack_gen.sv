// ack_gen: AckGen (AG) of one byte column.
//
// The column's byte has been consumed when either one of the column's tag
// units sends the tag on (this byte started the instruction) or one of the
// six upstream columns preempts it (this byte is byte 2..7 of an instruction
// that started there).  Either event produces TagAck, which opens the byte
// latch.  fired tells IR that the column's own tag unit fired, so that IR
// preempts the rest of the instruction.  Combinational.
module ack_gen
  import rappid_pkg::*;
(
  input  logic [NROW-1:0]     tag_out,     // a tag unit of this column fired
  input  logic [MAXSHORT-2:0] preempt_in,  // [k] from column i-k-1
  output logic                tag_ack,
  output logic                fired
);
  assign fired   = |tag_out;
  assign tag_ack = fired || (|preempt_in);
endmodule
