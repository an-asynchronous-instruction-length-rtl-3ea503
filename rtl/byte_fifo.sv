// byte_fifo: one byte lane of the input FIFO.
//
// The input FIFO is sixteen independent 11-bit lanes, one per byte of the
// cache line, so every byte column of the decoder takes its next byte as soon
// as it wants it, without waiting for the rest of the line.  This lane is a
// ring of DEPTH entries.  A whole line is written from the scan register with
// wr_en; the read side is a four-phase request/acknowledge handshake with the
// byte column (req rises with data valid, the column raises ack, req falls,
// ack falls).  The entry leaves the lane when req falls:
//   FIFO_NORMAL  the entry is removed,
//   FIFO_RECIRC  the entry is written back at the tail, so the loaded lines
//                repeat for ever,
//   FIFO_FREEZE  nothing moves: the head entry is offered again.
// run gates the read side (the FIFO is filled before the decoder starts).
// While running in FIFO_RECIRC the write port is closed (wr_ready low).
// The lane structure, the 32-line depth and the three modes follow the
// published design; the ring-buffer realisation and the handshake timing
// (one clock per handshake phase) are choices of this model.
module byte_fifo
  import rappid_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_LINES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fifo_mode_e mode,
  input  logic       run,
  // write side (from the scan register)
  input  logic       wr_en,
  input  fbyte_t     wr_data,
  output logic       wr_ready,
  // read side (to the byte column)
  output logic       req,
  output fbyte_t     rd_data,
  input  logic       ack,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fbyte_t          mem [DEPTH];
  logic [AW-1:0]   head, tail;
  logic            req_q;
  logic            pop, do_wr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign wr_ready = (count < ($clog2(DEPTH+1))'(DEPTH)) && !(run && mode == FIFO_RECIRC);
  assign do_wr    = wr_en && wr_ready;
  assign pop      = req_q && ack;
  assign req      = req_q;
  assign rd_data  = mem[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      req_q <= 1'b0;
    end else begin
      // offer the head entry once the previous handshake has fully returned
      if (!req_q && !ack && run && count != 0) req_q <= 1'b1;
      if (pop) req_q <= 1'b0;

      unique case ({do_wr, pop && mode == FIFO_NORMAL, pop && mode == FIFO_RECIRC})
        3'b100: begin tail <= inc(tail); count <= count + 1'b1; end
        3'b010: begin head <= inc(head); count <= count - 1'b1; end
        3'b110: begin tail <= inc(tail); head <= inc(head); end
        3'b001: begin tail <= inc(tail); head <= inc(head); end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr)                              mem[tail] <= wr_data;
    else if (pop && mode == FIFO_RECIRC)    mem[tail] <= mem[head];
  end
endmodule
