// output_buffer: output buffer of one row.
//
// A first-in first-out queue of DEPTH channel words written by the row's
// steering switch (push) and read by the consumer with a valid/pop pair.
// ready (space left) is the steering switch's SSRdy, so a full buffer stalls
// the tag in this row.  A push and a pop may happen in the same clock.  The
// published design names the output buffers but gives no depth or interface;
// both are this design's own.
module output_buffer
  import rappid_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  chan_t wdata,
  output logic  ready,
  output logic  valid,
  output chan_t rdata,
  input  logic  pop
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  chan_t mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic do_push, do_pop;

  assign ready   = cnt < ($clog2(DEPTH+1))'(DEPTH);
  assign valid   = cnt != 0;
  assign rdata   = mem[rp];
  assign do_push = push && ready;
  assign do_pop  = pop && valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + ($bits(cnt))'(do_push) - ($bits(cnt))'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= wdata;

  // the steering switch only pushes while the buffer has room
  assert property (@(posedge clk) disable iff (!rst_n) push |-> ready);
endmodule
