// byte_control: the byte control (BC) state machine of one byte column.
//
// It takes the next byte from the column's input-FIFO lane over a four-phase
// Req/Ack handshake and decides what to do with it.  A byte whose U bit is
// clear (not used: it lies between a taken branch and its target) is thrown
// away; BC only gives a one-clock unused_pulse.  A used byte is captured in
// the byte latch (latch_en for one clock) and byte_rdy is raised and held.
// byte_rdy falls when tag_ack says the byte has left for a steering switch;
// the latch is then open for the next byte.
// Ack is the output of a C-element whose inputs are Req and "want a byte"
// (latch empty and no handshake still returning), so Ack rises when both are
// high and falls when both are low.  seq counts the bytes taken modulo four;
// since every lane delivers one byte per cache line it is the line number of
// the latched byte, which the branch logic uses to find the right target.
// debug_n low blocks the release of the latch: a tag_ack that arrives
// meanwhile is remembered (byte_rdy falls, since the byte is spent) but the
// latch stays closed and no new byte is fetched, so the column halts; raising
// debug_n releases it.
// Timing: a byte is latched on the clock edge where Req and "want" are both
// high; Ack is high the clock after.
// The behaviour (acknowledge on latch, drop unused bytes with a pulse, hold
// ByteRdy until the tag acknowledge) is the published one; the clocked
// realisation and the line counter are this design's own.
module byte_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req,
  input  logic       u,
  input  logic       tag_ack,
  input  logic       debug_n,
  output logic       ack,
  output logic       latch_en,
  output logic       byte_rdy,
  output logic       unused_pulse,
  output logic [1:0] seq
);
  logic latched_q, hold_q, spent_q, want, take;
  logic [1:0] cnt_q;

  assign want = !latched_q && !hold_q;
  assign take = req && want && !ack;

  c_element u_ack_c (.clk, .rst_n, .a(req), .b(want), .y(ack));

  assign latch_en     = take && u;
  assign unused_pulse = take && !u;
  assign byte_rdy     = latched_q && !spent_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched_q <= 1'b0;
      hold_q    <= 1'b0;
      spent_q   <= 1'b0;
      cnt_q     <= '0;
      seq       <= '0;
    end else begin
      if (take) begin
        hold_q <= 1'b1;
        cnt_q  <= cnt_q + 2'd1;
        if (u) begin
          latched_q <= 1'b1;
          seq       <= cnt_q;
        end
      end else if (hold_q && !ack) begin
        hold_q <= 1'b0;
      end
      if (latched_q && (tag_ack || spent_q)) begin
        if (debug_n) begin
          latched_q <= 1'b0;
          spent_q   <= 1'b0;
        end else begin
          spent_q   <= 1'b1;
        end
      end
    end
  end
endmodule
