// debug_scan: the debug scan chain of the decoder.
//
// One serial chain carries the debug bits in and the frozen circuit state
// out.  The chain is NDEBUG + STATE_W flip-flops: the top NDEBUG positions
// hold debug bits, the rest hold captured state.
//   shift    moves the chain one place toward the most significant end:
//            si enters at bit 0, so shows the most significant bit.
//   capture  copies state into the state part and the current debug bits
//            into the debug part, ready to be shifted out.
//   update   copies the debug part of the chain into the debug bits that
//            drive the circuit (debug_n), so shifting never disturbs them.
// To set the debug bits, shift NDEBUG + STATE_W bits in (the first bit
// shifted ends in the most significant position, i.e. debug_n[NDEBUG-1]) and
// pulse update.  To read the state, pulse capture and shift out; the first
// bit out is debug_n[NDEBUG-1], then state from its top bit down.
// A low debug bit blocks the reset of some state signals in the core so that
// the circuit halts with its state held; raising it lets the circuit resume.
// Reset leaves every debug bit high (normal running).  shift has priority
// over capture, capture over update.
// The eight debug bits in the scan chain, and scanning out the frozen state
// through flip-flops shared with the self-test signature, follow the
// published design; the chain order and the separate update strobe are this
// design's own.
module debug_scan
  import rappid_pkg::*;
#(
  parameter int unsigned STATE_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift,
  input  logic               capture,
  input  logic               update,
  input  logic               si,
  output logic               so,
  input  logic [STATE_W-1:0] state,
  output logic [NDEBUG-1:0]  debug_n
);
  localparam int unsigned W = NDEBUG + STATE_W;

  logic [W-1:0] chain_q;

  assign so = chain_q[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_q <= {{NDEBUG{1'b1}}, {STATE_W{1'b0}}};
      debug_n <= '1;
    end else begin
      if (shift)        chain_q <= {chain_q[W-2:0], si};
      else if (capture) chain_q <= {debug_n, state};
      else if (update)  debug_n <= chain_q[W-1 -: NDEBUG];
    end
  end
endmodule
