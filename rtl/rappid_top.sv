// rappid_top: asynchronous-style IA-32 instruction length decoder and steering
// unit with its input FIFO.
//
// Cache lines of 16 bytes (each byte with pre-decoded U/B/T branch bits) are
// shifted serially into the input FIFO and loaded a line at a time.  With run
// high, the sixteen FIFO lanes feed the sixteen byte columns of the decode and
// steer unit, which finds the instruction boundaries and sends each
// instruction to one of four output buffers in strict rotation (row 0, 1, 2,
// 3, 0, ...).  fifo_mode selects normal consumption, recirculation of the
// loaded lines, or repetition of the head line (the test modes of the
// published chip).
// Debug: a scan chain (dbg_shift/dbg_si/dbg_so, see debug_scan) loads eight
// debug bits on dbg_update.  Bits 0..3 low freeze the tag state of rows
// 0..3; bits 4..7 low keep the byte latches of column groups 0-3, 4-7, 8-11,
// 12-15 from being released, so the decoder halts with its state held.
// dbg_capture copies the tag-arrived flags, byte-ready flags, inject flags
// and the self-test signature into the same chain for shifting out.
// With bist_en high the built-in self-test takes over: its cellular-automaton
// generator writes lines into the FIFO whenever there is room (run must be
// high, mode normal), the output buffers are read in rotation by the top
// itself (out_pop is ignored) and every word is folded into bist_signature.
// Each output word is a rappid_pkg::chan_t: up to seven instruction bytes,
// their count and head/tail/prefix marks.
// Everything runs on one clock in this model, one clock per handshake step
// or pulse.  The structure (FIFO, 16 x 4 torus, four output buffers, test
// modes, eight debug bits in a scan chain, cellular-automaton self-test)
// follows the published design; the clocking, the output interface, the
// debug-bit assignment and the self-test hook-up are this design's own.
module rappid_top
  import rappid_pkg::*;
#(
  parameter int unsigned LINES      = FIFO_LINES,
  parameter int unsigned OBUF_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  fifo_mode_e      fifo_mode,
  input  logic            run,
  input  logic            scan_en,
  input  logic            scan_in,
  input  logic            load_line,
  output logic            load_ready,
  input  logic            dbg_shift,
  input  logic            dbg_capture,
  input  logic            dbg_update,
  input  logic            dbg_si,
  output logic            dbg_so,
  output logic [NROW-1:0] out_valid,
  output chan_t           out_word [NROW],
  input  logic [NROW-1:0] out_pop,
  input  logic            bist_en,
  output logic [CHAN_W-1:0] bist_signature
);
  logic [NCOL-1:0] lane_req, lane_ack;
  fbyte_t          lane_data [NCOL];

  logic            bist_line_valid, bist_take;
  logic [NCOL*FBYTE_W-1:0] bist_line;
  logic [NROW-1:0] du_pop;
  logic [$clog2(NROW)-1:0] bist_row_q;
  logic            bist_word_valid;
  logic [NDEBUG-1:0] debug_n;
  logic [NROW*NCOL+NCOL+NROW-1:0] dbg_state;

  input_fifo #(.LINES(LINES)) u_if (
    .clk, .rst_n,
    .mode(fifo_mode), .run, .scan_en, .scan_in, .load_line,
    .par_load(bist_take), .par_line(bist_line), .load_ready,
    .lane_req, .lane_data, .lane_ack
  );

  decode_steer_unit #(.OBUF_DEPTH(OBUF_DEPTH)) u_du (
    .clk, .rst_n,
    .lane_req, .lane_data, .lane_ack,
    .debug_n, .dbg_state, .out_valid, .out_word, .out_pop(du_pop)
  );

  // self-test: the generator fills the FIFO whenever it has room, and the
  // output buffers are read in rotation into the signature analyzer
  assign bist_take       = bist_en && bist_line_valid && load_ready;
  assign bist_word_valid = bist_en && out_valid[bist_row_q];
  always_comb begin
    du_pop = out_pop;
    if (bist_en) begin
      du_pop = '0;
      du_pop[bist_row_q] = bist_word_valid;
    end
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)               bist_row_q <= '0;
    else if (bist_word_valid) bist_row_q <= bist_row_q + 1'b1;

  bist u_bist (
    .clk, .rst_n,
    .enable    (bist_en),
    .line_valid(bist_line_valid),
    .line      (bist_line),
    .line_take (bist_take),
    .word_valid(bist_word_valid),
    .word      (out_word[bist_row_q]),
    .signature (bist_signature)
  );

  // the debug chain and the signature share the scan-out path
  debug_scan #(.STATE_W(CHAN_W + NROW*NCOL + NCOL + NROW)) u_dbg (
    .clk, .rst_n,
    .shift  (dbg_shift),
    .capture(dbg_capture),
    .update (dbg_update),
    .si     (dbg_si),
    .so     (dbg_so),
    .state  ({bist_signature, dbg_state}),
    .debug_n
  );
endmodule
