// decode_steer_unit: the length decoding and steering unit (DU).
//
// NCOL byte columns (byte_unit) sit above an NROW x NCOL array of tag units
// wired as a torus.  Each row has a steering switch, an output buffer and a
// branch-inject flag.  The single tag moves from the tag unit of an
// instruction's first byte to the tag unit of the next instruction's first
// byte: L columns to the right (wrapping from column 15 to column 0, i.e. into
// the next cache line) and always one row down (row 3 wraps to row 0).
// Consecutive instructions therefore go to consecutive output buffers,
// row 0, 1, 2, 3, 0, ...  A consumer restores program order by reading the
// buffers in that rotation.  Every TagOut_L of the tag unit at (r,c) is a
// dedicated line to TagIn_L of the unit at (r+1, c+L).  A predicted-taken
// branch sends its tag to the next row's inject flag, which hands it to the
// column holding the target's first byte.  Prefixes and instructions longer
// than seven bytes use the column-to-column requests of byte_unit; a long
// instruction leaves as a head word in one row and a tail word in the next.
//
// Interface: one four-phase Req/Ack byte lane per column from the input FIFO;
// a valid/pop pair and a 62-bit word per output buffer; eight debug bits:
// debug_n[r] (r < 4) freezes the TagArrived state of row r's tag units and
// debug_n[4+g] keeps the byte latches of columns 4g..4g+3 from being released.
// dbg_state exposes the state a debug scan captures: the tag held by each of
// the 64 tag units (TagArrived, or a tag caught while frozen) (row-major, bit 16r+c), ByteRdy of the 16 columns and the four
// inject flags.
// Timing (this clocked model): a tag hop takes one clock, so at most one
// instruction (or prefix, head or tail item) leaves per clock.
// The array shape, the wiring and the protocols follow the published design;
// the synchronous timing and the output-buffer depth are this design's own.
module decode_steer_unit
  import rappid_pkg::*;
#(
  parameter int unsigned OBUF_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NCOL-1:0] lane_req,
  input  fbyte_t          lane_data [NCOL],
  output logic [NCOL-1:0] lane_ack,
  input  logic [NDEBUG-1:0] debug_n,
  output logic [NROW*NCOL+NCOL+NROW-1:0] dbg_state,
  output logic [NROW-1:0] out_valid,
  output chan_t           out_word [NROW],
  input  logic [NROW-1:0] out_pop
);
  // per-column signals
  logic [NCOL-1:0] byte_rdy, t_bit, inst_rdy, br, is_head, is_tail, is_prefix;
  logic [NCOL-1:0] tag_arr_col, unused_pulse, pref_ack, long_ack;
  logic [7:0]      data   [NCOL];
  logic [1:0]      seq    [NCOL];
  logic [MAXSHORT-1:0] len_oh  [NCOL];
  logic [MAXSHORT-2:0] preempt [NCOL];
  plreq_t          pref_req [NCOL];
  plreq_t          long_req [NCOL];

  // per-TU signals
  logic [MAXSHORT-1:0] tag_out [NROW][NCOL];
  logic [NCOL-1:0]     fire    [NROW];
  logic [NCOL-1:0]     arrived [NROW];
  logic [NCOL-1:0]     dbg_tag [NROW];
  logic [NCOL-1:0]     br_out  [NROW];
  logic [NCOL-1:0]     br_tag  [NROW];
  logic [NROW-1:0]     ss_rdy, inject;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [7:0]          dn [3];
    logic [MAXSHORT-2:0] rdy_dn, pre_in;
    logic [NROW-1:0]     col_fire, col_arr;

    for (genvar k = 0; k < 3; k++) begin : g_dn
      assign dn[k] = data[(c + k + 1) % NCOL];
    end
    for (genvar k = 0; k < MAXSHORT - 1; k++) begin : g_pre
      assign rdy_dn[k] = byte_rdy[(c + k + 1) % NCOL];
      assign pre_in[k] = preempt[(c + NCOL - k - 1) % NCOL][k];
    end
    for (genvar r = 0; r < NROW; r++) begin : g_or
      assign col_fire[r] = fire[r][c];
      assign col_arr[r]  = arrived[r][c];
    end
    assign tag_arr_col[c] = |col_arr;

    byte_unit u_bu (
      .clk, .rst_n,
      .lane_req    (lane_req[c]),
      .lane_data   (lane_data[c]),
      .lane_ack    (lane_ack[c]),
      .data_dn     (dn),
      .byte_rdy_dn (rdy_dn),
      .preempt_in  (pre_in),
      .preempt_out (preempt[c]),
      .pref_req_in (pref_req[(c + NCOL - 1) % NCOL]),
      .pref_ack_out(pref_ack[c]),
      .pref_req_out(pref_req[c]),
      .pref_ack_in (pref_ack[(c + 1) % NCOL]),
      .long_req_in (long_req[(c + NCOL - 4) % NCOL]),
      .long_ack_out(long_ack[c]),
      .long_req_out(long_req[c]),
      .long_ack_in (long_ack[(c + 4) % NCOL]),
      .tag_arrived (tag_arr_col[c]),
      .debug_n     (debug_n[NROW + c / COLGRP]),
      .tag_out     (col_fire),
      .byte_rdy    (byte_rdy[c]),
      .data        (data[c]),
      .t_bit       (t_bit[c]),
      .seq         (seq[c]),
      .inst_rdy    (inst_rdy[c]),
      .len_oh      (len_oh[c]),
      .br          (br[c]),
      .is_head     (is_head[c]),
      .is_tail     (is_tail[c]),
      .is_prefix   (is_prefix[c]),
      .unused_pulse(unused_pulse[c])
    );
  end

  for (genvar r = 0; r < NROW; r++) begin : g_row
    localparam int unsigned RP = (r + NROW - 1) % NROW;   // previous row
    logic  push, buf_ready;
    chan_t word;

    for (genvar c = 0; c < NCOL; c++) begin : g_tu
      logic [MAXSHORT-1:0] tin;
      for (genvar k = 0; k < MAXSHORT; k++) begin : g_tin
        assign tin[k] = tag_out[RP][(c + NCOL - k - 1) % NCOL][k];
      end
      tag_unit u_tu (
        .clk, .rst_n,
        .tag_in     (tin),
        .br_tag     (br_tag[r][c]),
        .inst_rdy   (inst_rdy[c]),
        .ss_rdy     (ss_rdy[r]),
        .len_oh     (len_oh[c]),
        .br         (br[c]),
        .debug_n    (debug_n[r]),
        .tag_arrived(arrived[r][c]),
        .dbg_tag    (dbg_tag[r][c]),
        .fire       (fire[r][c]),
        .tag_out    (tag_out[r][c]),
        .br_tag_out (br_out[r][c])
      );
    end

    branch_ctrl #(.INIT_INJECT(r == 0)) u_bc (
      .clk, .rst_n,
      .br_tag_in(br_out[RP]),
      .col_seq  (seq),
      .br_target(byte_rdy & t_bit),
      .br_tag   (br_tag[r]),
      .inject   (inject[r])
    );

    steering_switch u_ss (
      .fire     (fire[r]),
      .len_oh   (len_oh),
      .is_head, .is_tail, .is_prefix,
      .data,
      .buf_ready,
      .ss_rdy   (ss_rdy[r]),
      .push,
      .word
    );

    output_buffer #(.DEPTH(OBUF_DEPTH)) u_ob (
      .clk, .rst_n,
      .push, .wdata(word), .ready(buf_ready),
      .valid(out_valid[r]), .rdata(out_word[r]), .pop(out_pop[r])
    );
  end

  // a single tag: at most one tag unit fires per clock
  logic [NROW*NCOL-1:0] fire_flat;
  for (genvar r = 0; r < NROW; r++) begin : g_flat
    assign fire_flat[r*NCOL +: NCOL] = fire[r];
  end
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fire_flat));
  always_comb begin
    for (int r = 0; r < NROW; r++)
      for (int c = 0; c < NCOL; c++)
        dbg_state[r*NCOL + c] = dbg_tag[r][c];
    dbg_state[NROW*NCOL +: NCOL] = byte_rdy;
    dbg_state[NROW*NCOL + NCOL +: NROW] = inject;
  end

endmodule
