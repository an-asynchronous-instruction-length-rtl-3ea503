// byte_unit: one byte column (BU) of the decode and steer unit.
//
// Holds the byte latch, the byte control (BC), the length decoder (LD), the
// instruction ready control (IR) and AckGen (AG) of column i, plus the
// column-to-column handshake used for prefixes and instructions longer than
// seven bytes.  The column latches the next byte of its FIFO lane, decodes
// speculatively the length of an instruction starting at this byte, and raises
// inst_rdy when all bytes of that instruction are latched.  When the column is
// tagged (tag_arrived) and its byte turns out to be
//   - a prefix: it asks column i+1 (pref_req_out) to decode its byte with the
//     prefix applied, waits for the acknowledge, and then presents itself as
//     a one-byte item marked prefix;
//   - the first byte of an instruction of 8..11 bytes: once bytes i+1..i+3
//     are latched it hands the tail length (L-4) to column i+4
//     (long_req_out), waits for the acknowledge, and then presents itself as a
//     four-byte head; column i+4 presents the tail.
// A column that accepted such a request keeps it (mod_q) until its own byte is
// consumed; its acknowledge is the level "request held".  The predicted-taken
// branch mark B moves with these requests to the column that finally sends
// the tag on.  tag_ack (own tag unit fired, or preempted by an upstream
// column) opens the latch; while debug_n is low the latch is kept closed
// (see byte_control).  The length of an opcode the decoder marks rare is
// used one clock after latching, modelling the slower PLA path of the
// published decoder.  All outputs except the registered byte state are
// combinational.  The split into BC/LD/IR/AG and the prefix/long protocol
// follow the published design; the request encoding and the one-clock steps
// are this design's own.
module byte_unit
  import rappid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // input FIFO lane
  input  logic        lane_req,
  input  fbyte_t      lane_data,
  output logic        lane_ack,
  // neighbouring columns
  input  logic [7:0]  data_dn [3],              // bytes of columns i+1..i+3
  input  logic [MAXSHORT-2:0] byte_rdy_dn,      // [k]: column i+k+1
  input  logic [MAXSHORT-2:0] preempt_in,       // [k]: from column i-k-1
  output logic [MAXSHORT-2:0] preempt_out,      // [k]: to column i+k+1
  input  plreq_t      pref_req_in,              // from column i-1
  output logic        pref_ack_out,
  output plreq_t      pref_req_out,             // to column i+1
  input  logic        pref_ack_in,
  input  plreq_t      long_req_in,              // from column i-4
  output logic        long_ack_out,
  output plreq_t      long_req_out,             // to column i+4
  input  logic        long_ack_in,
  // tag units of this column
  input  logic        tag_arrived,
  input  logic        debug_n,
  input  logic [NROW-1:0] tag_out,
  // to tag units and steering switches
  output logic        byte_rdy,
  output logic [7:0]  data,
  output logic        t_bit,
  output logic [1:0]  seq,
  output logic        inst_rdy,
  output logic [MAXSHORT-1:0] len_oh,
  output logic        br,
  output logic        is_head,
  output logic        is_tail,
  output logic        is_prefix,
  output logic        unused_pulse
);
  fbyte_t  latch_q;
  plreq_t  mod_q;
  logic    latch_en, tag_ack, fired;
  logic [3:0] ld_len;
  logic [MAXSHORT-1:0] ld_oh;
  logic    ld_long, ld_prefix, ld_rare, len_ok, br_mark, aged_q, dec_done;

  byte_control u_bc (
    .clk, .rst_n,
    .req(lane_req), .u(lane_data.u), .tag_ack, .debug_n,
    .ack(lane_ack), .latch_en, .byte_rdy, .unused_pulse, .seq
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        latch_q <= '0;
    else if (latch_en) latch_q <= lane_data;

  assign data  = latch_q.data;
  assign t_bit = latch_q.t;

  length_decoder u_ld (
    .b0(latch_q.data), .b1(data_dn[0]), .b2(data_dn[1]), .b3(data_dn[2]),
    .op16(mod_q.valid && !mod_q.is_long && mod_q.op16),
    .ad16(mod_q.valid && !mod_q.is_long && mod_q.ad16),
    .len(ld_len), .len_oh(ld_oh), .is_long(ld_long), .is_prefix(ld_prefix),
    .rare(ld_rare)
  );

  // slow decode class: the length of a rare opcode is trusted one clock
  // after the byte was latched (common opcodes in the clock of latching)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        aged_q <= 1'b0;
    else if (latch_en) aged_q <= 1'b0;
    else               aged_q <= byte_rdy;
  assign dec_done = !ld_rare || aged_q;

  // requests accepted from upstream, held until this byte is consumed
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  mod_q <= '0;
    else if (tag_ack)                            mod_q <= '0;
    else if (!mod_q.valid && byte_rdy) begin
      if (long_req_in.valid)                     mod_q <= long_req_in;
      else if (pref_req_in.valid)                mod_q <= pref_req_in;
    end
  end
  assign long_ack_out = mod_q.valid &&  mod_q.is_long;
  assign pref_ack_out = mod_q.valid && !mod_q.is_long;

  assign is_tail   = mod_q.valid && mod_q.is_long;
  assign is_prefix = !is_tail && ld_prefix;
  assign is_head   = !is_tail && !ld_prefix && ld_long;
  assign br_mark   = latch_q.b || (mod_q.valid && mod_q.br);

  // requests to downstream columns, raised only while this column is tagged
  always_comb begin
    pref_req_out          = '0;
    pref_req_out.valid    = tag_arrived && byte_rdy && is_prefix;
    pref_req_out.op16     = (mod_q.valid && mod_q.op16) || (latch_q.data == 8'h66);
    pref_req_out.ad16     = (mod_q.valid && mod_q.ad16) || (latch_q.data == 8'h67);
    pref_req_out.br       = br_mark;
    long_req_out          = '0;
    long_req_out.valid    = tag_arrived && byte_rdy && dec_done && is_head && (&byte_rdy_dn[2:0]);
    long_req_out.is_long  = 1'b1;
    long_req_out.tail_len = 3'(ld_len - 4'd4);
    long_req_out.br       = br_mark;
  end

  // effective length seen by IR and the tag units
  always_comb begin
    len_oh = ld_oh;
    len_ok = byte_rdy && dec_done;
    if (is_tail) begin
      len_oh = '0;
      len_oh[3'(mod_q.tail_len - 3'd1)] = 1'b1;
      len_ok = byte_rdy;
    end else if (is_prefix) begin
      len_oh = MAXSHORT'(1);
      len_ok = byte_rdy && pref_ack_in;
    end else if (is_head) begin
      len_oh = MAXSHORT'(1 << 3);
      len_ok = byte_rdy && long_ack_in;
    end
  end
  assign br = br_mark && !is_prefix && !is_head;

  ack_gen u_ag (.tag_out, .preempt_in, .tag_ack, .fired);

  instr_ready u_ir (
    .len_oh, .len_ok, .byte_rdy_dn, .fired,
    .inst_rdy, .preempt_dn(preempt_out)
  );
endmodule
