// rappid_pkg: types and constants shared by the instruction length decoder.
//
// The decoder takes 16-byte instruction cache lines, finds where each IA-32
// instruction starts, and steers every instruction to one of four output
// buffers.  The array is 16 byte columns by 4 tag-unit rows wired as a torus.
// The numbers below (16 columns, 4 rows, 32-line input FIFO, 11-bit FIFO
// bytes, 7-byte fast path, 11-byte longest instruction, 62-bit steering
// channel) are the published ones.  The field layout of the 62-bit channel
// word and of the prefix/long request are this implementation's own choice.
package rappid_pkg;

  localparam int unsigned NCOL       = 16;  // byte columns (one per cache-line byte)
  localparam int unsigned NROW       = 4;   // tag-unit / steering-switch rows
  localparam int unsigned FIFO_LINES = 32;  // cache lines held by the input FIFO
  localparam int unsigned MAXSHORT   = 7;   // longest instruction on the fast path
  localparam int unsigned MAXLEN     = 11;  // longest instruction handled at all
  localparam int unsigned CHAN_W     = 62;  // steering-switch channel width
  localparam int unsigned NDEBUG     = 8;   // debug bits in the scan chain
  localparam int unsigned COLGRP     = NCOL / (NDEBUG - NROW);  // columns per byte-debug bit


  // One byte of the input FIFO: 8 data bits plus the three pre-decoded
  // branch-target-buffer bits (11 bits in all).
  typedef struct packed {
    logic       u;     // byte is used
    logic       b;     // first byte of a predicted-taken branch
    logic       t;     // first byte of a branch target
    logic [7:0] data;
  } fbyte_t;

  localparam int unsigned FBYTE_W = $bits(fbyte_t);  // 11

  // Request passed from one byte column to a downstream column when the
  // upstream column holds a prefix byte (sent to column i+1) or the first
  // byte of an instruction longer than seven bytes (sent to column i+4).
  typedef struct packed {
    logic       valid;
    logic       is_long;   // 1: long-instruction tail, 0: prefixed instruction
    logic [2:0] tail_len;  // long: length of the tail (4..7)
    logic       op16;      // operand-size prefix seen upstream
    logic       ad16;      // address-size prefix seen upstream
    logic       br;        // predicted-taken branch mark carried downstream
  } plreq_t;

  // One word of a steering-switch channel, 62 bits:
  // 7 instruction bytes (56), length (3), and head/tail/prefix marks (3).
  typedef struct packed {
    logic [55:0] bytes;    // byte 0 of the instruction in bits 7:0
    logic [2:0]  len;      // number of valid bytes, 1..7
    logic        head;     // first four bytes of an instruction longer than 7
    logic        tail;     // remaining bytes of an instruction longer than 7
    logic        prefix;   // a single prefix byte
  } chan_t;

  // Input FIFO operating modes.
  typedef enum logic [1:0] {
    FIFO_NORMAL = 2'd0,  // lines are consumed
    FIFO_RECIRC = 2'd1,  // consumed lines are written back at the tail
    FIFO_FREEZE = 2'd2   // the head line is presented again and again
  } fifo_mode_e;

endpackage
