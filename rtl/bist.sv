// bist: built-in self-test around the decode and steer unit.
//
// A test-pattern generator and a signature analyzer, both cellular automata,
// attached to the interfaces of the decoder core without touching its logic.
//   Generator: a NCOL*8-cell one-dimensional cellular automaton with null
//   boundaries; cell i follows rule 150 (left ^ self ^ right) where RULE150[i]
//   is set and rule 90 (left ^ right) elsewhere.  Each step gives the data
//   bytes of one cache line (byte k = cells 8k+7..8k).  Two-byte opcodes
//   (0F xx) are too rare in such data, so wherever the top four cells of a
//   byte are all zero the byte is replaced by the 0F escape, making the next
//   byte a second opcode byte (about one escape per line).  All bytes are marked
//   used, none is a branch, and the first byte of the first line carries the
//   T bit so that the tag enters there after reset.  line_valid/line_take
//   is the hand-off to the input FIFO's parallel load port; the automaton
//   steps on every take.
//   Signature analyzer: a CHAN_W-cell automaton of the same kind whose cells
//   are XORed with every output word handed to it (word_valid); signature is
//   its state.
// Any byte string is an instruction stream, so the generated lines exercise
// prefixes, long instructions and every length decode without a program.
// The published design uses cellular automata for both parts and tunes the
// generator to the terms of the length-decode PLA and modifies it to emit
// two-opcode sequences; the rule vectors, seeds, sizes and the escape rule
// here are this design's own, and no PLA-term targeting is done.
module bist
  import rappid_pkg::*;
#(
  parameter logic [NCOL*8-1:0] RULE150 = {(NCOL/2){16'h5A3C}},
  parameter logic [NCOL*8-1:0] SEED    = {(NCOL/2){16'hACE1}},
  parameter logic [CHAN_W-1:0] SIG_RULE150 = 62'h0C3A_5F17_09E4_6B1D
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  output logic                  line_valid,
  output logic [NCOL*FBYTE_W-1:0] line,
  input  logic                  line_take,
  input  logic                  word_valid,
  input  chan_t                 word,
  output logic [CHAN_W-1:0]     signature
);
  localparam int unsigned GW = NCOL * 8;

  logic [GW-1:0] gen_q;
  logic          first_q;

  function automatic logic [GW-1:0] gen_step(input logic [GW-1:0] s);
    logic [GW-1:0] n;
    for (int i = 0; i < GW; i++) begin
      logic l, r;
      l = (i == 0)      ? 1'b0 : s[i-1];
      r = (i == GW - 1) ? 1'b0 : s[i+1];
      n[i] = l ^ r ^ (RULE150[i] & s[i]);
    end
    return n;
  endfunction

  function automatic logic [CHAN_W-1:0] sig_step(input logic [CHAN_W-1:0] s,
                                                 input logic [CHAN_W-1:0] d);
    logic [CHAN_W-1:0] n;
    for (int i = 0; i < CHAN_W; i++) begin
      logic l, r;
      l = (i == 0)          ? 1'b0 : s[i-1];
      r = (i == CHAN_W - 1) ? 1'b0 : s[i+1];
      n[i] = l ^ r ^ (SIG_RULE150[i] & s[i]) ^ d[i];
    end
    return n;
  endfunction

  assign line_valid = enable;
  always_comb begin
    for (int k = 0; k < NCOL; k++)
      line[k*FBYTE_W +: FBYTE_W] = {1'b1, 1'b0, first_q && (k == 0),
                                    (gen_q[8*k+4 +: 4] == 4'h0) ? 8'h0F : gen_q[8*k +: 8]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q     <= SEED;
      first_q   <= 1'b1;
      signature <= '0;
    end else begin
      if (enable && line_take) begin
        gen_q   <= gen_step(gen_q);
        first_q <= 1'b0;
      end
      if (enable && word_valid) signature <= sig_step(signature, CHAN_W'(word));
    end
  end
endmodule
