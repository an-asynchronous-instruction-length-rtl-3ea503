// length_decoder: speculative IA-32 (32-bit mode) instruction length decode.
//
// Every byte column decodes, in parallel and before it knows whether its byte
// really starts an instruction, the length the instruction would have if it
// started there.  Inputs are the column's own byte b0 and the next three bytes
// b1..b3 (second opcode byte, ModR/M, SIB); op16 and ad16 say that an
// operand-size (66h) or address-size (67h) prefix precedes the instruction.
// Prefix bytes (26 2E 36 3E 64 65 66 67 F0 F2 F3) are reported with
// is_prefix and length 1: the decoder treats each prefix as a separate
// one-byte item that modifies the decode of the following byte.  The length
// excludes prefixes, so it is 1..11.  Lengths 1..7 come out as a one-hot code
// (len_oh[k] means length k+1); longer ones raise is_long and leave len_oh
// zero, because the fast path of the array only handles up to seven bytes.
// Purely combinational.  The published circuit is a domino one-hot decoder
// with a fast path for common opcodes and a NOR-NOR PLA for rare ones.  Here
// the opcode tables are written from the IA-32 opcode map as one flat decode,
// and the output rare marks the opcodes this design treats as the slow
// class (the 0F two-byte map, far call/jump, ENTER, RET imm16, AAM/AAD,
// BOUND); byte_unit waits one extra clock before trusting their length.
// Which opcodes the published PLA holds is not given; this list is own.
module length_decoder
  import rappid_pkg::*;
(
  input  logic [7:0] b0,
  input  logic [7:0] b1,
  input  logic [7:0] b2,
  input  logic [7:0] b3,
  input  logic       op16,
  input  logic       ad16,
  output logic [3:0] len,
  output logic [MAXSHORT-1:0] len_oh,
  output logic       is_long,
  output logic       is_prefix,
  output logic       rare
);
  // bytes taken by ModR/M, SIB and displacement
  function automatic logic [3:0] mrm_len(input logic [7:0] m, input logic [7:0] sib,
                                         input logic a16);
    logic [1:0] md;
    logic [2:0] rm;
    md = m[7:6];
    rm = m[2:0];
    if (md == 2'b11) return 4'd1;
    if (a16) begin
      unique case (md)
        2'b00:   return (rm == 3'd6) ? 4'd3 : 4'd1;
        2'b01:   return 4'd2;
        default: return 4'd3;
      endcase
    end else begin
      logic [3:0] base;
      base = (rm == 3'd4) ? 4'd2 : 4'd1;
      unique case (md)
        2'b00: begin
          if (rm == 3'd5)                          return 4'd5;
          else if (rm == 3'd4 && sib[2:0] == 3'd5) return 4'd6;
          else                                     return base;
        end
        2'b01:   return base + 4'd1;
        default: return base + 4'd4;
      endcase
    end
  endfunction

  logic [3:0] z;    // size of a word/doubleword immediate
  logic [3:0] mo;   // size of a memory offset
  logic [3:0] l;

  assign z  = op16 ? 4'd2 : 4'd4;
  assign mo = ad16 ? 4'd2 : 4'd4;

  always_comb begin
    is_prefix = 1'b0;
    l         = 4'd1;
    priority casez (b0)
      8'h26, 8'h2E, 8'h36, 8'h3E, 8'h64, 8'h65, 8'h66, 8'h67,
      8'hF0, 8'hF2, 8'hF3: is_prefix = 1'b1;
      8'h0F: begin
        // two-byte opcodes: ModR/M in b2, SIB in b3
        unique casez (b1)
          8'b1000_????:                         l = 4'd2 + z;          // Jcc rel
          8'h06, 8'h08, 8'h09, 8'h0B, 8'h30, 8'h31, 8'h32, 8'h33,
          8'h34, 8'h35, 8'h77, 8'hA0, 8'hA1, 8'hA2, 8'hA8, 8'hA9,
          8'hAA, 8'b1100_1???:                  l = 4'd2;              // no operands
          8'h70, 8'h71, 8'h72, 8'h73, 8'hA4, 8'hAC, 8'hBA,
          8'hC2, 8'hC4, 8'hC5, 8'hC6:           l = 4'd3 + mrm_len(b2, b3, ad16);
          default:                              l = 4'd2 + mrm_len(b2, b3, ad16);
        endcase
      end
      // ALU block 00-3F: ModR/M forms, AL/eAX immediates, one-byte rest
      8'b00??_?0??:                              l = 4'd1 + mrm_len(b1, b2, ad16);
      8'b00??_?100:                              l = 4'd2;
      8'b00??_?101:                              l = 4'd1 + z;
      8'b00??_?11?:                              l = 4'd1;
      8'b010?_????:                              l = 4'd1;             // INC/DEC/PUSH/POP
      8'h62, 8'h63:                              l = 4'd1 + mrm_len(b1, b2, ad16);
      8'h68:                                     l = 4'd1 + z;
      8'h69:                                     l = 4'd1 + mrm_len(b1, b2, ad16) + z;
      8'h6A:                                     l = 4'd2;
      8'h6B:                                     l = 4'd2 + mrm_len(b1, b2, ad16);
      8'b0111_????:                              l = 4'd2;             // Jcc rel8
      8'h80, 8'h82, 8'h83:                       l = 4'd2 + mrm_len(b1, b2, ad16);
      8'h81:                                     l = 4'd1 + mrm_len(b1, b2, ad16) + z;
      8'b1000_01??, 8'b1000_1???:                l = 4'd1 + mrm_len(b1, b2, ad16);
      8'h9A, 8'hEA:                              l = 4'd3 + z;         // far pointer
      8'hA0, 8'hA1, 8'hA2, 8'hA3:                l = 4'd1 + mo;
      8'hA8:                                     l = 4'd2;
      8'hA9:                                     l = 4'd1 + z;
      8'b1011_0???:                              l = 4'd2;             // MOV r8,imm8
      8'b1011_1???:                              l = 4'd1 + z;         // MOV r,imm
      8'hC0, 8'hC1, 8'hC6:                       l = 4'd2 + mrm_len(b1, b2, ad16);
      8'hC2, 8'hCA:                              l = 4'd3;
      8'hC4, 8'hC5:                              l = 4'd1 + mrm_len(b1, b2, ad16);
      8'hC7:                                     l = 4'd1 + mrm_len(b1, b2, ad16) + z;
      8'hC8:                                     l = 4'd4;
      8'hCD, 8'hD4, 8'hD5:                       l = 4'd2;
      8'b1101_00??, 8'b1101_1???:                l = 4'd1 + mrm_len(b1, b2, ad16);
      8'b1110_0???, 8'hEB:                       l = 4'd2;             // LOOP/JCXZ/IN/OUT/JMP rel8
      8'hE8, 8'hE9:                              l = 4'd1 + z;
      8'hF6:                                     l = 4'd1 + mrm_len(b1, b2, ad16)
                                                     + ((b1[5:4] == 2'b00) ? 4'd1 : 4'd0);
      8'hF7:                                     l = 4'd1 + mrm_len(b1, b2, ad16)
                                                     + ((b1[5:4] == 2'b00) ? z : 4'd0);
      8'hFE, 8'hFF:                              l = 4'd1 + mrm_len(b1, b2, ad16);
      default:                                   l = 4'd1;
    endcase
  end

  assign len     = l;
  assign is_long = !is_prefix && (l > 4'(MAXSHORT));
  assign rare    = b0 inside {8'h0F, 8'h9A, 8'hEA, 8'hC8, 8'hC2, 8'hCA, 8'hD4, 8'hD5, 8'h62};
  always_comb begin
    len_oh = '0;
    if (!is_long) len_oh[3'(l - 4'd1)] = 1'b1;
  end
endmodule
