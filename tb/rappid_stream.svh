// rappid_stream.svh: instruction-stream generator shared by the system-level
// testbenches.  It builds a byte stream of IA-32 instructions with the U/B/T
// branch bits set as the instruction fetch would set them, packs it into
// 16-byte cache lines, and keeps the list of output words the decoder must
// produce, in program order.  Include it inside a module that imports
// rappid_pkg.

logic [10:0] s_bytes [$];   // {U,B,T,data} per byte, in stream order
chan_t       s_exp   [$];   // expected output words
bit          s_pending_target;
int          s_n_instr, s_n_prefix, s_n_long, s_n_branch;

function automatic int s_pos();
  return s_bytes.size() % NCOL;
endfunction

function automatic void s_unused(int n);
  for (int i = 0; i < n; i++) s_bytes.push_back({3'b000, 8'($urandom)});
endfunction

function automatic void s_fill_line();
  if (s_pos() != 0) s_unused(NCOL - s_pos());
endfunction

function automatic chan_t s_word(logic [7:0] b [$], int from, int n,
                                 bit head, bit tail, bit prefix);
  chan_t w;
  w = '0;
  for (int k = 0; k < n; k++) w.bytes[8*k +: 8] = b[from + k];
  w.len = 3'(n);
  w.head = head; w.tail = tail; w.prefix = prefix;
  return w;
endfunction

// npfx prefix bytes followed by an instruction, all in b
function automatic void s_add(logic [7:0] b [$], int npfx, bit branch);
  int l;
  l = b.size() - npfx;
  for (int i = 0; i < b.size(); i++) begin
    logic bb, tt;
    bb = branch && (i == 0);
    tt = s_pending_target && (i == 0);
    s_bytes.push_back({1'b1, bb, tt, b[i]});
  end
  s_pending_target = 1'b0;
  for (int p = 0; p < npfx; p++) s_exp.push_back(s_word(b, p, 1, 0, 0, 1));
  if (l <= MAXSHORT) s_exp.push_back(s_word(b, npfx, l, 0, 0, 0));
  else begin
    s_exp.push_back(s_word(b, npfx, 4, 1, 0, 0));
    s_exp.push_back(s_word(b, npfx + 4, l - 4, 0, 1, 0));
    s_n_long++;
  end
  s_n_instr++;
  s_n_prefix += npfx;
endfunction

function automatic logic [7:0] rb();
  return 8'($urandom);
endfunction

// one non-branch instruction of the given kind
function automatic void s_add_kind(int kind);
  logic [7:0] b [$];
  int npfx;
  npfx = 0;
  case (kind)
    0:  b = '{8'h90};                                            // NOP           1
    1:  b = '{8'h04, rb()};                                      // ADD AL,ib     2
    2:  b = '{8'h89, 8'hC0 | (rb() & 8'h3F)};                    // MOV r,r       2
    3:  b = '{8'h83, 8'hC0, rb()};                               // ADD r,ib      3
    4:  b = '{8'h0F, 8'hAF, 8'hC1};                              // IMUL r,r      3
    5:  b = '{8'hB8, rb(), rb(), rb(), rb()};                    // MOV r,id      5
    6:  b = '{8'h81, 8'hC0, rb(), rb(), rb(), rb()};             // ADD r,id      6
    7:  b = '{8'hC7, 8'h40, rb(), rb(), rb(), rb(), rb()};       // MOV [r+d8],id 7
    8:  b = '{8'hC7, 8'h44, 8'h24, rb(), rb(), rb(), rb(), rb()};// MOV [esp+d8],id 8
    9:  b = '{8'hC7, 8'h84, 8'h24, rb(), rb(), rb(), rb(),
              rb(), rb(), rb(), rb()};                           // MOV [esp+d32],id 11
    10: b = '{8'h8B, 8'h04, 8'h8D, rb(), rb(), rb(), rb()};      // MOV r,[d32+r*4] 7
    11: begin b = '{8'h66, 8'hB8, rb(), rb()}; npfx = 1; end    // MOV r16,iw    1+3
    12: begin b = '{8'h67, 8'h8B, 8'h46, rb()}; npfx = 1; end    // MOV r,[bp+d8] 1+3
    13: b = '{8'hF7, 8'hC0, rb(), rb(), rb(), rb()};             // TEST r,id     6
    14: b = '{8'hF7, 8'hD0};                                     // NOT r         2
    15: begin b = '{8'h66, 8'h67, 8'hC7, 8'h06, rb(), rb(), rb(), rb()};
              npfx = 2; end                                      // MOV [d16],iw  2+6
    default: b = '{8'h90};
  endcase
  s_add(b, npfx, 1'b0);
endfunction

// a predicted-taken branch; its target is the first instruction placed after
// it, in the next line, after pad unused bytes
function automatic void s_add_branch(int kind, int pad);
  logic [7:0] b [$];
  int npfx;
  npfx = 0;
  case (kind)
    0: b = '{8'h75, rb()};                                       // JNZ rel8      2
    1: b = '{8'hE9, rb(), rb(), rb(), rb()};                     // JMP rel32     5
    2: b = '{8'h0F, 8'h85, rb(), rb(), rb(), rb()};              // JNZ rel32     6
    default: begin b = '{8'h3E, 8'h74, rb()}; npfx = 1; end      // DS: JZ rel8   1+2
  endcase
  while (NCOL - s_pos() < b.size()) s_add_kind(0);
  s_add(b, npfx, 1'b1);
  s_n_branch++;
  s_fill_line();
  s_unused(pad);
  s_pending_target = 1'b1;
endfunction

function automatic logic [NCOL*11-1:0] s_line(int n);
  logic [NCOL*11-1:0] v;
  for (int k = 0; k < NCOL; k++) v[k*11 +: 11] = s_bytes[n*NCOL + k];
  return v;
endfunction
