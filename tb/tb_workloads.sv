// tb_workloads: the decoder's benchmark lines, run on the top at its
// default parameters.
//  X0..X8  one line of i two-byte instructions (length known from the first
//          byte) followed by 16-2i one-byte instructions, presented again and
//          again from the head of the FIFO (freeze mode).
//  I0      one line of eight two-byte instructions whose length depends on
//          the ModR/M byte.
//  C34     one line of four three-byte and one four-byte instruction.
//  C223    one line of two two-byte and four three-byte instructions.
//  Mix0    14 lines of instructions of length 1..5, recirculated.
//  Mix1    18 lines of instructions of length 1..7, recirculated.
// The exact opcodes are this testbench's own choice.  Every output word is
// checked against the expected word, and the steady-state rate in words per
// clock is printed for each test (with the consumer popping one word every
// clock).
`timescale 1ns/1ps
module tb_workloads;
  import rappid_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fifo_mode_e fifo_mode;
  logic run, scan_en, scan_in, load_line, load_ready;
  logic [NROW-1:0] out_valid, out_pop;
  logic dbg_shift, dbg_capture, dbg_update, dbg_si, dbg_so;
  chan_t out_word [NROW];
  logic bist_en;
  logic [CHAN_W-1:0] bist_signature;

  always #5 clk = ~clk;
  rappid_top dut (.*);

  `include "rappid_stream.svh"

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #(10 * 300_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_line(logic [NCOL*11-1:0] v);
    for (int i = NCOL*11-1; i >= 0; i--) begin
      @(negedge clk); scan_en = 1'b1; scan_in = v[i];
    end
    @(negedge clk); scan_en = 1'b0;
    while (!load_ready) @(negedge clk);
    load_line = 1'b1;
    @(negedge clk); load_line = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    run = 1'b0; scan_en = 1'b0; scan_in = 1'b0; load_line = 1'b0;
    dbg_shift = 1'b0; dbg_capture = 1'b0; dbg_update = 1'b0; dbg_si = 1'b0;
    out_pop = '0; bist_en = 1'b0; fifo_mode = FIFO_NORMAL;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    s_bytes.delete(); s_exp.delete();
    s_pending_target = 1'b1;
    s_n_instr = 0; s_n_prefix = 0; s_n_long = 0; s_n_branch = 0;
  endtask

  // pop n words in rotation, every clock if available; return the clocks
  // taken by the second half (steady state)
  task automatic consume(int n, output longint half_cycles);
    int got, row, idle;
    longint t_half;
    got = 0; row = 0; idle = 0; t_half = cyc;
    while (got < n && idle < 2000) begin
      @(negedge clk);
      out_pop = '0;
      if (out_valid[row]) begin
        checks++;
        if (out_word[row] !== s_exp[got % s_exp.size()]) begin
          failures++;
          if (failures < 10) $display("word %0d: got %h exp %h", got, out_word[row], s_exp[got % s_exp.size()]);
        end
        out_pop[row] = 1'b1;
        row = (row + 1) % NROW;
        got++;
        idle = 0;
        if (got == n / 2) t_half = cyc;
      end else idle++;
    end
    half_cycles = cyc - t_half;
    @(negedge clk); out_pop = '0;
    checks++;
    if (got < n) begin failures++; $display("only %0d of %0d words", got, n); end
  endtask

  function automatic void add(logic [7:0] b [$]);
    s_add(b, 0, 1'b0);
  endfunction

  function automatic void add_len(int l);
    case (l)
      1: add('{8'h90});
      2: add('{8'hB0, rb()});
      3: add('{8'h83, 8'hC0, rb()});
      4: add('{8'h8B, 8'h44, 8'h24, rb()});
      5: add('{8'h05, rb(), rb(), rb(), rb()});
      6: add('{8'h81, 8'hC1, rb(), rb(), rb(), rb()});
      default: add('{8'hC7, 8'h40, rb(), rb(), rb(), rb(), rb()});
    endcase
  endfunction

  task automatic run_single(string name);
    longint hc;
    int n;
    n = 40 * s_exp.size();
    fifo_mode = FIFO_FREEZE;
    shift_line(s_line(0));
    run = 1'b1;
    consume(n, hc);
    $display("%-5s %2d instructions/line: %0d words in %0d clocks, %0.3f words/clock",
             name, s_exp.size(), n - n / 2, hc, real'(n - n / 2) / real'(hc));
  endtask

  task automatic run_mix(string name, int nlines, int maxlen);
    longint hc;
    int n;
    while (s_bytes.size() < nlines * NCOL) begin
      int l;
      l = 1 + $urandom % maxlen;
      if (s_bytes.size() + l > nlines * NCOL) l = nlines * NCOL - s_bytes.size();
      add_len(l);
    end
    fifo_mode = FIFO_RECIRC;
    for (int i = 0; i < nlines; i++) shift_line(s_line(i));
    run = 1'b1;
    n = 6 * s_exp.size();
    consume(n, hc);
    $display("%-5s %0d lines, %0d instructions: %0d words in %0d clocks, %0.3f words/clock",
             name, nlines, s_exp.size(), n - n / 2, hc, real'(n - n / 2) / real'(hc));
  endtask

  initial begin
    for (int i = 0; i <= 8; i++) begin
      do_reset();
      for (int k = 0; k < i; k++) add_len(2);
      for (int k = 0; k < 16 - 2 * i; k++) add_len(1);
      run_single($sformatf("X%0d", i));
    end
    do_reset();
    for (int k = 0; k < 8; k++) add('{8'h8B, 8'hC0 | 8'($urandom % 64)});
    run_single("I0");
    do_reset();
    for (int k = 0; k < 4; k++) add_len(3);
    add_len(4);
    run_single("C34");
    do_reset();
    for (int k = 0; k < 2; k++) add_len(2);
    for (int k = 0; k < 4; k++) add_len(3);
    run_single("C223");
    do_reset();
    run_mix("Mix0", 14, 5);
    do_reset();
    run_mix("Mix1", 18, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
