// tb_rappid_top: end-to-end test of the instruction length decoder.
//
// Four runs, each from reset, with the top at its default parameters:
//  A. normal FIFO mode: a random stream of IA-32 instructions (lengths 1..11,
//     one- and two-byte opcodes, ModR/M/SIB forms, operand- and address-size
//     prefixes, predicted-taken branches with unused bytes around them) is
//     loaded line by line while the decoder runs; the consumer pops the four
//     output buffers in rotation at random times (so buffers fill and the tag
//     stalls).  A debug bit, loaded through the debug scan chain, freezes
//     one row for a while; the frozen state is captured and shifted out and
//     compared with the internal flags.
//     A second debug bit then freezes the byte latches of four columns.
//  B. recirculate mode: two lines are loaded once and must come out again and
//     again.
//  C. freeze mode: one line is presented repeatedly.
//  D. built-in self-test: the pattern generator feeds the FIFO and the top
//     drains the outputs itself; the bytes of the output words, in order,
//     must be exactly the generated byte stream.
// Every output word is compared with the word expected from the generator,
// in program order.  The test counts how often each mechanism of the design
// happened (unused-byte drop, branch inject, prefix, long head/tail, torus
// wrap, steering stall, preempt, speculative decode, slow decode, debug freeze,
// recirculation, freeze, self-test) and counts a failure for any that never did.
`timescale 1ns/1ps
module tb_rappid_top;
  import rappid_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fifo_mode_e fifo_mode;
  logic run, scan_en, scan_in, load_line, load_ready;
  logic [NROW-1:0] out_valid, out_pop;
  logic dbg_shift, dbg_capture, dbg_update, dbg_si, dbg_so;
  localparam int unsigned DSW = NROW*NCOL + NCOL + NROW;   // core state bits
  localparam int unsigned DW  = NDEBUG + CHAN_W + DSW;     // chain length
  chan_t out_word [NROW];
  logic bist_en;
  logic [CHAN_W-1:0] bist_signature;

  always #5 clk = ~clk;

  rappid_top dut (.*);

  `include "rappid_stream.svh"

  int checks = 0, failures = 0;
  int got, next_row, pop_pct;
  longint cyc = 0;
  int ev_unused, ev_branch, ev_target, ev_wrap, ev_stall, ev_preempt, ev_spec;
  int ev_prefix, ev_head, ev_tail, ev_debug, ev_recirc, ev_freeze, ev_bist, ev_colfrz, ev_slow;
  bit counting;

  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    #(10 * 400_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled every clock
  always @(posedge clk) if (rst_n && counting) begin
    ev_unused += $countones(dut.u_du.unused_pulse);
    for (int r = 0; r < NROW; r++) begin
      ev_branch += $countones(dut.u_du.br_out[r]);
      ev_target += $countones(dut.u_du.br_tag[r]);
      for (int c = 0; c < NCOL; c++) begin
        if (dut.u_du.fire[r][c]) begin
          for (int l = 1; l <= MAXSHORT; l++)
            if (dut.u_du.len_oh[c][l-1] && c + l >= NCOL && !dut.u_du.br[c]) ev_wrap++;
        end
        if (dut.u_du.arrived[r][c] && dut.u_du.inst_rdy[c] && !dut.u_du.ss_rdy[r]) ev_stall++;
      end
    end
    for (int c = 0; c < NCOL; c++) begin
      if (dut.u_du.preempt[c] != '0) ev_preempt++;
      if (dut.u_du.inst_rdy[c] && !dut.u_du.tag_arr_col[c]) ev_spec++;
    end
  end

  // slow decode: the tagged column waits for a rare opcode's length
  for (genvar c = 0; c < NCOL; c++) begin : g_slow
    always @(posedge clk)
      if (rst_n && counting && dut.u_du.tag_arr_col[c] && dut.u_du.g_col[c].u_bu.byte_rdy &&
          !dut.u_du.g_col[c].u_bu.dec_done)
        ev_slow++;
  end

  // all stimulus changes at the falling edge, away from the sampling edge
  task automatic shift_line(logic [NCOL*11-1:0] v);
    for (int i = NCOL*11-1; i >= 0; i--) begin
      @(negedge clk);
      scan_en = 1'b1;
      scan_in = v[i];
    end
    @(negedge clk);
    scan_en = 1'b0;
    while (!load_ready) @(negedge clk);
    load_line = 1'b1;
    @(negedge clk);
    load_line = 1'b0;
  endtask

  // load the eight debug bits through the scan chain
  task automatic dbg_load(logic [NDEBUG-1:0] bits);
    logic [DW-1:0] v;
    v = {bits, {(DW-NDEBUG){1'b0}}};
    for (int i = DW - 1; i >= 0; i--) begin
      @(negedge clk); dbg_shift = 1'b1; dbg_si = v[i];
    end
    @(negedge clk); dbg_shift = 1'b0; dbg_update = 1'b1;
    @(negedge clk); dbg_update = 1'b0;
  endtask

  // capture the state and shift the whole chain out
  task automatic dbg_read(output logic [DW-1:0] v, output logic [DSW-1:0] ref_state);
    @(negedge clk); dbg_capture = 1'b1;
    ref_state = dut.dbg_state;
    @(negedge clk); dbg_capture = 1'b0;
    for (int i = DW - 1; i >= 0; i--) begin
      v[i] = dbg_so;
      dbg_shift = 1'b1; dbg_si = 1'b0;
      @(negedge clk);
    end
    dbg_shift = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    run = 1'b0; scan_en = 1'b0; scan_in = 1'b0; load_line = 1'b0;
    out_pop = '0; bist_en = 1'b0;
    dbg_shift = 1'b0; dbg_capture = 1'b0; dbg_update = 1'b0; dbg_si = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
  endtask

  // consume n expected words (index modulo the expected list), in rotation
  task automatic consume(int n, int pct, output longint cycles);
    longint t0;
    int idle;
    t0 = cyc;
    got = 0; next_row = 0; idle = 0;
    while (got < n && idle < 5000) begin
      @(negedge clk);
      out_pop = '0;
      if (out_valid[next_row] && ($urandom % 100) < pct) begin
        chan_t w, e;
        w = out_word[next_row];
        e = s_exp[got % s_exp.size()];
        checks++;
        if (w !== e) begin
          failures++;
          if (failures < 10)
            $display("word %0d row %0d: got %h exp %h", got, next_row, w, e);
        end
        if (w.prefix) ev_prefix++;
        if (w.head)   ev_head++;
        if (w.tail)   ev_tail++;
        out_pop[next_row] = 1'b1;
        next_row = (next_row + 1) % NROW;
        got++;
        idle = 0;
      end else idle++;
    end
    @(negedge clk);
    out_pop = '0;
    cycles = cyc - t0;
    if (got < n) begin
      failures++;
      $display("only %0d of %0d words came out", got, n);
    end
  endtask

  initial begin
    longint cyc_used;
    int nlines, debug_seen;
    counting = 1'b1;
    fifo_mode = FIFO_NORMAL;
    do_reset();

    // ---------------- A: normal mode, random stream ----------------
    s_bytes.delete(); s_exp.delete();
    s_pending_target = 1'b1;
    s_unused(3);
    for (int i = 0; i < 400; i++) begin
      if (($urandom % 100) < 7) s_add_branch($urandom % 4, $urandom % 9);
      else                      s_add_kind($urandom % 16);
    end
    s_fill_line();
    nlines = s_bytes.size() / NCOL;
    $display("A: %0d instructions, %0d lines, %0d words, %0d branches, %0d long, %0d prefixes",
             s_n_instr, nlines, s_exp.size(), s_n_branch, s_n_long, s_n_prefix);
    debug_seen = 0;
    fork
      begin
        for (int n = 0; n < nlines; n++) begin
          shift_line(s_line(n));
          if (n == 3) run = 1'b1;
        end
        run = 1'b1;
      end
      consume(s_exp.size(), 60, cyc_used);
      begin
        // freeze row 1 for a while once output is flowing
        int n_before, n_after;
        logic [DW-1:0] sv;
        logic [DSW-1:0] ref_state;
        wait (got > 100);
        dbg_load(8'b1111_1101);
        repeat (150) @(negedge clk);
        n_before = got;
        repeat (100) @(negedge clk);
        n_after = got;
        // the state seen through the chain is the state held in the core
        dbg_read(sv, ref_state);
        checks++;
        if (sv[DW-1 -: NDEBUG] !== 8'b1111_1101 || sv[DSW-1:0] !== ref_state) begin
          failures++;
          $display("debug scan-out differs from the core state");
        end
        checks++;
        // the halted array holds exactly one tag
        if ($countones(sv[NROW*NCOL-1:0]) != 1) begin
          failures++;
          $display("scan-out shows %0d tags", $countones(sv[NROW*NCOL-1:0]));
        end
        // with row 1 frozen nothing new can pass that row for long
        checks++;
        if (n_after - n_before > 8) begin
          failures++;
          $display("debug freeze: output kept flowing (%0d words)", n_after - n_before);
        end else ev_debug++;
        dbg_load('1);
        // freeze the byte latches of columns 8..11
        wait (got > 200);
        dbg_load(8'b1011_1111);
        repeat (100) @(negedge clk);
        n_before = got;
        repeat (100) @(negedge clk);
        n_after = got;
        checks++;
        if (n_after - n_before > 8) begin
          failures++;
          $display("column freeze: output kept flowing (%0d words)", n_after - n_before);
        end else ev_colfrz++;
        dbg_load('1);
        debug_seen = 1;
      end
    join
    checks++;
    if (debug_seen == 0) failures++;

    // ---------------- B: recirculate mode ----------------
    do_reset();
    s_bytes.delete(); s_exp.delete();
    s_pending_target = 1'b1;
    while (s_bytes.size() < 2 * NCOL) begin
      int k;
      k = $urandom % 16;
      if (k == 9 || k == 8 || k == 15) k = 3;
      s_add_kind(k);
      while (s_bytes.size() > 2 * NCOL - 8 && s_bytes.size() < 2 * NCOL) s_add_kind(0);
    end
    fifo_mode = FIFO_RECIRC;
    shift_line(s_line(0));
    shift_line(s_line(1));
    run = 1'b1;
    consume(4 * s_exp.size(), 25, cyc_used);
    if (got == 4 * s_exp.size()) ev_recirc++;

    // ---------------- C: freeze mode, one repeated line ----------------
    do_reset();
    s_bytes.delete(); s_exp.delete();
    s_pending_target = 1'b1;
    for (int i = 0; i < 4; i++) s_add_kind(1);
    for (int i = 0; i < 8; i++) s_add_kind(0);
    fifo_mode = FIFO_FREEZE;
    shift_line(s_line(0));
    run = 1'b1;
    consume(5 * s_exp.size(), 100, cyc_used);
    if (got == 5 * s_exp.size()) ev_freeze++;
    $display("C: %0d words in %0d clocks", got, cyc_used);
    fifo_mode = FIFO_NORMAL;

    // ---------------- D: built-in self-test ----------------
    do_reset();
    @(negedge clk);
    bist_en = 1'b1;
    run = 1'b1;
    begin
      logic [7:0] gen_b [$];
      logic [7:0] out_b [$];
      logic [CHAN_W-1:0] sig_prev;
      int nwords, bad;
      nwords = 0; bad = 0;
      sig_prev = bist_signature;
      while (nwords < 600 && cyc < 400_000) begin
        // sample between edges: a take or pop seen here happens at the next edge
        #1;
        if (dut.bist_take)
          for (int k = 0; k < NCOL; k++) gen_b.push_back(dut.bist_line[k*FBYTE_W +: 8]);
        if (dut.bist_word_valid) begin
          chan_t w;
          w = dut.out_word[dut.bist_row_q];
          for (int k = 0; k < int'(w.len); k++) out_b.push_back(w.bytes[8*k +: 8]);
          nwords++;
        end
        @(negedge clk);
      end
      @(posedge clk);
      checks++;
      if (nwords < 600) begin
        failures++;
        $display("D: only %0d words", nwords);
      end
      for (int i = 0; i < out_b.size(); i++) begin
        checks++;
        if (i >= gen_b.size() || out_b[i] !== gen_b[i]) begin
          bad++; failures++;
          if (bad < 5) $display("D: byte %0d differs: %h vs %h", i, out_b[i], gen_b[i]);
        end
      end
      checks++;
      if (bist_signature == sig_prev) failures++;
      if (bad == 0 && nwords >= 600) ev_bist++;
      $display("D: %0d words, %0d bytes out of %0d generated, signature %h",
               nwords, out_b.size(), gen_b.size(), bist_signature);
    end
    bist_en = 1'b0;

    counting = 1'b0;
    $display("mechanisms: unused=%0d branch=%0d target=%0d prefix=%0d head=%0d tail=%0d wrap=%0d stall=%0d preempt=%0d speculative=%0d debug=%0d recirc=%0d freeze=%0d bist=%0d colfreeze=%0d slowdecode=%0d",
             ev_unused, ev_branch, ev_target, ev_prefix, ev_head, ev_tail, ev_wrap,
             ev_stall, ev_preempt, ev_spec, ev_debug, ev_recirc, ev_freeze, ev_bist, ev_colfrz, ev_slow);
    begin
      int evs [16];
      evs = '{ev_unused, ev_branch, ev_target, ev_prefix, ev_head, ev_tail, ev_wrap,
              ev_stall, ev_preempt, ev_spec, ev_debug, ev_recirc, ev_freeze, ev_bist, ev_colfrz, ev_slow};
      foreach (evs[i]) begin
        checks++;
        if (evs[i] == 0) begin
          failures++;
          $display("mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
