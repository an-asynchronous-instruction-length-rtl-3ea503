// tb_bist: unit test of the self-test block.
// A reference model of both cellular automata (written from the rule
// description, independently of the RTL functions) runs alongside the block.
// Random take and word strobes are applied, with enable switched on and off;
// every clock the presented line (U/B/T marks, data bytes and 0F escapes) and the
// signature are compared with the model.  Also checks that the generator
// never repeats a state within the run and that the signature reacts to a
// single flipped bit of an input word.
`timescale 1ns/1ps
module tb_bist;
  import rappid_pkg::*;
  localparam logic [NCOL*8-1:0] R150 = {(NCOL/2){16'h5A3C}};
  localparam logic [NCOL*8-1:0] SEED = {(NCOL/2){16'hACE1}};
  localparam logic [CHAN_W-1:0] SR150 = 62'h0C3A_5F17_09E4_6B1D;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, line_valid, line_take, word_valid;
  logic [NCOL*FBYTE_W-1:0] line;
  chan_t word;
  logic [CHAN_W-1:0] signature;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bist dut (.*);
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // model: one step of a null-boundary automaton, bit at a time
  function automatic logic [NCOL*8-1:0] m_gen(logic [NCOL*8-1:0] s);
    logic [NCOL*8+1:0] p;
    p = {1'b0, s, 1'b0};                 // p[i+1] is cell i
    for (int i = 0; i < NCOL*8; i++)
      m_gen[i] = p[i] ^ p[i+2] ^ (R150[i] ? p[i+1] : 1'b0);
  endfunction
  function automatic logic [CHAN_W-1:0] m_sig(logic [CHAN_W-1:0] s, logic [CHAN_W-1:0] d);
    logic [CHAN_W+1:0] p;
    p = {1'b0, s, 1'b0};
    for (int i = 0; i < CHAN_W; i++)
      m_sig[i] = p[i] ^ p[i+2] ^ (SR150[i] ? p[i+1] : 1'b0) ^ d[i];
  endfunction

  logic [NCOL*8-1:0] g;
  logic [CHAN_W-1:0] sg;
  bit first;

  task automatic compare(string where);
    logic [7:0] eb;
    checks++;
    if (line_valid !== enable) begin failures++; $display("%s: line_valid", where); end
    for (int k = 0; k < NCOL; k++) begin
      checks++;
      eb = g[8*k +: 8];
      if (eb < 8'h10) eb = 8'h0F;   // two-opcode escape
      if (line[k*FBYTE_W +: FBYTE_W] !== {1'b1, 1'b0, first && k == 0, eb}) begin
        failures++;
        if (failures < 10) $display("%s: byte %0d %h", where, k, line[k*FBYTE_W +: FBYTE_W]);
      end
    end
    checks++;
    if (signature !== sg) begin failures++; if (failures < 10) $display("%s: signature", where); end
  endtask

  initial begin
    logic [NCOL*8-1:0] seen [$];
    logic [CHAN_W-1:0] s0, s1;
    enable = 1'b0; line_take = 1'b0; word_valid = 1'b0; word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    g = SEED; sg = '0; first = 1'b1;
    #1 compare("reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      enable     = (n % 500) < 450;
      line_take  = $urandom % 3 == 0;
      word_valid = $urandom % 2 == 0;
      word       = chan_t'({$urandom, $urandom});
      @(posedge clk);
      if (enable && line_take) begin g = m_gen(g); first = 1'b0; seen.push_back(g); end
      if (enable && word_valid) sg = m_sig(sg, CHAN_W'(word));
      #1 compare($sformatf("cycle %0d", n));
    end
    // no repeated generator state
    seen.sort();
    for (int i = 1; i < seen.size(); i++) begin
      checks++;
      if (seen[i] == seen[i-1]) begin failures++; $display("generator repeats"); break; end
    end
    // a single flipped bit changes the signature
    s0 = m_sig(sg, CHAN_W'(62'h1234));
    s1 = m_sig(sg, CHAN_W'(62'h1235));
    checks++; if (s0 == s1) failures++;
    @(negedge clk); enable = 1'b1; line_take = 1'b0; word_valid = 1'b1; word = chan_t'(62'h1234);
    @(negedge clk); word_valid = 1'b0;
    checks++; if (signature !== s0) begin failures++; $display("signature after last word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
