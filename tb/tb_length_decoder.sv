// tb_length_decoder: known IA-32 encodings with their lengths, taken from the
// instruction set reference (not from the decoder), with and without the
// operand- and address-size prefixes applied.  Bytes beyond those that
// decide the length are random.  Checks the length, the one-hot code, the
// long flag and the prefix flag.
`timescale 1ns/1ps
module tb_length_decoder;
  import rappid_pkg::*;
  logic [7:0] b0, b1, b2, b3;
  logic op16, ad16, is_long, is_prefix, rare;
  logic [3:0] len;
  logic [MAXSHORT-1:0] len_oh;
  int checks = 0, failures = 0;
  length_decoder dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // n: number of leading bytes given (rest random); L: expected length, 0 = prefix
  task automatic t(int n, logic [31:0] bytes, bit o16, bit a16, int L);
    logic [7:0] v [4];
    for (int k = 0; k < 4; k++) v[k] = (k < n) ? bytes[31 - 8*k -: 8] : 8'($urandom);
    {b0, b1, b2, b3} = {v[0], v[1], v[2], v[3]};
    op16 = o16; ad16 = a16;
    #1;
    // the slow class: two-byte map and a few rare one-byte opcodes
    checks++;
    if (rare !== (v[0] inside {8'h0F, 8'h9A, 8'hEA, 8'hC8, 8'hC2, 8'hCA, 8'hD4, 8'hD5, 8'h62})) begin
      failures++; $display("%h: rare flag %b", bytes, rare);
    end
    checks++;
    if (L == 0) begin
      if (!is_prefix || len != 1) begin failures++; $display("%h: not a prefix", bytes); end
    end else begin
      logic [MAXSHORT-1:0] oh;
      oh = '0;
      if (L <= MAXSHORT) oh[L-1] = 1'b1;
      if (is_prefix || int'(len) != L || len_oh !== oh || is_long !== (L > MAXSHORT)) begin
        failures++;
        $display("%h o16=%b a16=%b: len %0d oh %b long %b, exp %0d", bytes, o16, a16, len, len_oh, is_long, L);
      end
    end
  endtask

  initial begin
    repeat (4) begin
      t(1, 32'h90000000, 0, 0, 1);   t(1, 32'h40000000, 0, 0, 1);
      t(1, 32'h27000000, 0, 0, 1);   t(1, 32'h06000000, 0, 0, 1);
      t(1, 32'h04000000, 0, 0, 2);   t(1, 32'h3C000000, 0, 0, 2);
      t(1, 32'h05000000, 0, 0, 5);   t(1, 32'h05000000, 1, 0, 3);
      t(2, 32'h89C00000, 0, 0, 2);   t(2, 32'h89000000, 0, 0, 2);
      t(3, 32'h89042400, 0, 0, 3);   t(2, 32'h89050000, 0, 0, 6);
      t(3, 32'h89042500, 0, 0, 7);   t(3, 32'h89442400, 0, 0, 4);
      t(3, 32'h89842400, 0, 0, 7);   t(2, 32'h89400000, 0, 0, 3);
      t(2, 32'h89800000, 0, 0, 6);
      t(2, 32'h89060000, 0, 1, 4);   t(2, 32'h89460000, 0, 1, 3);
      t(2, 32'h89860000, 0, 1, 4);   t(2, 32'h89000000, 0, 1, 2);
      t(2, 32'h0F840000, 0, 0, 6);   t(2, 32'h0F840000, 1, 0, 4);
      t(3, 32'h0FAFC100, 0, 0, 3);   t(4, 32'h0FAF0424, 0, 0, 4);
      t(2, 32'h0FA20000, 0, 0, 2);   t(2, 32'h0F310000, 0, 0, 2);
      t(3, 32'h0FBAE000, 0, 0, 4);   t(3, 32'h0F71D000, 0, 0, 4);
      t(3, 32'h0F6F0500, 0, 0, 7);   t(2, 32'h0FC80000, 0, 0, 2);
      t(3, 32'hC7842400, 0, 0, 11);  t(3, 32'hC7442400, 0, 0, 8);
      t(2, 32'hC7050000, 0, 0, 10);  t(2, 32'hC7000000, 0, 0, 6);
      t(2, 32'hC7000000, 1, 0, 4);   t(2, 32'h81800000, 0, 0, 10);
      t(2, 32'h83C00000, 0, 0, 3);   t(2, 32'h80C00000, 0, 0, 3);
      t(2, 32'h69C00000, 0, 0, 6);   t(2, 32'h6BC00000, 0, 0, 3);
      t(1, 32'h68000000, 0, 0, 5);   t(1, 32'h6A000000, 0, 0, 2);
      t(1, 32'hE8000000, 0, 0, 5);   t(1, 32'hEB000000, 0, 0, 2);
      t(1, 32'h75000000, 0, 0, 2);   t(1, 32'h9A000000, 0, 0, 7);
      t(1, 32'hEA000000, 1, 0, 5);   t(1, 32'hA1000000, 0, 0, 5);
      t(1, 32'hA1000000, 0, 1, 3);   t(1, 32'hB0000000, 0, 0, 2);
      t(1, 32'hB8000000, 0, 0, 5);   t(1, 32'hB8000000, 1, 0, 3);
      t(1, 32'hC2000000, 0, 0, 3);   t(1, 32'hC8000000, 0, 0, 4);
      t(1, 32'hCD000000, 0, 0, 2);   t(1, 32'hC3000000, 0, 0, 1);
      t(2, 32'hF6C00000, 0, 0, 3);   t(2, 32'hF6D00000, 0, 0, 2);
      t(2, 32'hF7C00000, 0, 0, 6);   t(2, 32'hF7D80000, 0, 0, 2);
      t(2, 32'hF7050000, 0, 0, 10);  t(2, 32'hF7150000, 0, 0, 6);
      t(2, 32'hD8C10000, 0, 0, 2);   t(2, 32'hDD050000, 0, 0, 6);
      t(2, 32'hFF150000, 0, 0, 6);   t(2, 32'hFFE00000, 0, 0, 2);
      t(1, 32'hE4000000, 0, 0, 2);   t(1, 32'hEC000000, 0, 0, 1);
      t(1, 32'h66000000, 0, 0, 0);   t(1, 32'h67000000, 0, 0, 0);
      t(1, 32'hF3000000, 0, 0, 0);   t(1, 32'h2E000000, 0, 0, 0);
      t(1, 32'h26000000, 0, 0, 0);   t(1, 32'h65000000, 0, 0, 0);
      t(1, 32'hF0000000, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
