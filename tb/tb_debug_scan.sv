// tb_debug_scan: shifts random debug values in and checks that debug_n only
// changes on update; captures random state and checks every bit that comes
// out of the chain, in order (debug bits first, then state from the top);
// checks that shifting leaves debug_n alone and that reset gives all ones.
`timescale 1ns/1ps
module tb_debug_scan;
  import rappid_pkg::*;
  localparam int unsigned SW = 8;
  localparam int unsigned W  = NDEBUG + SW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, capture, update, si, so;
  logic [SW-1:0] state;
  logic [NDEBUG-1:0] debug_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  debug_scan dut (.*);
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic shift_in(logic [W-1:0] v, logic [NDEBUG-1:0] expect_dbg);
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk); shift = 1'b1; si = v[i];
      checks++;
      if (debug_n !== expect_dbg) begin failures++; $display("debug_n moved while shifting"); end
    end
    @(negedge clk); shift = 1'b0;
  endtask

  initial begin
    logic [NDEBUG-1:0] d, cur;
    logic [SW-1:0] st;
    shift = 1'b0; capture = 1'b0; update = 1'b0; si = 1'b0; state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (debug_n !== '1) failures++;
    cur = '1;
    for (int n = 0; n < 20; n++) begin
      d = NDEBUG'($urandom);
      shift_in({d, SW'({$urandom, $urandom})}, cur);
      checks++; if (debug_n !== cur) failures++;
      @(negedge clk); update = 1'b1;
      @(negedge clk); update = 1'b0;
      cur = d;
      checks++; if (debug_n !== d) begin failures++; $display("update: %b vs %b", debug_n, d); end
      // capture and read out
      st = SW'({$urandom, $urandom});
      state = st;
      @(negedge clk); capture = 1'b1;
      @(negedge clk); capture = 1'b0; state = '0;
      for (int i = W - 1; i >= 0; i--) begin
        logic e;
        e = (i >= SW) ? cur[i - SW] : st[i];
        checks++;
        if (so !== e) begin failures++; if (failures < 10) $display("bit %0d: %b", i, so); end
        shift = 1'b1; si = 1'b0;
        @(negedge clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
