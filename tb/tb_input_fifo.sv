// tb_input_fifo: lines are shifted in serially and loaded; then every lane
// is read independently over its handshake (lanes at different speeds) and
// must return its byte of each line in order.  Also checks that load_ready
// falls when the FIFO is full, that recirculate mode repeats the lines, and
// that whole lines written through the parallel load port come out the same.
`timescale 1ns/1ps
module tb_input_fifo;
  import rappid_pkg::*;
  localparam int L = FIFO_LINES;
  logic clk = 1'b0, rst_n = 1'b0;
  fifo_mode_e mode;
  logic run, scan_en, scan_in, load_line, load_ready, par_load;
  logic [NCOL*FBYTE_W-1:0] par_line;
  logic [NCOL-1:0] lane_req, lane_ack;
  fbyte_t lane_data [NCOL];
  int checks = 0, failures = 0;
  logic [NCOL*11-1:0] lines [L];
  int rd_idx [NCOL];
  always #5 clk = ~clk;
  input_fifo dut (.*);
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic shift_load(logic [NCOL*11-1:0] v);
    for (int i = NCOL*11-1; i >= 0; i--) begin
      @(negedge clk); scan_en = 1'b1; scan_in = v[i];
    end
    @(negedge clk); scan_en = 1'b0; load_line = 1'b1;
    @(negedge clk); load_line = 1'b0;
  endtask

  // every lane acknowledges on its own, lane k with probability depending on k
  task automatic read_lanes(int n_per_lane);
    int done;
    foreach (rd_idx[k]) rd_idx[k] = 0;
    done = 0;
    while (done < NCOL) begin
      @(negedge clk);
      done = 0;
      for (int k = 0; k < NCOL; k++) begin
        if (lane_req[k] && !lane_ack[k] && rd_idx[k] < n_per_lane && ($urandom % (k + 2)) == 0) begin
          checks++;
          if (lane_data[k] !== fbyte_t'(lines[rd_idx[k] % L][k*11 +: 11])) begin
            failures++;
            $display("lane %0d item %0d: %h", k, rd_idx[k], lane_data[k]);
          end
          lane_ack[k] = 1'b1;
          rd_idx[k]++;
        end else if (!lane_req[k]) lane_ack[k] = 1'b0;
        if (rd_idx[k] >= n_per_lane && !lane_ack[k]) done++;
      end
    end
  endtask

  initial begin
    foreach (lines[i]) for (int w = 0; w < NCOL*11; w += 32) lines[i][w +: 32] = $urandom;
    mode = FIFO_NORMAL; run = 1'b0; scan_en = 1'b0; scan_in = 1'b0; load_line = 1'b0; lane_ack = '0;
    par_load = 1'b0; par_line = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) shift_load(lines[i]);
    checks++; if (load_ready) begin failures++; $display("load_ready high when full"); end
    run = 1'b1;
    read_lanes(L);
    repeat (4) @(negedge clk);
    checks++; if (lane_req != 0 || !load_ready) failures++;
    // recirculate
    rst_n = 1'b0; run = 1'b0; @(negedge clk); rst_n = 1'b1;
    mode = FIFO_RECIRC;
    for (int i = 0; i < L; i++) shift_load(lines[i]);
    run = 1'b1;
    read_lanes(3 * L);
    // parallel load: one line per clock while there is room
    rst_n = 1'b0; run = 1'b0; @(negedge clk); rst_n = 1'b1;
    mode = FIFO_NORMAL;
    foreach (lines[i]) for (int w = 0; w < NCOL*11; w += 32) lines[i][w +: 32] = $urandom;
    for (int i = 0; i < L; i++) begin
      checks++; if (!load_ready) begin failures++; $display("par: not ready at %0d", i); end
      par_line = lines[i]; par_load = 1'b1;
      @(negedge clk);
    end
    par_load = 1'b0;
    checks++; if (load_ready) begin failures++; $display("par: ready when full"); end
    run = 1'b1;
    read_lanes(L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
