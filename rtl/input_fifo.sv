// input_fifo: the instruction delivery FIFO in front of the decoder.
//
// It holds FIFO_LINES cache lines of NCOL bytes, each byte carrying the three
// pre-decoded branch bits U, B and T (11 bits per byte).  Lines are loaded
// serially: scan_in is shifted into a NCOL*11-bit scan register (first bit
// shifted ends in the most significant position; byte k of the line occupies
// bits [11k+10:11k], laid out as {U,B,T,data}), and load_line copies the
// register into the tails of all lanes at once when every lane has room.
// Each byte column then reads its own lane through a four-phase handshake
// (see byte_fifo).  A second, parallel load port (par_load, par_line, same
// layout as the scan register) takes whole lines from the built-in self-test
// pattern generator and has priority over load_line.  mode selects normal
// consumption, recirculation of the loaded lines, or the frozen mode that
// repeats the head line.  Splitting the
// FIFO into byte lanes, the 32-line depth, serial loading and the modes follow
// the published design; the scan-register bit order is this model's choice.
module input_fifo
  import rappid_pkg::*;
#(
  parameter int unsigned LINES = FIFO_LINES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  fifo_mode_e mode,
  input  logic       run,
  input  logic       scan_en,
  input  logic       scan_in,
  input  logic       load_line,
  input  logic       par_load,
  input  logic [NCOL*FBYTE_W-1:0] par_line,
  output logic       load_ready,
  output logic [NCOL-1:0] lane_req,
  output fbyte_t          lane_data [NCOL],
  input  logic [NCOL-1:0] lane_ack
);
  localparam int unsigned SW = NCOL * FBYTE_W;

  logic [SW-1:0]   sreg;
  logic [NCOL-1:0] wr_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       sreg <= '0;
    else if (scan_en) sreg <= {sreg[SW-2:0], scan_in};

  assign load_ready = &wr_ready;

  for (genvar k = 0; k < NCOL; k++) begin : g_lane
    logic [$clog2(LINES+1)-1:0] cnt;
    byte_fifo #(.DEPTH(LINES)) u_lane (
      .clk, .rst_n, .mode, .run,
      .wr_en   ((load_line || par_load) && load_ready),
      .wr_data (par_load ? fbyte_t'(par_line[k*FBYTE_W +: FBYTE_W])
                         : fbyte_t'(sreg[k*FBYTE_W +: FBYTE_W])),
      .wr_ready(wr_ready[k]),
      .req     (lane_req[k]),
      .rd_data (lane_data[k]),
      .ack     (lane_ack[k]),
      .count   (cnt)
    );
  end
endmodule
