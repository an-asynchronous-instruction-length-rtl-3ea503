// c_element: Muller C-element, synchronous model.
//
// The output rises once both inputs are high and falls once both inputs are
// low; while the inputs disagree it keeps its value.  The original gate is a
// dynamic circuit with a weak keeper; here the kept value is a flip-flop, so
// the output follows the inputs one clock later.  Reset clears the output.
// The byte control uses it for the acknowledge of its four-phase handshake
// with the input FIFO.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          y <= 1'b0;
    else if (a && b)     y <= 1'b1;
    else if (!a && !b)   y <= 1'b0;
endmodule
