// instr_ready: instruction ready control (IR) of one byte column.
//
// For the (effective) length L of the instruction that would start in this
// column, InstRdy is raised once the length is known (len_ok) and the L-1
// following columns hold their bytes (byte_rdy_dn[k] is column i+k+1).
// When this column's own tag unit has sent the tag on (fired), IR sends
// Preempt to those L-1 columns so that they give up their speculative decode
// and open their byte latches.  Combinational; preempt is valid in the clock
// cycle of the firing.  Follows the published description; Preempt is issued
// only for a firing of this column's own tag unit, not for a Preempt it
// receives itself, so that releases do not chain.
module instr_ready
  import rappid_pkg::*;
(
  input  logic [MAXSHORT-1:0] len_oh,
  input  logic                len_ok,
  input  logic [MAXSHORT-2:0] byte_rdy_dn,
  input  logic                fired,
  output logic                inst_rdy,
  output logic [MAXSHORT-2:0] preempt_dn
);
  logic [MAXSHORT-2:0] need;   // need[k]: column i+k+1 is part of the instruction

  always_comb begin
    need = '0;
    for (int l = 2; l <= MAXSHORT; l++)
      if (len_oh[l-1]) need = (MAXSHORT-1)'((1 << (l - 1)) - 1);
  end

  assign inst_rdy   = len_ok && (|len_oh) && ((byte_rdy_dn & need) == need);
  assign preempt_dn = fired ? need : '0;
endmodule
