// mvc_select: one reversible majority voter, either of the two designs.
//
// KIND picks the two-gate voter (negative CNOT + Fredkin) or the three-gate
// voter (Toffoli + negative CNOT + Fredkin). Both give the majority of a, b
// and c on maj and two garbage lines; they differ only in how they behave
// when a fault sits inside the voter. A TMR arrangement can use either one,
// so the arrangements in this design take a voter_kind_e parameter and build
// their voters through this wrapper. Purely combinational.
module mvc_select
  import rev_pkg::*;
#(
  parameter voter_kind_e KIND = MVC_TWO_GATE
) (
  input  logic         a,
  input  logic         b,
  input  logic         c,
  input  voter_fault_t fault,
  output logic         maj,
  output logic         garbage_b,
  output logic         garbage_c
);

  if (KIND == MVC_THREE_GATE) begin : g_three
    mvc_three_gate u_voter (.*);
  end else begin : g_two
    mvc_two_gate u_voter (.*);
  end

endmodule
