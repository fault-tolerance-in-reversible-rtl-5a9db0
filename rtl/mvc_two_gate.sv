// mvc_two_gate: reversible 3-bit majority voter built from two gates.
//
// Lines a, b and c enter the voter; line a leaves carrying maj(a, b, c) and
// the other two lines are garbage. The voter needs no constant input.
//   Gate 1, negative-controlled CNOT: control c, target b, so b1 = b XOR NOT c.
//           b1 is 1 exactly when b equals c.
//   Gate 2, positive-controlled Fredkin: control b1, targets a and c.
//           When b = c the two agree and hold the majority, so the gate swaps
//           c onto line a; when b differs from c, a breaks the tie and stays.
// Cost: 2 gates, 2 garbage outputs, 0 constant inputs, quantum cost 3 + 5 = 8.
//
// The gate order, polarities and line assignment follow the circuit as
// drawn. Stage B is the CNOT and the Fredkin gate; this voter has no gate in
// Stage A, so fault.stage_flip flips the voter's own input lines.
// fault.toffoli is not used here (this voter has no Toffoli gate); it is in
// the shared fault bundle so both voters share one port list.
//
// An assertion checks that, with every fault switch off, line a carries the
// majority.
//
// Purely combinational.
module mvc_two_gate
  import rev_pkg::*;
(
  input  logic         a,
  input  logic         b,
  input  logic         c,
  input  voter_fault_t fault,
  output logic         maj,        // line a after gate 2
  output logic         garbage_b,  // line b after gate 2
  output logic         garbage_c   // line c after gate 2
);

  localparam int unsigned GATE_COUNT      = 2;
  localparam int unsigned GARBAGE_OUTPUTS = 2;
  localparam int unsigned CONSTANT_INPUTS = 0;
  localparam int unsigned QUANTUM_COST    = QC_CNOT_NEG + QC_FREDKIN3;

  // Line bundles, bit 0 = a, bit 1 = b, bit 2 = c.
  logic [2:0] stage_b_in, after_cnot, after_fredkin;

  assign stage_b_in = {c, b, a} ^ fault.stage_flip;

  rev_toffoli #(
    .W(3), .CTRL_MASK(3'b100), .CTRL_POL(3'b000), .TGT(1)
  ) u_cnot (
    .din(stage_b_in), .fault(fault.cnot), .dout(after_cnot)
  );

  rev_fredkin #(
    .W(3), .CTRL_MASK(3'b010), .CTRL_POL(3'b111), .T0(0), .T1(2)
  ) u_fredkin (
    .din(after_cnot), .fault(fault.fredkin), .dout(after_fredkin)
  );

  assign maj       = after_fredkin[0];
  assign garbage_b = after_fredkin[1];
  assign garbage_c = after_fredkin[2];

  // A fault-free voter always delivers the majority on line a.
  always_comb begin
    if (fault == VOTER_NO_FAULT)
      assert final (maj == ((a & b) | (a & c) | (b & c)))
        else $error("%m: line a is not the majority of %b%b%b", a, b, c);
  end

endmodule
