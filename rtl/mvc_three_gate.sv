// mvc_three_gate: reversible 3-bit majority voter built from three gates.
//
// Lines a, b and c enter the voter; line a leaves carrying maj(a, b, c) and
// the other two lines are garbage. No constant input is needed.
//   Stage A, gate 1, positive-controlled Toffoli: controls b and c, target a,
//           so a1 = a XOR (b AND c).
//   Stage B, gate 2, negative-controlled CNOT: control c, target b,
//           b2 = b1 XOR NOT c1, which is 1 exactly when b equals c.
//   Stage B, gate 3, positive-controlled Fredkin: control b2, targets a and
//           c; it moves c onto line a when b = c and leaves a otherwise.
// The extra Toffoli gate does not change the result in the fault-free voter.
// It changes which faults the voter survives: with input 011 the Toffoli sets
// line a to 1, so a single bit fault on line b or on line c between Stage A
// and Stage B still leaves the majority 1 on line a.
// Cost: 3 gates, 2 garbage outputs, 0 constant inputs, quantum cost
// 5 + 3 + 5 = 13.
//
// Gate order, polarities and line assignment follow the circuit as drawn.
// fault.stage_flip inverts lines between the Toffoli and the CNOT, the
// Stage A / Stage B boundary.
//
// An assertion checks that, with every fault switch off, line a carries the
// majority.
//
// Purely combinational.
module mvc_three_gate
  import rev_pkg::*;
(
  input  logic         a,
  input  logic         b,
  input  logic         c,
  input  voter_fault_t fault,
  output logic         maj,        // line a after gate 3
  output logic         garbage_b,  // line b after gate 3
  output logic         garbage_c   // line c after gate 3
);

  localparam int unsigned GATE_COUNT      = 3;
  localparam int unsigned GARBAGE_OUTPUTS = 2;
  localparam int unsigned CONSTANT_INPUTS = 0;
  localparam int unsigned QUANTUM_COST    = QC_TOFFOLI3 + QC_CNOT_NEG + QC_FREDKIN3;

  // Line bundles, bit 0 = a, bit 1 = b, bit 2 = c.
  logic [2:0] after_toffoli, stage_b_in, after_cnot, after_fredkin;

  rev_toffoli #(
    .W(3), .CTRL_MASK(3'b110), .CTRL_POL(3'b111), .TGT(0)
  ) u_toffoli (
    .din({c, b, a}), .fault(fault.toffoli), .dout(after_toffoli)
  );

  assign stage_b_in = after_toffoli ^ fault.stage_flip;

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
