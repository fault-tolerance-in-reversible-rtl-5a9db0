// rev_example_circuit: small 3x3 reversible circuit used as the module that
// triple modular redundancy protects.
//
// Gate 1 is a positive Toffoli gate with controls a and b and target c;
// gate 2 is a positive CNOT gate with control b and target a. Line a leaves
// as x, the output of interest; y and z are garbage. With input 110 gate 1
// gives 111 and gate 2 gives 011, so x = 0; with gate 2 missing the circuit
// gives 111 and x = 1. Overall x = a XOR b, y = b, z = c XOR (a AND b).
//
// The two gate types, their order, and the example values (110 gives x = 0,
// and 111 when the second gate fails) are from the circuit's description.
// The CNOT control on line b (line c would fit the example equally) is this
// design's choice. fault holds the faults of both gates and a single bit
// fault on the three output lines.
//
// Purely combinational.
module rev_example_circuit
  import rev_pkg::*;
(
  input  logic           a,
  input  logic           b,
  input  logic           c,
  input  example_fault_t fault,
  output logic           x,
  output logic           y,
  output logic           z
);

  // Line bundles, bit 0 = a, bit 1 = b, bit 2 = c.
  logic [2:0] after_toffoli, after_cnot;

  rev_toffoli #(
    .W(3), .CTRL_MASK(3'b011), .CTRL_POL(3'b111), .TGT(2)
  ) u_toffoli (
    .din({c, b, a}), .fault(fault.toffoli), .dout(after_toffoli)
  );

  rev_toffoli #(
    .W(3), .CTRL_MASK(3'b010), .CTRL_POL(3'b111), .TGT(0)
  ) u_cnot (
    .din(after_toffoli), .fault(fault.cnot), .dout(after_cnot)
  );

  assign {z, y, x} = after_cnot ^ fault.out_flip;

endmodule
