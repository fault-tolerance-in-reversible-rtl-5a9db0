// rev_full_adder: 4x4 reversible full adder with one constant input and two
// garbage outputs.
//
// Inputs (const_in, carry_in, a, b) map one-to-one onto outputs
//   carry_out = const_in XOR maj(carry_in, a, b)
//   sum       = carry_in XOR a XOR b
//   garbage1  = a XOR b
//   garbage2  = b
// With const_in = 0 this is an ordinary full adder; with const_in = 1 the
// carry comes out inverted, which keeps the mapping a bijection. This is the
// reversible full adder truth table the design is specified by.
//
// The gate cascade is this design's own, since only the truth table is
// given. On lines (k = const_in, ci = carry_in, a, b):
//   gate 0: Toffoli, controls a and b, target k      k ^= a & b
//   gate 1: CNOT,    control b, target a             a ^= b
//   gate 2: Toffoli, controls ci and a, target k     k ^= ci & (a ^ b)
//   gate 3: CNOT,    control a, target ci            ci ^= a ^ b
// Since maj(ci, a, b) = ab XOR ci(a XOR b), line k ends with the carry.
// 4 gates, quantum cost 5 + 1 + 5 + 1 = 12. fault holds the faults of the
// four gates and a single bit fault on the four output lines.
//
// Purely combinational.
module rev_full_adder
  import rev_pkg::*;
(
  input  logic         const_in,
  input  logic         carry_in,
  input  logic         a,
  input  logic         b,
  input  adder_fault_t fault,
  output logic         carry_out,
  output logic         sum,
  output logic         garbage1,
  output logic         garbage2
);

  localparam int unsigned GATE_COUNT   = 4;
  localparam int unsigned QUANTUM_COST = 2 * QC_TOFFOLI3 + 2 * QC_CNOT_POS;

  // Line bundles, bit 0 = k, bit 1 = ci, bit 2 = a, bit 3 = b.
  logic [3:0] l0, l1, l2, l3, l4;

  assign l0 = {b, a, carry_in, const_in};

  rev_toffoli #(.W(4), .CTRL_MASK(4'b1100), .CTRL_POL(4'b1111), .TGT(0))
    u_g0 (.din(l0), .fault(fault.gate[0]), .dout(l1));
  rev_toffoli #(.W(4), .CTRL_MASK(4'b1000), .CTRL_POL(4'b1111), .TGT(2))
    u_g1 (.din(l1), .fault(fault.gate[1]), .dout(l2));
  rev_toffoli #(.W(4), .CTRL_MASK(4'b0110), .CTRL_POL(4'b1111), .TGT(0))
    u_g2 (.din(l2), .fault(fault.gate[2]), .dout(l3));
  rev_toffoli #(.W(4), .CTRL_MASK(4'b0100), .CTRL_POL(4'b1111), .TGT(1))
    u_g3 (.din(l3), .fault(fault.gate[3]), .dout(l4));

  assign {garbage2, garbage1, sum, carry_out} = l4 ^ fault.out_flip;

endmodule
