// rev_pkg: types and constants shared by the reversible gate models, the
// majority voters and the triple modular redundancy (TMR) arrangements.
//
// Every gate in this design is a reversible gate working on a bundle of
// lines. Each gate model takes a gate_fault_t so that the fault models of
// reversible logic can be switched on in place, inside a live circuit:
//   missing   - single gate fault / single missing gate fault: the gate is
//               inactive and its inputs pass unchanged. Setting it on several
//               gates of one circuit gives the multiple missing gate fault.
//   repeated  - repeated gate fault: the gate is applied twice in a row.
//   ctrl_drop - disappearance crosspoint fault / partial missing gate fault:
//               the marked control points are gone and no longer gate the
//               operation.
//   ctrl_add  - appearance crosspoint fault: an extra control point appears
//               on each marked line. The polarity of an added control is not
//               defined by the fault model; this design makes it positive.
// A single bit fault (one line flipped) is modelled by the circuits, not by
// the gates. An all-zero gate_fault_t (NO_FAULT) is the fault-free gate.
//
// The quantum costs are the per-gate costs used to compare voter circuits:
// NOT 1, positive CNOT 1, negative CNOT 3, 3-bit Toffoli 5, 3-bit Fredkin 5.
package rev_pkg;

  // Widest gate bundle in the design (the reversible full adder has 4 lines).
  localparam int unsigned MAX_LINES = 4;

  typedef logic [MAX_LINES-1:0] line_mask_t;

  typedef struct packed {
    logic       missing;
    logic       repeated;
    line_mask_t ctrl_drop;
    line_mask_t ctrl_add;
  } gate_fault_t;

  localparam gate_fault_t NO_FAULT = '0;

  // Faults that can be placed in a 3-line majority voter. The Toffoli field
  // is only used by the three-gate voter. stage_flip[i] inverts line i
  // (0 = a, 1 = b, 2 = c) at the boundary between Stage A and Stage B.
  typedef struct packed {
    gate_fault_t toffoli;
    gate_fault_t cnot;
    gate_fault_t fredkin;
    logic [2:0]  stage_flip;
  } voter_fault_t;

  localparam voter_fault_t VOTER_NO_FAULT = '0;

  // Which of the two proposed voters a TMR arrangement uses.
  typedef enum logic {
    MVC_TWO_GATE   = 1'b0,
    MVC_THREE_GATE = 1'b1
  } voter_kind_e;

  // Faults of one copy of the 3-line example circuit: its two gates and a
  // single bit fault (out_flip[i] inverts output line i, 0 = x).
  typedef struct packed {
    gate_fault_t toffoli;
    gate_fault_t cnot;
    logic [2:0]  out_flip;
  } example_fault_t;

  localparam example_fault_t EXAMPLE_NO_FAULT = '0;

  // Faults of one reversible full adder: its four gates (gate[0] acts first)
  // and a single bit fault on its outputs (0 = carry, 1 = sum, 2, 3 garbage).
  typedef struct packed {
    gate_fault_t [3:0] gate;
    logic [3:0]        out_flip;
  } adder_fault_t;

  localparam adder_fault_t ADDER_NO_FAULT = '0;

  // Quantum cost of the gates used here.
  localparam int unsigned QC_NOT       = 1;
  localparam int unsigned QC_CNOT_POS  = 1;
  localparam int unsigned QC_CNOT_NEG  = 3;
  localparam int unsigned QC_TOFFOLI3  = 5;
  localparam int unsigned QC_FREDKIN3  = 5;

endpackage
