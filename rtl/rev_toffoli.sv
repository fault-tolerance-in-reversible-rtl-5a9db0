// rev_toffoli: multiple-control Toffoli (MCT) gate on a bundle of W lines.
//
// The gate passes every line unchanged except the target line TGT, which it
// inverts when all control points are satisfied: a positive control needs its
// line at 1, a negative control needs it at 0. Which lines carry controls is
// given by CTRL_MASK, their polarity by CTRL_POL (1 = positive). With no
// controls this is the reversible NOT gate, with one control the CNOT
// (Feynman) gate, with two the 3-bit Toffoli gate. The gate is its own
// inverse.
//
// Fault injection (see rev_pkg): 'missing' makes the gate pass its inputs,
// 'repeated' applies it twice, 'ctrl_drop' removes control points and
// 'ctrl_add' adds positive control points (never on the target line). Tie
// fault to rev_pkg::NO_FAULT for the fault-free gate. The positive polarity
// of an added control point is this design's choice; a point dropped and
// added on the same line acts as a new positive control.
//
// Purely combinational: dout follows din with no clock and no state.
module rev_toffoli
  import rev_pkg::*;
#(
  parameter int unsigned    W         = 3,
  parameter logic [W-1:0]   CTRL_MASK = 3'b011,
  parameter logic [W-1:0]   CTRL_POL  = '1,
  parameter int unsigned    TGT       = 2
) (
  input  logic [W-1:0] din,
  input  gate_fault_t  fault,
  output logic [W-1:0] dout
);

  if (W > MAX_LINES) begin : g_w_check
    $error("rev_toffoli: W exceeds rev_pkg::MAX_LINES");
  end
  if (TGT >= W) begin : g_tgt_check
    $error("rev_toffoli: target line out of range");
  end
  if (CTRL_MASK[TGT]) begin : g_ctrl_check
    $error("rev_toffoli: the target line cannot also be a control");
  end

  localparam logic [W-1:0] TGT_BIT = W'(1) << TGT;

  logic [W-1:0] ctrl_eff;   // control points in force after faults
  logic [W-1:0] kept;       // original control points still present
  logic [W-1:0] pol_eff;    // their polarity; added points are positive
  logic [W-1:0] once;       // gate applied once
  logic [W-1:0] twice;      // gate applied twice

  // True when every control in 'ctrl' sees its active level on 'v'.
  function automatic logic fires(input logic [W-1:0] v,
                                 input logic [W-1:0] ctrl,
                                 input logic [W-1:0] pol);
    return &(~ctrl | ~(v ^ pol));
  endfunction

  always_comb begin
    ctrl_eff = (CTRL_MASK & ~fault.ctrl_drop[W-1:0])
             | (fault.ctrl_add[W-1:0] & ~TGT_BIT);
    kept     = CTRL_MASK & ~fault.ctrl_drop[W-1:0];
    pol_eff  = (CTRL_POL & kept) | ~kept;

    once  = din  ^ (fires(din,  ctrl_eff, pol_eff) ? TGT_BIT : '0);
    twice = once ^ (fires(once, ctrl_eff, pol_eff) ? TGT_BIT : '0);

    if (fault.missing)       dout = din;
    else if (fault.repeated) dout = twice;
    else                     dout = once;
  end

endmodule
