// rev_fredkin: multiple-control Fredkin (MCF) gate on a bundle of W lines.
//
// The gate passes every line unchanged except the two target lines T0 and
// T1, whose values it interchanges when all control points are satisfied: a
// positive control needs its line at 1, a negative control needs it at 0.
// CTRL_MASK marks the control lines and CTRL_POL their polarity
// (1 = positive). With no controls it is the SWAP gate; with one positive
// control it is the 3-bit Fredkin gate, x = a, y = a'b + ac, z = a'c + ab.
// The gate is its own inverse.
//
// Fault injection (see rev_pkg): 'missing' makes the gate pass its inputs,
// 'repeated' applies it twice, 'ctrl_drop' removes control points (a
// Fredkin gate whose only control has disappeared always swaps) and
// 'ctrl_add' adds positive control points, never on a target line. The
// positive polarity of an added point is this design's choice; a point
// dropped and added on the same line acts as a new positive control.
//
// Purely combinational: dout follows din with no clock and no state.
module rev_fredkin
  import rev_pkg::*;
#(
  parameter int unsigned    W         = 3,
  parameter logic [W-1:0]   CTRL_MASK = 3'b001,
  parameter logic [W-1:0]   CTRL_POL  = '1,
  parameter int unsigned    T0        = 1,
  parameter int unsigned    T1        = 2
) (
  input  logic [W-1:0] din,
  input  gate_fault_t  fault,
  output logic [W-1:0] dout
);

  if (W > MAX_LINES) begin : g_w_check
    $error("rev_fredkin: W exceeds rev_pkg::MAX_LINES");
  end
  if (T0 >= W || T1 >= W || T0 == T1) begin : g_tgt_check
    $error("rev_fredkin: target lines must be two distinct lines in range");
  end
  if (CTRL_MASK[T0] || CTRL_MASK[T1]) begin : g_ctrl_check
    $error("rev_fredkin: a target line cannot also be a control");
  end

  localparam logic [W-1:0] TGT_BITS = (W'(1) << T0) | (W'(1) << T1);

  logic [W-1:0] ctrl_eff;
  logic [W-1:0] kept;       // original control points still present
  logic [W-1:0] pol_eff;
  logic [W-1:0] once;
  logic [W-1:0] twice;

  function automatic logic fires(input logic [W-1:0] v,
                                 input logic [W-1:0] ctrl,
                                 input logic [W-1:0] pol);
    return &(~ctrl | ~(v ^ pol));
  endfunction

  // Interchange the two target lines of v.
  function automatic logic [W-1:0] swapped(input logic [W-1:0] v);
    logic [W-1:0] r;
    r     = v;
    r[T0] = v[T1];
    r[T1] = v[T0];
    return r;
  endfunction

  always_comb begin
    ctrl_eff = (CTRL_MASK & ~fault.ctrl_drop[W-1:0])
             | (fault.ctrl_add[W-1:0] & ~TGT_BITS);
    kept     = CTRL_MASK & ~fault.ctrl_drop[W-1:0];
    pol_eff  = (CTRL_POL & kept) | ~kept;

    once  = fires(din,  ctrl_eff, pol_eff) ? swapped(din)  : din;
    twice = fires(once, ctrl_eff, pol_eff) ? swapped(once) : once;

    if (fault.missing)       dout = din;
    else if (fault.repeated) dout = twice;
    else                     dout = once;
  end

endmodule
