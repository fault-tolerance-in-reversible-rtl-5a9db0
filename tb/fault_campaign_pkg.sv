// fault_campaign_pkg: builds the lists of single faults that the TMR
// testbenches place in one module copy at a time.
//
// For every gate of a circuit it produces: the gate missing or inactive
// (single gate fault), the gate repeated, each control point disappearing,
// and a positive control point appearing on each line that is neither a
// control nor a target. For the circuit as a whole it adds a single bit
// fault on each output line and the multiple missing gate fault (every pair
// of gates missing). Each entry carries its fault kind so a test can count
// how often each kind occurred.
package fault_campaign_pkg;
  import rev_pkg::*;

  typedef enum int {
    K_SINGLE_BIT,
    K_SINGLE_GATE,
    K_REPEATED_GATE,
    K_DISAPPEARANCE,
    K_APPEARANCE,
    K_MULTIPLE_MISSING,
    K_COUNT
  } fault_kind_e;

  typedef struct {
    fault_kind_e kind;
    gate_fault_t f;
  } gate_case_t;

  typedef struct {
    fault_kind_e    kind;
    example_fault_t f;
  } example_case_t;

  typedef struct {
    fault_kind_e  kind;
    adder_fault_t f;
  } adder_case_t;

  typedef gate_case_t    gate_case_q[$];
  typedef example_case_t example_case_q[$];
  typedef adder_case_t   adder_case_q[$];

  function automatic string kind_name(input fault_kind_e k);
    case (k)
      K_SINGLE_BIT:       return "single bit fault";
      K_SINGLE_GATE:      return "single gate fault";
      K_REPEATED_GATE:    return "repeated gate fault";
      K_DISAPPEARANCE:    return "disappearance crosspoint fault";
      K_APPEARANCE:       return "appearance crosspoint fault";
      K_MULTIPLE_MISSING: return "multiple missing gate fault";
      default:            return "?";
    endcase
  endfunction

  // Single faults of one gate with control lines 'ctrl' and target lines
  // 'tgt' in a bundle of w lines.
  function automatic gate_case_q gate_cases(input line_mask_t ctrl,
                                            input line_mask_t tgt,
                                            input int unsigned w);
    gate_case_q  q;
    gate_case_t  gc;
    gc.kind = K_SINGLE_GATE;   gc.f = NO_FAULT; gc.f.missing  = 1'b1; q.push_back(gc);
    gc.kind = K_REPEATED_GATE; gc.f = NO_FAULT; gc.f.repeated = 1'b1; q.push_back(gc);
    for (int i = 0; i < int'(w); i++) begin
      if (ctrl[i]) begin
        gc.kind = K_DISAPPEARANCE; gc.f = NO_FAULT; gc.f.ctrl_drop[i] = 1'b1;
        q.push_back(gc);
      end else if (!tgt[i]) begin
        gc.kind = K_APPEARANCE; gc.f = NO_FAULT; gc.f.ctrl_add[i] = 1'b1;
        q.push_back(gc);
      end
    end
    return q;
  endfunction

  // The example circuit: Toffoli (controls a, b; target c), CNOT (control b;
  // target a).
  function automatic example_case_q example_cases();
    example_case_q q;
    example_case_t ec;
    gate_case_q    g;
    g = gate_cases(4'b0011, 4'b0100, 3);
    foreach (g[i]) begin
      ec.kind = g[i].kind; ec.f = EXAMPLE_NO_FAULT; ec.f.toffoli = g[i].f; q.push_back(ec);
    end
    g = gate_cases(4'b0010, 4'b0001, 3);
    foreach (g[i]) begin
      ec.kind = g[i].kind; ec.f = EXAMPLE_NO_FAULT; ec.f.cnot = g[i].f; q.push_back(ec);
    end
    for (int i = 0; i < 3; i++) begin
      ec.kind = K_SINGLE_BIT; ec.f = EXAMPLE_NO_FAULT; ec.f.out_flip[i] = 1'b1; q.push_back(ec);
    end
    ec.kind = K_MULTIPLE_MISSING; ec.f = EXAMPLE_NO_FAULT;
    ec.f.toffoli.missing = 1'b1; ec.f.cnot.missing = 1'b1;
    q.push_back(ec);
    return q;
  endfunction

  // The reversible full adder's four gates, lines k, ci, a, b = bits 0..3.
  function automatic adder_case_q adder_cases();
    localparam line_mask_t CTRL [4] = '{4'b1100, 4'b1000, 4'b0110, 4'b0100};
    localparam line_mask_t TGT  [4] = '{4'b0001, 4'b0100, 4'b0001, 4'b0010};
    adder_case_q q;
    adder_case_t ac;
    gate_case_q  g;
    for (int n = 0; n < 4; n++) begin
      g = gate_cases(CTRL[n], TGT[n], 4);
      foreach (g[i]) begin
        ac.kind = g[i].kind; ac.f = ADDER_NO_FAULT; ac.f.gate[n] = g[i].f; q.push_back(ac);
      end
    end
    for (int i = 0; i < 4; i++) begin
      ac.kind = K_SINGLE_BIT; ac.f = ADDER_NO_FAULT; ac.f.out_flip[i] = 1'b1; q.push_back(ac);
    end
    for (int m = 0; m < 4; m++)
      for (int n = m + 1; n < 4; n++) begin
        ac.kind = K_MULTIPLE_MISSING; ac.f = ADDER_NO_FAULT;
        ac.f.gate[m].missing = 1'b1; ac.f.gate[n].missing = 1'b1;
        q.push_back(ac);
      end
    return q;
  endfunction

endpackage
