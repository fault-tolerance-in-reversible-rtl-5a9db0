// tb_ft_rev_top: end-to-end test of both fault tolerant arrangements at the
// top's default parameters (example circuit voted by the two-gate voter; full
// adder Sum voted by the two-gate voter, Carry by the three-gate voter).
//
// Part 1, faults in the module copies: for every input and every single
// fault of the campaign list (single bit, single gate, repeated gate,
// disappearance, appearance, multiple missing gate) placed in each copy in
// turn, the corrected outputs must equal the fault-free function, worked out
// here as x = a XOR b and sum/carry = a + b + carry_in.
// Part 2, a bit fault between Stage A and Stage B inside a voter whose
// inputs are 011 (copy 0 wrong): the three-gate voter must still give 1; the
// two-gate voter must give 0.
// Part 3, missing gates in Stage B of a voter, for every pattern of voter
// inputs (made by flipping copy outputs): the voter must fail exactly when
//   input 110 with the CNOT missing and the Fredkin present  (case I),
//   input 011 (two-gate) or 111 (three-gate) with the Fredkin missing (case II),
//   input 100 with at least one of the two missing           (case III).
// Each of these mechanisms is counted and must occur at least once.
// One step per time unit; a watchdog stops the run after 1000000 units.
`timescale 1ns/1ps
module tb_ft_rev_top;
  import rev_pkg::*;
  import fault_campaign_pkg::*;

  logic                 ex_a, ex_b, ex_c;
  example_fault_t [2:0] ex_mod_fault;
  voter_fault_t         ex_voter_fault;
  logic                 ex_u;
  logic [2:0]           ex_mod_x;
  logic [2:0][1:0]      ex_mod_garbage;
  logic [1:0]           ex_voter_garbage;
  logic                 fa_a, fa_b, fa_carry_in;
  adder_fault_t [2:0]   fa_mod_fault;
  voter_fault_t         fa_sum_voter_fault, fa_carry_voter_fault;
  logic                 fa_sum, fa_carry;
  logic [2:0]           fa_mod_sum, fa_mod_carry;
  logic [2:0][1:0]      fa_mod_garbage;
  logic [1:0]           fa_sum_voter_garbage, fa_carry_voter_garbage;

  ft_rev_top dut (.*);

  int checks   = 0;
  int failures = 0;
  int masked [K_COUNT];
  int stage_masked  = 0;
  int stage_exposed = 0;
  int case_seen [3];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected voter failure for voter inputs v = {line a, line b, line c}.
  function automatic logic voter_fails(input logic [2:0] v, input logic three_gate,
                                       input logic cnot_gone, input logic fred_gone);
    logic [2:0] case2_input;
    case2_input = three_gate ? 3'b111 : 3'b011;
    return (v == 3'b110 && cnot_gone && !fred_gone)
        || (v == case2_input && fred_gone)
        || (v == 3'b100 && (cnot_gone || fred_gone));
  endfunction

  function automatic logic maj3(input logic [2:0] v);
    return (int'(v[0]) + int'(v[1]) + int'(v[2])) > 1;
  endfunction

  task automatic clear_faults();
    ex_mod_fault = '0; fa_mod_fault = '0;
    ex_voter_fault = VOTER_NO_FAULT;
    fa_sum_voter_fault = VOTER_NO_FAULT;
    fa_carry_voter_fault = VOTER_NO_FAULT;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    example_case_q ex_cases;
    adder_case_q   fa_cases;
    logic          ex_good, want_s, want_c;
    int            total;
    ex_cases = example_cases();
    fa_cases = adder_cases();
    foreach (masked[k]) masked[k] = 0;
    foreach (case_seen[k]) case_seen[k] = 0;
    clear_faults();

    // ---------------- Part 1: single faults in module copies
    for (int i = 0; i < 8; i++) begin
      {ex_a, ex_b, ex_c} = 3'(i);
      {fa_a, fa_b, fa_carry_in} = 3'(i);
      ex_good = ex_a ^ ex_b;
      total   = int'(fa_a) + int'(fa_b) + int'(fa_carry_in);
      want_s  = total[0];
      want_c  = total[1];
      clear_faults(); #1;
      check(ex_u == ex_good && fa_sum == want_s && fa_carry == want_c, "fault-free");
      for (int m = 0; m < 3; m++) begin
        foreach (ex_cases[n]) begin
          clear_faults();
          ex_mod_fault[m] = ex_cases[n].f;
          #1;
          check(ex_u == ex_good, $sformatf("example: %s in copy %0d", kind_name(ex_cases[n].kind), m));
          if (ex_mod_x[m] != ex_good) masked[ex_cases[n].kind]++;
        end
        foreach (fa_cases[n]) begin
          clear_faults();
          fa_mod_fault[m] = fa_cases[n].f;
          #1;
          check(fa_sum == want_s && fa_carry == want_c,
                $sformatf("adder: %s in copy %0d", kind_name(fa_cases[n].kind), m));
          if (fa_mod_sum[m] != want_s || fa_mod_carry[m] != want_c) masked[fa_cases[n].kind]++;
        end
      end
    end

    // ---------------- Part 2: bit fault between the voter stages, voter input 011
    // Full adder inputs 011 give sum 0, carry 1. Flipping copy 0's carry line
    // gives carry voter inputs {a,b,c} = 011; flipping copies 1 and 2 of the
    // sum gives sum voter inputs 011 as well.
    {fa_a, fa_b, fa_carry_in} = 3'b011;
    for (int line = 1; line < 3; line++) begin
      clear_faults();
      fa_mod_fault[0].out_flip[0] = 1'b1;                 // carry of copy 0
      fa_mod_fault[1].out_flip[1] = 1'b1;                 // sum of copy 1
      fa_mod_fault[2].out_flip[1] = 1'b1;                 // sum of copy 2
      fa_carry_voter_fault.stage_flip[line] = 1'b1;
      fa_sum_voter_fault.stage_flip[line]   = 1'b1;
      #1;
      check(fa_mod_carry == 3'b110 && fa_mod_sum == 3'b110, "voter inputs 011 set up");
      check(fa_carry == 1'b1, $sformatf("three-gate voter must mask a fault on line %0d", line));
      check(fa_sum == 1'b0,   $sformatf("two-gate voter shows a fault on line %0d", line));
      if (fa_carry == 1'b1) stage_masked++;
      if (fa_sum == 1'b0) stage_exposed++;
    end
    // the same fault in the example arrangement's two-gate voter
    {ex_a, ex_b, ex_c} = 3'b110;                          // x = 0 in every copy
    clear_faults();
    ex_mod_fault[1].out_flip[0] = 1'b1;
    ex_mod_fault[2].out_flip[0] = 1'b1;
    ex_voter_fault.stage_flip[1] = 1'b1;
    #1;
    check(ex_mod_x == 3'b110 && ex_u == 1'b0, "example two-gate voter with line b fault");
    if (ex_u == 1'b0) stage_exposed++;

    // ---------------- Part 3: missing gates in Stage B, every voter input
    {fa_a, fa_b, fa_carry_in} = 3'b000;                   // sum 0, carry 0 in every copy
    {ex_a, ex_b, ex_c} = 3'b000;                          // x = 0 in every copy
    for (int v = 0; v < 8; v++) begin
      logic [2:0] vin;                                    // {line a, line b, line c}
      vin = 3'(v);
      for (int g = 1; g < 4; g++) begin
        logic cnot_gone, fred_gone, f_ex, f_sum, f_carry;
        cnot_gone = g[0];
        fred_gone = g[1];
        clear_faults();
        for (int m = 0; m < 3; m++) begin
          // copy 0 feeds line a, copy 1 line b, copy 2 line c
          ex_mod_fault[m].out_flip[0] = vin[2 - m];
          fa_mod_fault[m].out_flip[0] = vin[2 - m];
          fa_mod_fault[m].out_flip[1] = vin[2 - m];
        end
        ex_voter_fault.cnot.missing       = cnot_gone;
        ex_voter_fault.fredkin.missing    = fred_gone;
        fa_sum_voter_fault.cnot.missing   = cnot_gone;
        fa_sum_voter_fault.fredkin.missing = fred_gone;
        fa_carry_voter_fault.cnot.missing = cnot_gone;
        fa_carry_voter_fault.fredkin.missing = fred_gone;
        #1;
        f_ex    = (ex_u     != maj3(vin));
        f_sum   = (fa_sum   != maj3(vin));
        f_carry = (fa_carry != maj3(vin));
        check(f_ex    == voter_fails(vin, 1'b0, cnot_gone, fred_gone) &&
              f_sum   == voter_fails(vin, 1'b0, cnot_gone, fred_gone) &&
              f_carry == voter_fails(vin, 1'b1, cnot_gone, fred_gone),
              $sformatf("Stage B gates gone (CNOT %b, Fredkin %b), voter input %03b: fail %b%b%b",
                        cnot_gone, fred_gone, vin, f_ex, f_sum, f_carry));
        if ((f_ex || f_carry) && vin == 3'b110) case_seen[0]++;
        if ((f_ex || f_carry) && (vin == 3'b011 || vin == 3'b111)) case_seen[1]++;
        if ((f_ex || f_carry) && vin == 3'b100) case_seen[2]++;
      end
    end

    for (int k = 0; k < int'(K_COUNT); k++) begin
      $display("masked %-32s %0d times", kind_name(fault_kind_e'(k)), masked[k]);
      check(masked[k] > 0, $sformatf("no %s reached a voter input", kind_name(fault_kind_e'(k))));
    end
    $display("voter stage fault masked by the three-gate voter: %0d", stage_masked);
    $display("voter stage fault passed by the two-gate voter:   %0d", stage_exposed);
    $display("Stage B failures: case I %0d, case II %0d, case III %0d",
             case_seen[0], case_seen[1], case_seen[2]);
    check(stage_masked > 0 && stage_exposed > 0, "voter stage faults exercised");
    check(case_seen[0] > 0 && case_seen[1] > 0 && case_seen[2] > 0, "all Stage B failure cases seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
