// tb_ft_full_adder: single-fault campaign on the fault tolerant full adder.
//
// For every combination of a, b and carry_in, and every single fault of the
// campaign list placed in each of the three adder copies in turn, the
// corrected sum and carry must equal the arithmetic sum a + b + carry_in.
// Faults that corrupt the faulty copy's sum or carry are counted as masked
// under their kind; every kind must be masked at least once, and at least
// one fault must spoil both outputs of one copy at once. The same campaign is
// run with the voters in the opposite places. One step per time unit; a
// watchdog stops the run after 100000 units.
`timescale 1ns/1ps
module tb_ft_full_adder;
  import rev_pkg::*;
  import fault_campaign_pkg::*;

  logic               a, b, carry_in;
  adder_fault_t [2:0] mod_fault;
  voter_fault_t       sum_voter_fault, carry_voter_fault;
  logic               s_d, c_d, s_s, c_s;   // default and swapped voter placement
  logic [2:0]         ms_d, mc_d, ms_s, mc_s;
  logic [2:0][1:0]    mg_d, mg_s;
  logic [1:0]         sg_d, cg_d, sg_s, cg_s;

  int checks   = 0;
  int failures = 0;
  int masked [K_COUNT];
  int both_spoiled = 0;

  ft_full_adder dut (
    .a, .b, .carry_in, .mod_fault, .sum_voter_fault, .carry_voter_fault,
    .corrected_sum(s_d), .corrected_carry(c_d), .mod_sum(ms_d), .mod_carry(mc_d),
    .mod_garbage(mg_d), .sum_voter_garbage(sg_d), .carry_voter_garbage(cg_d));
  ft_full_adder #(.SUM_VOTER(MVC_THREE_GATE), .CARRY_VOTER(MVC_TWO_GATE)) dut_swapped (
    .a, .b, .carry_in, .mod_fault, .sum_voter_fault, .carry_voter_fault,
    .corrected_sum(s_s), .corrected_carry(c_s), .mod_sum(ms_s), .mod_carry(mc_s),
    .mod_garbage(mg_s), .sum_voter_garbage(sg_s), .carry_voter_garbage(cg_s));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adder_case_q cases;
    int          total;
    logic        want_s, want_c;
    cases = adder_cases();
    sum_voter_fault   = VOTER_NO_FAULT;
    carry_voter_fault = VOTER_NO_FAULT;
    mod_fault = '0;
    foreach (masked[k]) masked[k] = 0;

    for (int i = 0; i < 8; i++) begin
      {a, b, carry_in} = 3'(i);
      total  = int'(a) + int'(b) + int'(carry_in);
      want_s = total[0];
      want_c = total[1];
      mod_fault = '0; #1;
      check(s_d == want_s && c_d == want_c && s_s == want_s && c_s == want_c,
            $sformatf("fault-free sum of %03b", 3'(i)));
      for (int m = 0; m < 3; m++)
        foreach (cases[n]) begin
          mod_fault = '0;
          mod_fault[m] = cases[n].f;
          #1;
          check(s_d == want_s && c_d == want_c && s_s == want_s && c_s == want_c,
                $sformatf("%s in copy %0d, inputs %03b: sum %b/%b carry %b/%b",
                          kind_name(cases[n].kind), m, 3'(i), s_d, s_s, c_d, c_s));
          if (ms_d[m] != want_s || mc_d[m] != want_c) masked[cases[n].kind]++;
          if (ms_d[m] != want_s && mc_d[m] != want_c) both_spoiled++;
        end
    end

    for (int k = 0; k < int'(K_COUNT); k++) begin
      $display("masked %-32s %0d times", kind_name(fault_kind_e'(k)), masked[k]);
      check(masked[k] > 0, $sformatf("no %s ever reached a voter input", kind_name(fault_kind_e'(k))));
    end
    $display("faults spoiling sum and carry of one copy: %0d", both_spoiled);
    check(both_spoiled > 0, "no fault spoiled both outputs of a copy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
