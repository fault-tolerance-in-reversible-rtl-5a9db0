// tb_tmr_example: single-fault campaign on the TMR example arrangement.
//
// Two instances are tested side by side, one voting with the two-gate voter
// and one with the three-gate voter. For every input and every single fault
// of the campaign list placed in each of the three copies in turn, the
// corrected output u must equal the fault-free function x = a XOR b
// (worked out by hand from the two gates). A fault that does corrupt the
// faulty copy's x is counted as masked under its kind, and every kind must
// be masked at least once. The worked example is also checked: input 110
// with gate 2 of copy 0 missing gives x = 1 from copy 0 and 0 from the others
// and u = 0. One step per time unit; a watchdog stops the run after 100000
// units.
`timescale 1ns/1ps
module tb_tmr_example;
  import rev_pkg::*;
  import fault_campaign_pkg::*;

  logic                 a, b, c;
  example_fault_t [2:0] mod_fault;
  voter_fault_t         voter_fault;
  logic                 u2, u3;
  logic [2:0]           x2, x3;
  logic [2:0][1:0]      mg2, mg3;
  logic [1:0]           vg2, vg3;

  int checks   = 0;
  int failures = 0;
  int masked [K_COUNT];

  tmr_example #(.VOTER(MVC_TWO_GATE)) dut2 (
    .a, .b, .c, .mod_fault, .voter_fault,
    .u(u2), .mod_x(x2), .mod_garbage(mg2), .voter_garbage(vg2));
  tmr_example #(.VOTER(MVC_THREE_GATE)) dut3 (
    .a, .b, .c, .mod_fault, .voter_fault,
    .u(u3), .mod_x(x3), .mod_garbage(mg3), .voter_garbage(vg3));

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
    example_case_q cases;
    logic          good;
    cases       = example_cases();
    voter_fault = VOTER_NO_FAULT;
    mod_fault   = '0;
    foreach (masked[k]) masked[k] = 0;

    // worked example
    {a, b, c} = 3'b110;
    mod_fault[0].cnot.missing = 1'b1;
    #1;
    check(x2 == 3'b001 && u2 == 1'b0 && u3 == 1'b0,
          $sformatf("worked example: voter inputs %b, u = %b/%b", x2, u2, u3));
    mod_fault = '0;

    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      good = a ^ b;
      mod_fault = '0; #1;
      check(u2 == good && u3 == good && x2 == {3{good}}, "fault-free arrangement");
      for (int m = 0; m < 3; m++)
        foreach (cases[n]) begin
          mod_fault = '0;
          mod_fault[m] = cases[n].f;
          #1;
          check(u2 == good && u3 == good,
                $sformatf("%s in copy %0d, input %03b: u = %b/%b, want %b",
                          kind_name(cases[n].kind), m, 3'(i), u2, u3, good));
          if (x2[m] != good) masked[cases[n].kind]++;
        end
    end

    for (int k = 0; k < int'(K_COUNT); k++) begin
      $display("masked %-32s %0d times", kind_name(fault_kind_e'(k)), masked[k]);
      check(masked[k] > 0, $sformatf("no %s ever reached a voter input", kind_name(fault_kind_e'(k))));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
