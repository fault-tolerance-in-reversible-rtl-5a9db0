// tb_mvc_two_gate: self-checking test of the two-gate reversible majority
// voter.
//
// 1. Fault-free: for all eight inputs, line a must carry the majority
//    (counted as "at least two ones") and all three output lines must match
//    the hand-worked truth table of the CNOT-then-Fredkin cascade.
// 2. Cost figures: 2 gates, 2 garbage outputs, 0 constant inputs, quantum
//    cost 8.
// 3. Missing gates in Stage B: with the CNOT gone the voter must fail for
//    exactly inputs 100 and 110; with the Fredkin gone, or both gone, for
//    exactly 011 and 100. A repeated gate acts like a missing one since both
//    gates are self-inverse.
// 4. Disappearance of the Fredkin control point: the gate always swaps, so
//    line a carries c and the voter fails for exactly 001 and 110.
// 5. Single bit fault on line b or line c between the stages with input 011:
//    this voter cannot mask it and must output 0.
// Each step waits 1 time unit; a watchdog ends the run after 10000 units.
`timescale 1ns/1ps
module tb_mvc_two_gate;
  import rev_pkg::*;

  logic         a, b, c;
  voter_fault_t fault;
  logic         maj, garbage_b, garbage_c;

  int checks   = 0;
  int failures = 0;

  mvc_two_gate dut (.*);

  // Outputs {a2, b2, c2} for inputs {a, b, c} = 0..7, worked out by hand.
  localparam logic [2:0] EXP_OUT [8] = '{3'b010, 3'b001, 3'b000, 3'b110,
                                         3'b011, 3'b101, 3'b100, 3'b111};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic ref_majority(input logic [2:0] v);
    return (int'(v[2]) + int'(v[1]) + int'(v[0])) >= 2;
  endfunction

  // Apply one input {a,b,c} and return whether line a is wrong.
  task automatic apply(input logic [2:0] abc, output logic wrong);
    {a, b, c} = abc;
    #1;
    wrong = (maj !== ref_majority(abc));
  endtask

  // Run all eight inputs under the current fault; compare the set of inputs
  // for which the voter fails with the expected set (bit i = input i).
  task automatic check_fail_set(input logic [7:0] expected, input string what);
    logic [7:0] seen;
    logic       w;
    for (int i = 0; i < 8; i++) begin
      apply(3'(i), w);
      seen[i] = w;
    end
    check(seen == expected,
          $sformatf("%s: failing inputs %b, expected %b", what, seen, expected));
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic w;
    fault = VOTER_NO_FAULT;
    {a, b, c} = '0;

    // 1. fault-free behaviour
    for (int i = 0; i < 8; i++) begin
      apply(3'(i), w);
      check(!w, $sformatf("majority wrong for input %03b", 3'(i)));
      check({maj, garbage_b, garbage_c} == EXP_OUT[i],
            $sformatf("outputs %b%b%b for input %03b, expected %03b",
                      maj, garbage_b, garbage_c, 3'(i), EXP_OUT[i]));
    end

    // 2. cost figures
    check(dut.GATE_COUNT == 2,      "gate count");
    check(dut.GARBAGE_OUTPUTS == 2, "garbage outputs");
    check(dut.CONSTANT_INPUTS == 0, "constant inputs");
    check(dut.QUANTUM_COST == 8,    "quantum cost");

    // 3. missing and repeated gates in Stage B
    fault = VOTER_NO_FAULT; fault.cnot.missing = 1'b1;
    check_fail_set(8'b0101_0000, "CNOT missing");
    fault = VOTER_NO_FAULT; fault.fredkin.missing = 1'b1;
    check_fail_set(8'b0001_1000, "Fredkin missing");
    fault = VOTER_NO_FAULT; fault.cnot.missing = 1'b1; fault.fredkin.missing = 1'b1;
    check_fail_set(8'b0001_1000, "CNOT and Fredkin missing");
    fault = VOTER_NO_FAULT; fault.cnot.repeated = 1'b1;
    check_fail_set(8'b0101_0000, "CNOT repeated");
    fault = VOTER_NO_FAULT; fault.fredkin.repeated = 1'b1;
    check_fail_set(8'b0001_1000, "Fredkin repeated");

    // 4. disappearance of the Fredkin control point (line b)
    fault = VOTER_NO_FAULT; fault.fredkin.ctrl_drop = 4'b0010;
    check_fail_set(8'b0100_0010, "Fredkin control point missing");

    // 5. single bit fault between Stage A and Stage B, input 011
    fault = VOTER_NO_FAULT; fault.stage_flip = 3'b010;
    apply(3'b011, w);
    check(maj == 1'b0, "fault on line b with input 011 should reach the output");
    fault = VOTER_NO_FAULT; fault.stage_flip = 3'b100;
    apply(3'b011, w);
    check(maj == 1'b0, "fault on line c with input 011 should reach the output");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
