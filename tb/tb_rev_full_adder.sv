// tb_rev_full_adder: self-checking test of the 4x4 reversible full adder.
//
// All sixteen inputs are compared with the printed reversible full adder
// truth table (constant input, carry in, A, B -> carry out, sum, garbage 1,
// garbage 2), the sixteen outputs must all differ (the mapping is a
// bijection), and with the constant at 0 the carry and sum must equal the
// arithmetic sum of the three input bits. A single bit fault must flip
// exactly its line, and each missing gate must change the result for some
// input. One step per time unit; a watchdog stops the run after 10000 units.
`timescale 1ns/1ps
module tb_rev_full_adder;
  import rev_pkg::*;

  logic         const_in, carry_in, a, b;
  adder_fault_t fault;
  logic         carry_out, sum, garbage1, garbage2;

  int checks   = 0;
  int failures = 0;

  rev_full_adder dut (.*);

  // Rows "K Ci A B" -> "Cout Sum G1 G2", in input order.
  localparam string FA_TABLE [16] = '{
    "00000000", "00010111", "00100110", "00111001",
    "01000100", "01011011", "01101010", "01111101",
    "10001000", "10011111", "10101110", "10110001",
    "11001100", "11010011", "11100010", "11110101"};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] row_bits(input string s, input int off);
    return {s[off] == "1", s[off+1] == "1", s[off+2] == "1", s[off+3] == "1"};
  endfunction

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    logic [3:0]  good;
    fault = ADDER_NO_FAULT;
    seen  = '0;
    check(dut.QUANTUM_COST == 12 && dut.GATE_COUNT == 4, "cost figures");

    foreach (FA_TABLE[r]) begin
      {const_in, carry_in, a, b} = row_bits(FA_TABLE[r], 0);
      #1;
      check({carry_out, sum, garbage1, garbage2} == row_bits(FA_TABLE[r], 4),
            $sformatf("row %s gave %b%b%b%b", FA_TABLE[r], carry_out, sum, garbage1, garbage2));
      seen[{carry_out, sum, garbage1, garbage2}] = 1'b1;
      if (!const_in)
        check(2 * int'(carry_out) + int'(sum) == int'(carry_in) + int'(a) + int'(b),
              "carry and sum must add up");
      // single bit fault on each output line
      good = {garbage2, garbage1, sum, carry_out};
      for (int k = 0; k < 4; k++) begin
        fault = ADDER_NO_FAULT; fault.out_flip = 4'(1 << k); #1;
        check({garbage2, garbage1, sum, carry_out} == (good ^ 4'(1 << k)), "single bit fault");
      end
      fault = ADDER_NO_FAULT;
    end
    check(&seen, "outputs must be a permutation of the inputs");

    // every missing gate is visible at the outputs for some input
    for (int g = 0; g < 4; g++) begin
      logic differs;
      differs = 1'b0;
      for (int i = 0; i < 16; i++) begin
        {const_in, carry_in, a, b} = 4'(i);
        fault = ADDER_NO_FAULT; #1;
        good = {garbage2, garbage1, sum, carry_out};
        fault.gate[g].missing = 1'b1; #1;
        if ({garbage2, garbage1, sum, carry_out} != good) differs = 1'b1;
      end
      check(differs, $sformatf("missing gate %0d must be observable", g));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
