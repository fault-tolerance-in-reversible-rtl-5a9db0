// tb_rev_example_circuit: self-checking test of the 3x3 example circuit.
//
// Fault-free, every input is traced by hand through the Toffoli (a, b -> c)
// and the CNOT (b -> a): x = a XOR b, y = b, z = c XOR ab. The two worked
// values are checked explicitly: input 110 gives x = 0, and 111 on the
// outputs when the second gate is missing. Then each fault kind is checked
// on all inputs against hand-derived outputs. One step per time unit; a
// watchdog stops the run after 10000 units.
`timescale 1ns/1ps
module tb_rev_example_circuit;
  import rev_pkg::*;

  logic           a, b, c;
  example_fault_t fault;
  logic           x, y, z;

  int checks   = 0;
  int failures = 0;

  rev_example_circuit dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = EXAMPLE_NO_FAULT;
    {a, b, c} = 3'b110; #1;
    check({x, y, z} == 3'b011, "input 110 must give outputs 011 (x = 0)");
    fault.cnot.missing = 1'b1; #1;
    check({x, y, z} == 3'b111, "input 110 with gate 2 missing must give 111");

    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      fault = EXAMPLE_NO_FAULT; #1;
      check(x == (a ^ b) && y == b && z == (c ^ (a & b)),
            $sformatf("fault-free input %03b gave %b%b%b", 3'(i), x, y, z));
      fault = EXAMPLE_NO_FAULT; fault.toffoli.missing = 1'b1; #1;
      check(x == (a ^ b) && y == b && z == c, "Toffoli missing");
      fault = EXAMPLE_NO_FAULT; fault.cnot.missing = 1'b1; #1;
      check(x == a && y == b && z == (c ^ (a & b)), "CNOT missing");
      fault = EXAMPLE_NO_FAULT; fault.cnot.repeated = 1'b1; #1;
      check(x == a && y == b && z == (c ^ (a & b)), "CNOT repeated");
      fault = EXAMPLE_NO_FAULT; fault.toffoli.ctrl_drop = 4'b0001; #1;
      check(x == (a ^ b) && y == b && z == (c ^ b), "Toffoli control a missing");
      fault = EXAMPLE_NO_FAULT; fault.cnot.ctrl_add = 4'b0100; #1;
      check(x == (a ^ (b & (c ^ (a & b)))) && y == b && z == (c ^ (a & b)),
            "extra CNOT control on line c");
      for (int k = 0; k < 3; k++) begin
        fault = EXAMPLE_NO_FAULT; fault.out_flip = 3'(1 << k); #1;
        check({z, y, x} == ({c ^ (a & b), b, a ^ b} ^ 3'(1 << k)), "single bit fault");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
