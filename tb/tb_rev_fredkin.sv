// tb_rev_fredkin: self-checking test of the multiple-control Fredkin model.
//
// Three instances: a SWAP gate, a 3x3 positive-controlled Fredkin gate
// (checked against its printed behaviour table) and a 3x3 negative-controlled
// one (checked against y = a'c + ab, z = a'b + ac, the printed formulas with
// b and c in the roles the negative control gives them). Then the fault
// kinds: missing, repeated, missing control point (the gate always swaps)
// and an added control point. One step per time unit; a watchdog stops the
// run after 100000 units.
`timescale 1ns/1ps
module tb_rev_fredkin;
  import rev_pkg::*;

  int checks   = 0;
  int failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [1:0] s_in, s_out;
  gate_fault_t s_f;
  rev_fredkin #(.W(2), .CTRL_MASK(2'b00), .CTRL_POL(2'b11), .T0(0), .T1(1))
    u_swap (.din(s_in), .fault(s_f), .dout(s_out));

  // control a = line 0, targets b = line 1, c = line 2
  logic [2:0] p_in, p_out;
  gate_fault_t p_f;
  rev_fredkin #(.W(3), .CTRL_MASK(3'b001), .CTRL_POL(3'b111), .T0(1), .T1(2))
    u_pos (.din(p_in), .fault(p_f), .dout(p_out));

  logic [2:0] n_in, n_out;
  gate_fault_t n_f;
  rev_fredkin #(.W(3), .CTRL_MASK(3'b001), .CTRL_POL(3'b000), .T0(1), .T1(2))
    u_neg (.din(n_in), .fault(n_f), .dout(n_out));

  // Printed behaviour of the positive Fredkin gate, abc -> xyz.
  localparam string FRED_TABLE [8] = '{"000000", "001001", "010010", "011011",
                                       "100100", "101110", "110101", "111111"};

  function automatic logic [2:0] str3_to_lines(input string s, input int off);
    return {s[off+2] == "1", s[off+1] == "1", s[off] == "1"};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c;
    s_f = NO_FAULT; p_f = NO_FAULT; n_f = NO_FAULT;
    s_in = '0; p_in = '0; n_in = '0;

    for (int i = 0; i < 4; i++) begin
      s_in = 2'(i); #1;
      check(s_out == {s_in[0], s_in[1]}, "SWAP gate");
    end
    foreach (FRED_TABLE[r]) begin
      p_in = str3_to_lines(FRED_TABLE[r], 0); #1;
      check(p_out == str3_to_lines(FRED_TABLE[r], 3),
            $sformatf("positive Fredkin row %s gave %b", FRED_TABLE[r], p_out));
    end
    for (int i = 0; i < 8; i++) begin
      n_in = 3'(i); {c, b, a} = n_in; #1;
      check(n_out[0] == a
            && n_out[1] == ((~a & c) | (a & b))
            && n_out[2] == ((~a & b) | (a & c)),
            $sformatf("negative Fredkin input %b", n_in));
    end

    for (int i = 0; i < 8; i++) begin
      p_in = 3'(i);
      p_f = NO_FAULT; p_f.missing = 1'b1; #1;
      check(p_out == p_in, "missing Fredkin passes inputs");
      p_f = NO_FAULT; p_f.repeated = 1'b1; #1;
      check(p_out == p_in, "repeated Fredkin cancels itself");
      p_f = NO_FAULT; p_f.ctrl_drop = 4'b0001; #1;
      check(p_out == {p_in[1], p_in[2], p_in[0]}, "Fredkin without control always swaps");
      p_f = NO_FAULT; p_f.ctrl_add = 4'b0110; #1;     // on targets: ignored
      check(p_out == ((p_in[0]) ? {p_in[1], p_in[2], p_in[0]} : p_in),
            "control added on a target line is ignored");
    end
    for (int i = 0; i < 4; i++) begin
      s_in = 2'(i);
      s_f = NO_FAULT; s_f.ctrl_add = 4'b0100; #1;     // line 2 does not exist: no effect
      check(s_out == {s_in[0], s_in[1]}, "SWAP with out-of-range added control");
    end
    // appearing control on the negative gate's free bit is impossible with 3
    // lines; drop the negative control and add a positive one on line 0
    for (int i = 0; i < 8; i++) begin
      n_in = 3'(i);
      n_f = NO_FAULT; n_f.ctrl_drop = 4'b0001; n_f.ctrl_add = 4'b0001; #1;
      check(n_out == ((n_in[0]) ? {n_in[1], n_in[2], n_in[0]} : n_in),
            "negative control replaced by an appearing positive control");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
