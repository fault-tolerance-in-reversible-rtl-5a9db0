// tb_rev_toffoli: self-checking test of the multiple-control Toffoli model.
//
// Five instances cover the family: a NOT gate, a positive CNOT, a 3-bit
// positive Toffoli (checked against its printed truth table), a 3-bit
// Toffoli with negative controls, and a 4-line gate with mixed controls
// x4 = a4 XOR (NOT a1 AND a2 AND NOT a3). Expected values come from tables
// and formulas written out here, not from the model. Each gate is then
// checked under every fault kind: missing, repeated, a dropped control point
// and an added control point. One step per time unit; a watchdog stops the
// run after 100000 units.
`timescale 1ns/1ps
module tb_rev_toffoli;
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

  // NOT gate
  logic [0:0] not_in, not_out;
  gate_fault_t not_f;
  rev_toffoli #(.W(1), .CTRL_MASK(1'b0), .CTRL_POL(1'b1), .TGT(0))
    u_not (.din(not_in), .fault(not_f), .dout(not_out));

  // positive CNOT: control line 0 (X), target line 1 (Y)
  logic [1:0] cn_in, cn_out;
  gate_fault_t cn_f;
  rev_toffoli #(.W(2), .CTRL_MASK(2'b01), .CTRL_POL(2'b11), .TGT(1))
    u_cnot (.din(cn_in), .fault(cn_f), .dout(cn_out));

  // 3-bit positive Toffoli: controls a1 (line 0), a2 (line 1), target a3
  logic [2:0] t_in, t_out;
  gate_fault_t t_f;
  rev_toffoli #(.W(3), .CTRL_MASK(3'b011), .CTRL_POL(3'b111), .TGT(2))
    u_tof (.din(t_in), .fault(t_f), .dout(t_out));

  // 3-bit Toffoli with both controls negative
  logic [2:0] tn_in, tn_out;
  gate_fault_t tn_f;
  rev_toffoli #(.W(3), .CTRL_MASK(3'b011), .CTRL_POL(3'b000), .TGT(2))
    u_tofn (.din(tn_in), .fault(tn_f), .dout(tn_out));

  // 4-line mixed-polarity gate: negative a1, positive a2, negative a3, target a4
  logic [3:0] m_in, m_out;
  gate_fault_t m_f;
  rev_toffoli #(.W(4), .CTRL_MASK(4'b0111), .CTRL_POL(4'b0010), .TGT(3))
    u_mct (.din(m_in), .fault(m_f), .dout(m_out));

  // Printed truth table of the 3x3 positive Toffoli, as strings a1a2a3 -> x1x2x3.
  localparam string TOF_TABLE [8] = '{"000000", "001001", "010010", "011011",
                                      "100100", "101101", "110111", "111110"};

  function automatic logic [2:0] str3_to_lines(input string s, input int off);
    // character off is line 0 (a1), off+1 line 1, off+2 line 2
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
    not_f = NO_FAULT; cn_f = NO_FAULT; t_f = NO_FAULT; tn_f = NO_FAULT; m_f = NO_FAULT;
    not_in = '0; cn_in = '0; t_in = '0; tn_in = '0; m_in = '0;

    // NOT
    for (int i = 0; i < 2; i++) begin
      not_in = 1'(i); #1;
      check(not_out == 1'(1 - i), "NOT gate");
    end
    // CNOT: P = X, Q = Y xor X
    for (int i = 0; i < 4; i++) begin
      cn_in = 2'(i); #1;
      check(cn_out[0] == cn_in[0] && cn_out[1] == (cn_in[1] ^ cn_in[0]),
            $sformatf("CNOT input %b", cn_in));
    end
    // 3-bit Toffoli against the printed table
    foreach (TOF_TABLE[r]) begin
      t_in = str3_to_lines(TOF_TABLE[r], 0); #1;
      check(t_out == str3_to_lines(TOF_TABLE[r], 3),
            $sformatf("Toffoli row %s gave %b", TOF_TABLE[r], t_out));
    end
    // negative-control Toffoli: target flips only when a1 = a2 = 0
    for (int i = 0; i < 8; i++) begin
      tn_in = 3'(i); #1;
      check(tn_out == (tn_in ^ ((tn_in[1:0] == 2'b00) ? 3'b100 : 3'b000)),
            $sformatf("negative Toffoli input %b", tn_in));
    end
    // mixed 4-line gate
    for (int i = 0; i < 16; i++) begin
      m_in = 4'(i); #1;
      check(m_out == {m_in[3] ^ (~m_in[0] & m_in[1] & ~m_in[2]), m_in[2:0]},
            $sformatf("mixed MCT input %b", m_in));
    end

    // faults on the 3-bit Toffoli
    for (int i = 0; i < 8; i++) begin
      t_in = 3'(i);
      t_f = NO_FAULT; t_f.missing = 1'b1; #1;
      check(t_out == t_in, "missing Toffoli passes inputs");
      t_f = NO_FAULT; t_f.repeated = 1'b1; #1;
      check(t_out == t_in, "repeated Toffoli cancels itself");
      t_f = NO_FAULT; t_f.ctrl_drop = 4'b0010; #1;   // control a2 disappears
      check(t_out == {t_in[2] ^ t_in[0], t_in[1:0]}, "Toffoli with control a2 missing");
      t_f = NO_FAULT; t_f.ctrl_drop = 4'b0011; #1;   // both controls gone: a NOT
      check(t_out == {~t_in[2], t_in[1:0]}, "Toffoli with both controls missing");
    end
    // appearance fault on a CNOT: extra control on the target is ignored,
    // so add the 4-line gate's free line instead: control on line 3 is the target,
    // use the 3-line CNOT-like case through the Toffoli with a2 dropped and a2 added back
    t_f = NO_FAULT;
    for (int i = 0; i < 16; i++) begin
      m_in = 4'(i);
      m_f = NO_FAULT; m_f.ctrl_add = 4'b1000; #1;    // on the target: no effect
      check(m_out == {m_in[3] ^ (~m_in[0] & m_in[1] & ~m_in[2]), m_in[2:0]},
            "control added on the target line is ignored");
      m_f = NO_FAULT; m_f.ctrl_drop = 4'b0001; m_f.ctrl_add = 4'b0001; #1;
      // negative control a1 replaced by an appearing positive control
      check(m_out == {m_in[3] ^ (m_in[0] & m_in[1] & ~m_in[2]), m_in[2:0]},
            "appearing positive control point");
    end
    for (int i = 0; i < 4; i++) begin
      cn_in = 2'(i);
      cn_f = NO_FAULT; cn_f.ctrl_drop = 4'b0001; #1; // CNOT control gone: NOT on Y
      check(cn_out == {~cn_in[1], cn_in[0]}, "CNOT with control missing");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
