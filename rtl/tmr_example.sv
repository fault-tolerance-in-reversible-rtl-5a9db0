// tmr_example: triple modular redundancy around the 3x3 example circuit.
//
// Three copies of rev_example_circuit see the same inputs a, b, c. Their
// outputs of interest (x) go to lines a, b and c of one reversible majority
// voter, which gives the corrected output u. Any single fault confined to
// one copy - a flipped line, a missing, inactive or repeated gate, a missing
// or extra control point, or several missing gates of that copy - corrupts
// at most one voter input and is masked. The copies' garbage lines and the
// voter's garbage lines are brought out so the whole arrangement stays
// reversible.
//
// VOTER selects the two-gate (default, as in the described arrangement) or
// the three-gate voter. mod_fault[i] injects faults into copy i and
// voter_fault into the voter; tie them to zero for normal operation.
//
// Purely combinational.
module tmr_example
  import rev_pkg::*;
#(
  parameter voter_kind_e VOTER = MVC_TWO_GATE
) (
  input  logic                 a,
  input  logic                 b,
  input  logic                 c,
  input  example_fault_t [2:0] mod_fault,
  input  voter_fault_t         voter_fault,
  output logic                 u,
  output logic [2:0]           mod_x,        // the three voter inputs
  output logic [2:0][1:0]      mod_garbage,  // {z, y} of each copy
  output logic [1:0]           voter_garbage
);

  for (genvar i = 0; i < 3; i++) begin : g_copy
    rev_example_circuit u_circuit (
      .a(a), .b(b), .c(c),
      .fault(mod_fault[i]),
      .x(mod_x[i]), .y(mod_garbage[i][0]), .z(mod_garbage[i][1])
    );
  end

  mvc_select #(.KIND(VOTER)) u_voter (
    .a(mod_x[0]), .b(mod_x[1]), .c(mod_x[2]),
    .fault(voter_fault),
    .maj(u), .garbage_b(voter_garbage[0]), .garbage_c(voter_garbage[1])
  );

endmodule
