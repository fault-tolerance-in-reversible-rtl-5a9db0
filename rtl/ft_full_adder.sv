// ft_full_adder: fault tolerant reversible full adder by triple modular
// redundancy.
//
// Three copies of rev_full_adder add the same a, b and carry_in, each with
// its constant input held at 0. The three Sum lines go to voter 1 and the
// three Carry lines to voter 2; their majority lines are corrected_sum and
// corrected_carry. A single fault inside one adder copy may spoil both of
// that copy's outputs, but each voter still sees only one wrong input, so
// both results are masked.
//
// By default voter 1 is the two-gate voter and voter 2 the three-gate voter,
// so both proposed voters appear; either may be used in either place, which
// SUM_VOTER and CARRY_VOTER allow. Which voter sits where by default is this
// design's choice. All garbage lines are brought out.
//
// Purely combinational.
module ft_full_adder
  import rev_pkg::*;
#(
  parameter voter_kind_e SUM_VOTER   = MVC_TWO_GATE,
  parameter voter_kind_e CARRY_VOTER = MVC_THREE_GATE
) (
  input  logic               a,
  input  logic               b,
  input  logic               carry_in,
  input  adder_fault_t [2:0] mod_fault,
  input  voter_fault_t       sum_voter_fault,
  input  voter_fault_t       carry_voter_fault,
  output logic               corrected_sum,
  output logic               corrected_carry,
  output logic [2:0]         mod_sum,         // voter 1 inputs
  output logic [2:0]         mod_carry,       // voter 2 inputs
  output logic [2:0][1:0]    mod_garbage,     // {garbage2, garbage1} per copy
  output logic [1:0]         sum_voter_garbage,
  output logic [1:0]         carry_voter_garbage
);

  for (genvar i = 0; i < 3; i++) begin : g_copy
    rev_full_adder u_adder (
      .const_in(1'b0), .carry_in(carry_in), .a(a), .b(b),
      .fault(mod_fault[i]),
      .carry_out(mod_carry[i]), .sum(mod_sum[i]),
      .garbage1(mod_garbage[i][0]), .garbage2(mod_garbage[i][1])
    );
  end

  mvc_select #(.KIND(SUM_VOTER)) u_voter1 (
    .a(mod_sum[0]), .b(mod_sum[1]), .c(mod_sum[2]),
    .fault(sum_voter_fault),
    .maj(corrected_sum),
    .garbage_b(sum_voter_garbage[0]), .garbage_c(sum_voter_garbage[1])
  );

  mvc_select #(.KIND(CARRY_VOTER)) u_voter2 (
    .a(mod_carry[0]), .b(mod_carry[1]), .c(mod_carry[2]),
    .fault(carry_voter_fault),
    .maj(corrected_carry),
    .garbage_b(carry_voter_garbage[0]), .garbage_c(carry_voter_garbage[1])
  );

endmodule
