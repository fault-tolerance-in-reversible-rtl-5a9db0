// ft_rev_top: the fault tolerant reversible designs side by side.
//
// Two independent TMR arrangements share nothing but this wrapper:
//   ex_*  the 3x3 example circuit tripled and voted (tmr_example),
//   fa_*  the fault tolerant full adder (ft_full_adder), whose Sum and
//         Carry each have their own voter.
// Every fault-injection control of both arrangements is a port, so a test
// can place any single fault in any copy or voter; tie them all to zero for
// normal operation. The voter choice of each arrangement is a parameter.
//
// Purely combinational: there is no clock and no state anywhere.
module ft_rev_top
  import rev_pkg::*;
#(
  parameter voter_kind_e EX_VOTER       = MVC_TWO_GATE,
  parameter voter_kind_e FA_SUM_VOTER   = MVC_TWO_GATE,
  parameter voter_kind_e FA_CARRY_VOTER = MVC_THREE_GATE
) (
  // TMR example circuit
  input  logic                 ex_a,
  input  logic                 ex_b,
  input  logic                 ex_c,
  input  example_fault_t [2:0] ex_mod_fault,
  input  voter_fault_t         ex_voter_fault,
  output logic                 ex_u,
  output logic [2:0]           ex_mod_x,
  output logic [2:0][1:0]      ex_mod_garbage,
  output logic [1:0]           ex_voter_garbage,
  // fault tolerant full adder
  input  logic                 fa_a,
  input  logic                 fa_b,
  input  logic                 fa_carry_in,
  input  adder_fault_t [2:0]   fa_mod_fault,
  input  voter_fault_t         fa_sum_voter_fault,
  input  voter_fault_t         fa_carry_voter_fault,
  output logic                 fa_sum,
  output logic                 fa_carry,
  output logic [2:0]           fa_mod_sum,
  output logic [2:0]           fa_mod_carry,
  output logic [2:0][1:0]      fa_mod_garbage,
  output logic [1:0]           fa_sum_voter_garbage,
  output logic [1:0]           fa_carry_voter_garbage
);

  tmr_example #(.VOTER(EX_VOTER)) u_tmr_example (
    .a(ex_a), .b(ex_b), .c(ex_c),
    .mod_fault(ex_mod_fault), .voter_fault(ex_voter_fault),
    .u(ex_u), .mod_x(ex_mod_x), .mod_garbage(ex_mod_garbage),
    .voter_garbage(ex_voter_garbage)
  );

  ft_full_adder #(.SUM_VOTER(FA_SUM_VOTER), .CARRY_VOTER(FA_CARRY_VOTER)) u_ft_full_adder (
    .a(fa_a), .b(fa_b), .carry_in(fa_carry_in),
    .mod_fault(fa_mod_fault),
    .sum_voter_fault(fa_sum_voter_fault), .carry_voter_fault(fa_carry_voter_fault),
    .corrected_sum(fa_sum), .corrected_carry(fa_carry),
    .mod_sum(fa_mod_sum), .mod_carry(fa_mod_carry), .mod_garbage(fa_mod_garbage),
    .sum_voter_garbage(fa_sum_voter_garbage), .carry_voter_garbage(fa_carry_voter_garbage)
  );

endmodule
