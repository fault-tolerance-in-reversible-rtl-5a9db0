// tb_mvc_failure_probability: voter failure probability when the two Stage B
// gates (the negative CNOT and the Fredkin gate) can each be missing or
// inactive, for voter input 100.
//
// 1. Exact part. For both voters the testbench finds, by applying input 100
//    under each of the four combinations of missing Stage B gates, which
//    combinations make the voter fail. With each gate missing independently
//    with probability x it then computes the one-trial failure probability
//    P1 = sum of the probabilities of the failing combinations, and the
//    probability of at least one failure in N trials, 1 - (1 - P1)^N. These
//    are compared with the published figures for x = 0.001% ... 0.005% and
//    N = 100, 1000, 10000: P1 = 2x - x^2 to 1e-9 relative, and the N-trial
//    figures, which were themselves obtained by random sampling, to 10% +
//    0.002.
// 2. Monte Carlo part. For each x, gates are removed at random in 100
//    batches of 10000 voter operations on each voter, and the first failing
//    operation of each batch is recorded. This traces the failure probability
//    as a function of the number of trials k: for k = 100, 1000, 2000, 5000
//    and 10000 the number of batches that failed within their first k
//    operations must lie within four standard deviations (plus one) of
//    100 * (1 - (1 - P1)^k). Operations in which no gate is removed cannot
//    fail and are not applied to the voters.
// One voter operation per time unit; a watchdog stops the run after
// 5000000 units.
`timescale 1ns/1ps
module tb_mvc_failure_probability;
  import rev_pkg::*;

  logic         a, b, c;
  voter_fault_t f2, f3;
  logic         m2, m3, gb2, gc2, gb3, gc3;

  mvc_two_gate   u_two   (.a, .b, .c, .fault(f2), .maj(m2), .garbage_b(gb2), .garbage_c(gc2));
  mvc_three_gate u_three (.a, .b, .c, .fault(f3), .maj(m3), .garbage_b(gb3), .garbage_c(gc3));

  int checks   = 0;
  int failures = 0;

  localparam int  NX = 5;
  localparam real XS [NX]    = '{1.0e-5, 2.0e-5, 3.0e-5, 4.0e-5, 5.0e-5};
  localparam real P1_PUB [NX] = '{1.99999e-5, 3.99996e-5, 5.99991e-5, 7.99984e-5, 9.99975e-5};
  localparam int  NS [3]     = '{100, 1000, 10000};
  localparam real P2_PUB [NX][3] = '{'{0.002, 0.018, 0.18},
                                     '{0.004, 0.038, 0.34},
                                     '{0.006, 0.058, 0.45},
                                     '{0.008, 0.078, 0.55},
                                     '{0.010, 0.09,  0.62}};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Apply one fault combination to both voters with input 100; return the
  // failure flags {three-gate, two-gate}.
  task automatic run_once(input logic cnot_gone, input logic fred_gone, output logic [1:0] fail);
    {a, b, c} = 3'b100;
    f2 = VOTER_NO_FAULT; f3 = VOTER_NO_FAULT;
    f2.cnot.missing = cnot_gone; f2.fredkin.missing = fred_gone;
    f3.cnot.missing = cnot_gone; f3.fredkin.missing = fred_gone;
    #1;
    fail = {m3 != 1'b0, m2 != 1'b0};                     // majority of 100 is 0
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] fails [4];                                // index {fred_gone, cnot_gone}
    real        p1 [2];
    f2 = VOTER_NO_FAULT; f3 = VOTER_NO_FAULT; {a, b, c} = '0;

    for (int g = 0; g < 4; g++) run_once(g[0], g[1], fails[g]);
    check(fails[0] == 2'b00, "fault-free voters must not fail on input 100");

    // ---- exact part
    for (int i = 0; i < NX; i++) begin
      real x;
      x = XS[i];
      for (int v = 0; v < 2; v++) begin
        p1[v] = 0.0;
        for (int g = 0; g < 4; g++) begin
          real pc;
          pc = (g[0] ? x : 1.0 - x) * (g[1] ? x : 1.0 - x);
          if (fails[g][v]) p1[v] += pc;
        end
        check(abs_r(p1[v] - P1_PUB[i]) <= 1.0e-9 * P1_PUB[i],
              $sformatf("voter %0d, x = %g: P1 = %g, published %g", v + 2, x, p1[v], P1_PUB[i]));
        for (int n = 0; n < 3; n++) begin
          real p2;
          p2 = 1.0 - (1.0 - p1[v]) ** real'(NS[n]);
          check(abs_r(p2 - P2_PUB[i][n]) <= 0.1 * P2_PUB[i][n] + 0.002,
                $sformatf("voter %0d, x = %g, N = %0d: P2 = %f, published %f",
                          v + 2, x, NS[n], p2, P2_PUB[i][n]));
          if (v == 0)
            $display("x = %7.5f%%  P1 = %.5e  N = %5d  P2 = %.4f (published %.3f)",
                     x * 100.0, p1[v], NS[n], p2, P2_PUB[i][n]);
        end
      end
    end

    // ---- Monte Carlo part: every x, failure probability against trials k
    for (int i = 0; i < NX; i++) begin
      localparam int BATCHES = 100;
      localparam int OPS     = 10000;
      localparam int NK      = 5;
      localparam int KS [NK] = '{100, 1000, 2000, 5000, 10000};
      int unsigned thresh;
      int          first [2][BATCHES];                    // first failing operation, OPS if none
      thresh = int'(XS[i] * 4294967296.0);
      for (int bt = 0; bt < BATCHES; bt++) begin
        first[0][bt] = OPS; first[1][bt] = OPS;
        for (int op = 0; op < OPS; op++) begin
          logic       cg, fg;
          logic [1:0] fl;
          cg = ($urandom < thresh);
          fg = ($urandom < thresh);
          if (cg || fg) begin                             // fault-free operations cannot fail
            run_once(cg, fg, fl);
            for (int v = 0; v < 2; v++)
              if (fl[v] && first[v][bt] == OPS) first[v][bt] = op;
          end
        end
      end
      for (int kk = 0; kk < NK; kk++) begin
        real pb, mean, sd;
        int  hit [2];
        pb   = 1.0 - (1.0 - P1_PUB[i]) ** real'(KS[kk]);
        mean = BATCHES * pb;
        sd   = (BATCHES * pb * (1.0 - pb)) ** 0.5;
        for (int v = 0; v < 2; v++) begin
          hit[v] = 0;
          for (int bt = 0; bt < BATCHES; bt++) hit[v] += int'(first[v][bt] < KS[kk]);
          check(abs_r(real'(hit[v]) - mean) <= 4.0 * sd + 1.0,
                $sformatf("voter %0d, x = %g, k = %0d: %0d batches failed, expected %.1f",
                          v + 2, XS[i], KS[kk], hit[v], mean));
        end
        $display("Monte Carlo x = %7.5f%%  k = %5d: batches failed two-gate %3d, three-gate %3d of %0d (expected %.1f +- %.1f)",
                 XS[i] * 100.0, KS[kk], hit[0], hit[1], BATCHES, mean, sd);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
