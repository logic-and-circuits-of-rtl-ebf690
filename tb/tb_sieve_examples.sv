// tb_sieve_examples: the full 31-line machine at default parameters solving
// four small problems, each loaded as a complete 1720-bit program in which
// every line not named by the problem allows all residues:
//   primes by Eratosthenes:  x = 1 (mod 2), 1,2 (mod 3), 1..4 (mod 5)
//                            -> 1, 7, 11, 13, 17, 19, 23, 29, 31, 37
//   Chinese remainder:       x = 1 (mod 2), 2 (mod 3), 3 (mod 5) -> 23, 53
//   x^2 + y^2 = 113:         x = 1,2 (mod 3), 2,3 (mod 5), 0,1,2,5,6 (mod 7),
//                            0,3,4,7,8 (mod 11) -> roots 7 and 8 come first
//   two-line problem:        x = 0,112 (mod 113), 0,126 (mod 127)
//                            -> 1016, 13334, 14350, 14351
// Every answer is also compared with a search by residue arithmetic.
module tb_sieve_examples;
  import sieve_pkg::*;
  localparam int unsigned NL = NUM_PRIMES;
  localparam int unsigned CHAIN = chain_length(0, NL);

  logic clk = 0, rst_n = 0;
  logic bit_one = 0, bit_zero = 0, ready;
  logic work_req = 0, idle_req = 0, force_work = 0;
  logic work, work_pending, solution, beat;
  logic counter_clear = 0;
  logic [31:0] result;
  logic [15:0] solutions;
  logic check_clear = 0, load_error;
  logic [NL-1:0] line_out;

  int checks = 0, failures = 0;
  bit allowed [NL][128];

  always #5 clk = ~clk;

  number_sieve dut (
    .clk, .rst_n, .bit_one, .bit_zero, .ready, .work_req, .idle_req, .force_work,
    .work, .work_pending, .solution, .beat, .counter_clear, .result, .solutions,
    .check_clear, .load_error, .line_out
  );

  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic tick();
    @(negedge clk);
  endtask

  task automatic pulse(ref logic sig);
    sig = 1; tick(); sig = 0;
  endtask

  // all residues allowed on every line
  task automatic clear_problem();
    for (int i = 0; i < NL; i++)
      for (int r = 0; r < 128; r++) allowed[i][r] = (r < int'(PRIMES[i]));
  endtask

  // allow_only the line of modulus m to the listed residues
  task automatic allow_only(input int m, input int res [$]);
    for (int i = 0; i < NL; i++)
      if (int'(PRIMES[i]) == m) begin
        for (int r = 0; r < 128; r++) allowed[i][r] = 0;
        foreach (res[j]) allowed[i][res[j]] = 1;
      end
  endtask

  function automatic longint next_solution(longint after);
    bit ok;
    for (longint n = after + 1; ; n++) begin
      ok = 1;
      for (int i = 0; i < NL; i++) ok &= allowed[i][n % PRIMES[i]];
      if (ok) return n;
    end
  endfunction

  // last line first; within a line residues 1..m-1, then 0
  task automatic load_program();
    int r, waited;
    for (int i = NL - 1; i >= 0; i--) begin
      for (int j = 0; j < int'(PRIMES[i]); j++) begin
        r = (j + 1) % int'(PRIMES[i]);
        waited = 0;
        while (!ready && waited < 3 * CHAIN) begin tick(); waited++; end
        if (!ready || waited > CHAIN + 1) check("input accepted within one revolution", 0);
        if (!ready) return;
        if (allowed[i][r]) pulse(bit_one); else pulse(bit_zero);
      end
    end
    while (!ready) tick();
  endtask

  task automatic solve_problem(input string name, input longint expected [$]);
    longint got, ref_sol;
    int waited;
    load_program();
    counter_clear = 1; tick(); counter_clear = 0;
    ref_sol = 0;
    foreach (expected[n]) begin
      pulse(work_req);
      waited = 0;
      while (!work && waited < 3 * CHAIN) begin tick(); waited++; end
      waited = 0;
      while (work && waited < 100_000) begin tick(); waited++; end
      got = result;
      ref_sol = next_solution(ref_sol);
      check($sformatf("%s answer %0d: got %0d, computed %0d, expected %0d",
                      name, n, got, ref_sol, expected[n]),
            got == ref_sol && got == expected[n]);
    end
  endtask

  initial begin
    repeat (3) tick();
    rst_n = 1;
    repeat (100) tick();
    pulse(idle_req);

    clear_problem();
    allow_only(2, '{1});
    allow_only(3, '{1, 2});
    allow_only(5, '{1, 2, 3, 4});
    solve_problem("Eratosthenes", '{1, 7, 11, 13, 17, 19, 23, 29, 31, 37});

    clear_problem();
    allow_only(2, '{1});
    allow_only(3, '{2});
    allow_only(5, '{3});
    solve_problem("Chinese remainder", '{23, 53});

    clear_problem();
    allow_only(3, '{1, 2});
    allow_only(5, '{2, 3});
    allow_only(7, '{0, 1, 2, 5, 6});
    allow_only(11, '{0, 3, 4, 7, 8});
    solve_problem("x^2+y^2=113", '{7, 8});

    clear_problem();
    allow_only(113, '{0, 112});
    allow_only(127, '{0, 126});
    solve_problem("two-line problem", '{1016, 13334, 14350, 14351});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
