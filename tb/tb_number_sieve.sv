// tb_number_sieve: end-to-end test on the two-line machine (lines 113 and 127,
// beat lines 15 and 16, a 240-bit chain) with five congruence problems.
// Each problem is loaded bit by bit through the input handshake and then run
// solution by solution. Every stop is checked against a solution computed in
// the testbench by direct residue arithmetic and against the answers published
// for these problems; the work time must equal the advance of the result
// counter (one number per clock) and a start must come within one chain
// revolution of the request.
// Mechanisms that must each occur at least once: bit insertion, a start that
// waits for the beat coincidence, a stop at a solution, a restart that stops
// after a single clock (two consecutive solutions), a manual stop and resume,
// the start-up sequence with the start-up switch, a clean double load and a
// double load that the check flags.
module tb_number_sieve;
  import sieve_pkg::*;
  localparam int unsigned FIRST = 29, NL = 2, BA = 15, BB = 16;
  localparam int unsigned CHAIN = chain_length(FIRST, NL);

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
  int n_insert = 0, n_wait_z = 0, n_stop = 0, n_consecutive = 0, n_manual = 0;
  int n_startup = 0, n_clean_reload = 0, n_flagged = 0;

  bit allowed [NL][128];

  always #5 clk = ~clk;

  number_sieve #(.FIRST_LINE(FIRST), .NUM_LINES(NL), .BEAT_A(BA), .BEAT_B(BB)) dut (
    .clk, .rst_n, .bit_one, .bit_zero, .ready, .work_req, .idle_req, .force_work,
    .work, .work_pending, .solution, .beat, .counter_clear, .result, .solutions,
    .check_clear, .load_error, .line_out
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  function automatic int unsigned modulus(int i);
    return PRIMES[FIRST + i];
  endfunction

  task automatic set_problem(input int r0 [$], input int r1 [$]);
    for (int i = 0; i < NL; i++)
      for (int r = 0; r < 128; r++) allowed[i][r] = 0;
    foreach (r0[j]) allowed[0][r0[j]] = 1;
    foreach (r1[j]) allowed[1][r1[j]] = 1;
  endtask

  // smallest N > after that satisfies every line's congruence
  function automatic longint next_solution(longint after);
    bit ok;
    for (longint n = after + 1; ; n++) begin
      ok = 1;
      for (int i = 0; i < NL; i++) ok &= allowed[i][n % modulus(i)];
      if (ok) return n;
    end
  endfunction

  // Load the program: last line first; within a line residues 1..m-1, then 0.
  // flip_at >= 0 inverts that bit (counted in loading order).
  task automatic load_program(input int flip_at);
    int idx = 0;
    int r;
    int waited;
    bit b;
    for (int i = NL - 1; i >= 0; i--) begin
      for (int j = 0; j < int'(modulus(i)); j++) begin
        r = (j + 1) % int'(modulus(i));
        b = allowed[i][r] ^ (idx == flip_at);
        waited = 0;
        while (!ready && waited < 3 * CHAIN) begin tick(); waited++; end
        check("input accepted within one chain revolution", ready && waited <= CHAIN + 1);
        if (!ready) return;
        if (b) pulse(bit_one); else pulse(bit_zero);
        n_insert++;
        idx++;
      end
    end
    waited = 0;
    while (!ready && waited < 3 * CHAIN) begin tick(); waited++; end
    check("last bit inserted", ready);
  endtask

  // Request work and run to the next stop; return the result counter.
  task automatic run_to_stop(output longint stopped_at);
    int latency = 0;
    int worked = 0;
    longint start_count;
    int sols_before;
    bit saw_s = 0;
    pulse(work_req);
    while (!work && latency < 3 * CHAIN) begin tick(); latency++; end
    check($sformatf("start within a revolution (%0d)", latency), work && latency <= CHAIN);
    if (latency > 0) n_wait_z++;
    start_count = result;
    sols_before = solutions;
    while (work && worked < 20_000) begin
      saw_s |= solution;
      tick();
      worked++;
    end
    check("stopped by coincidence S", saw_s && !work);
    check($sformatf("one number per clock: %0d clocks, counter +%0d", worked, result - start_count),
          longint'(worked) == longint'(result) - start_count);
    check("solution counter advanced by one", solutions == 16'(sols_before + 1));
    if (worked == 1) n_consecutive++;
    n_stop++;
    stopped_at = result;
  endtask

  task automatic solve_problem(input string name, input longint expected [$]);
    longint got, ref_sol;
    counter_clear = 1; tick(); counter_clear = 0;
    for (int n = 0; n < expected.size(); n++) begin
      run_to_stop(got);
      ref_sol = next_solution(n == 0 ? 0 : expected[n-1]);
      check($sformatf("%s answer %0d: got %0d, computed %0d, published %0d",
                      name, n, got, ref_sol, expected[n]),
            got == ref_sol && got == expected[n]);
    end
  endtask

  longint got;
  longint exp_sol;

  initial begin
    repeat (3) tick();
    rst_n = 1;
    tick();
    // start-up: reset leaves the machine in work mode; the start-up switch
    // also forces work; switching to idle plants the beat marker
    check("work mode after reset", work);
    pulse(idle_req);
    check("idle after switch", !work);
    pulse(force_work);
    check("start-up switch forces work", work);
    // stay in work longer than a beat line so any marker in flight is erased
    repeat (2 * BB) tick();
    pulse(idle_req);
    check("idle again", !work);
    n_startup++;

    // Problem 1: x = 0 (mod 113), x = 0 (mod 127); pressed 100 times
    set_problem('{0}, '{0});
    load_program(-1);
    counter_clear = 1; tick(); counter_clear = 0;
    for (int n = 1; n <= 100; n++) begin
      run_to_stop(got);
      if (n == 1) check($sformatf("problem 1 first answer %0d", got), got == 14351);
    end
    check($sformatf("problem 1 after 100 starts: %0d", result), result == 1435100);

    // Problem 2: two consecutive solutions 14350, 14351
    set_problem('{0, 112}, '{0, 126});
    load_program(-1);
    solve_problem("problem 2", '{1016, 13334, 14350, 14351});

    // Problem 3, with the loading check
    set_problem('{0, 70}, '{0, 70});
    load_program(-1);
    pulse(check_clear);
    load_program(-1);
    check("identical second load passes the check", !load_error);
    if (!load_error) n_clean_reload++;
    pulse(check_clear);
    load_program(57);
    check("faulty second load is flagged", load_error);
    if (load_error) n_flagged++;
    load_program(-1);
    pulse(check_clear);
    solve_problem("problem 3", '{70, 635, 13786, 14351});

    // Problem 4, with a manual stop and resume start_count the first answer
    set_problem('{1, 21}, '{15, 40});
    load_program(-1);
    counter_clear = 1; tick(); counter_clear = 0;
    pulse(work_req);
    while (!work) tick();
    repeat (3000) tick();
    pulse(idle_req);
    check("manual stop", !work && result == 3001);
    n_manual++;
    exp_sol = next_solution(result);
    run_to_stop(got);
    check($sformatf("problem 4 answer after resume: %0d", got), got == 4993 && got == exp_sol);
    run_to_stop(got);
    check("problem 4 answer 1", got == 8270);
    run_to_stop(got);
    check("problem 4 answer 2", got == 10962);
    run_to_stop(got);
    check("problem 4 answer 3", got == 14239);

    // Problem 5
    set_problem('{0, 108}, '{0, 28, 119});
    load_program(-1);
    solve_problem("problem 5", '{4854, 5080, 6215, 11295, 14125, 14351});

    $display("insertions %0d, starts waiting for Z %0d, stops %0d, consecutive %0d, manual %0d",
             n_insert, n_wait_z, n_stop, n_consecutive, n_manual);
    $display("start-up %0d, clean reloads %0d, flagged reloads %0d",
             n_startup, n_clean_reload, n_flagged);
    check("bit insertion exercised", n_insert > 0);
    check("start waiting for Z exercised", n_wait_z > 0);
    check("stop at solution exercised", n_stop > 0);
    check("consecutive solutions exercised", n_consecutive > 0);
    check("manual stop exercised", n_manual > 0);
    check("start-up sequence exercised", n_startup > 0);
    check("clean reload exercised", n_clean_reload > 0);
    check("flagged reload exercised", n_flagged > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
