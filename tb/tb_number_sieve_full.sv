// tb_number_sieve_full: the full 31-line machine (moduli 2..127, 1720-bit
// chain, beat lines 40 and 43) at its default parameters. A random program in
// which every residue is allowed with probability 7/8 is loaded bit by bit
// (about three million clocks), then the machine is run to its first twelve
// solutions, each compared with the smallest N above the previous one that the
// testbench finds by direct residue arithmetic.
module tb_number_sieve_full;
  import sieve_pkg::*;
  localparam int unsigned NL = NUM_PRIMES;
  localparam int unsigned CHAIN = chain_length(0, NL);
  localparam int unsigned RUNS = 12;

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
    repeat (4_000_000) @(posedge clk);
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
    checks++;
  endtask

  longint got, expected;
  int latency, worked;
  longint start_count;

  initial begin
    for (int i = 0; i < NL; i++)
      for (int r = 0; r < 128; r++) allowed[i][r] = ($urandom_range(0, 7) != 0);
    repeat (3) tick();
    rst_n = 1;
    // start-up: reset is work mode; wait out the beat lines, then go idle
    repeat (100) tick();
    pulse(idle_req);
    check("idle", !work);
    load_program();
    counter_clear = 1; tick(); counter_clear = 0;
    expected = 0;
    for (int n = 0; n < RUNS; n++) begin
      pulse(work_req);
      latency = 0;
      while (!work && latency < 3 * CHAIN) begin tick(); latency++; end
      check("start within one revolution", work && latency <= CHAIN);
      start_count = result;
      worked = 0;
      while (work && worked < 1_000_000) begin tick(); worked++; end
      got = result;
      expected = next_solution(expected);
      check($sformatf("solution %0d: got %0d, computed %0d", n, got, expected), got == expected);
      check("one number per clock", longint'(worked) == got - start_count);
      $display("solution %0d = %0d", n, got);
    end
    check("solution counter", solutions == 16'(RUNS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
