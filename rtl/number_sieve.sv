// number_sieve: a delay-line number sieve, a special-purpose machine that
// finds the integers N satisfying one congruence condition per modulus.
//
// Each modulus m has a delay line of m bits; bit r of the pattern is 1 when
// residue r is allowed. In work mode every line recirculates on itself, one
// number per clock, and a clock on which all lines show a 1 is a solution: the
// machine stops, and the result counter, which counts work-mode clocks, holds
// the solution. Restarting continues with the next number.
//
// In idle mode the lines form one serial chain of L = sum of the moduli bits,
// loaded one bit at a time. The beat counter (two short lines of coprime
// lengths with product L) marks where the next bit goes: each insertion
// stretches both beat lines by one clock, so each bit lands one chain position
// after the previous one. L bits fill the chain; the first bit loaded ends in
// the last line. Loading order: lines from last to first, and within line m the
// residues 1, 2, ..., m-1 and then 0. Loading the same program a second time
// compares it against the first and lights `load_error` on any difference.
//
// Interface (all strobes synchronous, one clock long):
//   bit_one / bit_zero   present a program bit when `ready` is high
//   work_req             start work at the next beat coincidence
//   idle_req             stop work now (plants the beat-counter marker)
//   force_work           enter work at once (start-up switch)
//   counter_clear        clear both counters
//   check_clear          clear the load-check flip-flop before a second load
// After reset the machine is in work mode with empty lines; an `idle_req`
// then prepares it for loading (the start-up sequence of the source design).
// Defaults are the full 31-line machine (moduli 2..127, L = 1720); the
// two-line experimental machine is FIRST_LINE=29, NUM_LINES=2, BEAT_A=15,
// BEAT_B=16.
module number_sieve
  import sieve_pkg::*;
#(
  parameter int unsigned FIRST_LINE = 0,
  parameter int unsigned NUM_LINES  = 31,
  parameter int unsigned BEAT_A     = 40,
  parameter int unsigned BEAT_B     = 43,
  parameter int unsigned RESULT_W   = 32,
  parameter int unsigned SOLUTION_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // loading
  input  logic                  bit_one,
  input  logic                  bit_zero,
  output logic                  ready,
  // mode control
  input  logic                  work_req,
  input  logic                  idle_req,
  input  logic                  force_work,
  output logic                  work,
  output logic                  work_pending, // start requested, waiting for Z
  output logic                  solution,     // coincidence S on this edge
  output logic                  beat,         // beat-counter coincidence Z
  // counters
  input  logic                  counter_clear,
  output logic [RESULT_W-1:0]   result,
  output logic [SOLUTION_W-1:0] solutions,
  // loading check
  input  logic                  check_clear,
  output logic                  load_error,
  // line outputs, for observing any line while the machine runs
  output logic [NUM_LINES-1:0]  line_out
);

  localparam int unsigned CHAIN = chain_length(FIRST_LINE, NUM_LINES);

  initial assert (BEAT_A * BEAT_B == CHAIN)
    else $error("number_sieve: BEAT_A*BEAT_B must equal the chain length %0d", CHAIN);

  logic ins_en, ins_bit;
  logic z, g, s, k;
  logic all_ones, last_out;

  input_unit u_input (
    .clk    (clk),
    .rst_n  (rst_n),
    .u      (bit_one),
    .v      (bit_zero),
    .z      (z),
    .ready  (ready),
    .ins_en (ins_en),
    .ins_bit(ins_bit)
  );

  beat_counter #(.LEN_A(BEAT_A), .LEN_B(BEAT_B)) u_beat (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ins_en),
    .g    (g),
    .k    (k),
    .z    (z)
  );

  control_unit u_control (
    .clk          (clk),
    .rst_n        (rst_n),
    .work_req     (work_req),
    .idle_req     (idle_req),
    .force_work   (force_work),
    .z            (z),
    .all_ones     (all_ones),
    .bit_waiting  (~ready),
    .g            (g),
    .s            (s),
    .k            (k),
    .start_pending(work_pending)
  );

  sieve_array #(.FIRST(FIRST_LINE), .NLINES(NUM_LINES)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .g       (g),
    .ins_en  (ins_en),
    .ins_bit (ins_bit),
    .line_out(line_out),
    .last_out(last_out),
    .all_ones(all_ones)
  );

  sieve_counters #(.RESULT_W(RESULT_W), .SOLUTION_W(SOLUTION_W)) u_counters (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (counter_clear),
    .g        (g),
    .s        (s),
    .result   (result),
    .solutions(solutions)
  );

  load_check u_check (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (check_clear),
    .ins_en  (ins_en),
    .ins_bit (ins_bit),
    .last_out(last_out),
    .error   (load_error)
  );

  assign work     = g;
  assign solution = s;
  assign beat     = z;

endmodule
