# Delay-line number sieve

A number sieve searches for integers that satisfy a set of congruences
simultaneously:

    x ≡ a_i1, a_i2, ... (mod m_i)   for every modulus m_i

with the moduli pairwise coprime. Problems of this shape come from quadratic
Diophantine equations (x² + y² = 113 becomes "x ≡ 1,2 mod 3; x ≡ 2,3 mod 5;
x ≡ 0,1,2,5,6 mod 7; ..."), from quadratic-residue questions, from the sieve of
Eratosthenes and from the Chinese remainder problem.

The machine described here keeps, for each modulus m, a circulating delay line
of exactly m bits. Bit r of that line is 1 when residue r is allowed. If all
lines advance one bit per clock, line m shows on clock N the bit for N mod m,
so a clock on which every line shows a 1 is a number N that passes every
congruence. The machine checks one number per clock, independent of how many
moduli it has: at the original 1 MHz that is 6 × 10⁷ numbers a minute. The
default build has 31 lines, the primes 2 through 127, 1720 bits in all.

Everything else in the design serves two purposes: getting the patterns into
the lines through a single serial input, and stopping and restarting the search
without losing its place.

## Two modes

The mode flip-flop FF-G (`work` output) connects the lines in one of two ways.

* **Work mode.** Every line feeds its own output back to its input. The
  coincidence gate ANDs all line outputs; a 1 there (`solution`, called S)
  ends work mode on the same clock. The result counter counts every work-mode
  clock, so at the stop it holds the number N that was found.
* **Idle mode.** The lines are joined end to end (line 1 → line 2 → … → line
  31 → line 1) into one serial register of L = Σm bits that keeps revolving.
  Program bits are written at one point of that ring, the input of the first
  line.

## Loading through one point: the beat counter

Only one bit can enter the ring per revolution at a given ring position, and
consecutive program bits must end up in consecutive positions. A marker is
needed that comes round once per revolution but one place later after every
bit written. That marker is the beat counter, and it is the least obvious part
of the design.

**One beat line.** A beat line is a delay line of LENGTH−1 bits followed by one
flip-flop, FF-F, and carries a single 1 (the marker).

* Normally the marker leaves the delay line, sets FF-F, and re-enters on the
  next clock when FF-F clears. One revolution therefore takes LENGTH clocks.
* While FF-D of the input unit is set (a bit is being written), FF-F is held
  for one extra clock and re-entry is blocked on the first clock. That
  revolution takes LENGTH+1 clocks.
* In work mode re-entry is blocked altogether, so the marker is erased.

**Two lines, one coincidence.** A single beat line would have to be L bits
long. Instead there are two lines of coprime lengths A and B with A·B = L, and
the marker signal Z is the AND of their outputs. Z recurs every A·B = L clocks,
once per ring revolution. Both lines stretch together when a bit is written, so
the next Z comes L+1 clocks later, one ring position further on. The defaults
are 40 × 43 = 1720 for the 31-line ring. The two-line machine (113 + 127 =
240 bits) uses 15 × 16.

**Input unit.** A program bit arrives as a one-clock strobe, `bit_one` (U) or
`bit_zero` (V). FF-A keeps its value and FF-B records that a bit is waiting
(`ready` low). At the next Z while FF-B is set, FF-D is set. On the following
clock the first line takes FF-A instead of the bit arriving from the last line,
and FF-B and FF-D clear. The equations are A_s = U, A_r = V, B_s = U+V,
B_r = D·B, D_s = Z·B, D_r = D, all on the clock edge; a set wins over a clear
on the same edge. A bit therefore waits at most one revolution plus two clocks.
The next bit may be strobed as soon as `ready` is high, or during the insertion
clock itself.

**Resulting loading order.** This follows from the timing above and is what a
program loader must produce. Bit k (counting from 0) ends up at ring position
L−1−k, counting from the input of the first line. As a result:

1. lines are loaded from the **last** line to the first;
2. within a line of modulus m the bits go in residue order **1, 2, …, m−1, 0**.

So a line that allows only residue 0 is loaded as m−1 zeros followed by a one.
A complete load is L bits and takes about L·(L+1) clocks when bits are always
ready: ≈ 58 000 clocks for the 240-bit machine and ≈ 3 million for the full
one. After a complete load the beat counter is back in its original phase.

## Stopping and resuming

**Starting.** `work_req` (the work switch) is held in the request flip-flop E
(`work_pending`). FF-G is set on the next Z, not at once. Between a stop and the
following Z-aligned start the idle ring has turned a whole number of
revolutions, so every line is back exactly where work stopped. The search
resumes at N+1 and the result counter simply continues. Starting also waits
while a program bit is pending, so a start never coincides with an insertion.

**Stopping.** A coincidence stops work on the very clock that counts N. If N+1
is also a solution, the next start stops after one counted clock, so adjacent
solutions such as 14350 and 14351 are both reported. `idle_req` stops work by
hand at any clock; resuming then continues the search from the next number.

**Marker planting.** On the clock where FF-G falls, for either reason, the
pulse K sets FF-F in both beat lines. K stands for the original differentiator
on G-bar. The beat counter then holds exactly one marker, aligned so that Z
falls on the ring revolutions counted from the stop.

**Start-up.** Reset puts FF-G in work mode with all lines empty. This mirrors
the original power-on set of FF-G, and `force_work` is the equivalent manual
switch. Switching to idle (`idle_req`) then plants the marker. One rule comes
straight from the delay-line nature of the beat counter: a work period shorter
than the longer beat line does not erase a marker that is still in flight. A
quick work/idle toggle can then leave two markers and scramble a load. Stay in
work mode at least max(A, B) clocks before switching to idle for loading. The
normal stop–start cycle never has a marker in flight and is not affected.
The opposite case, idle mode with no marker at all, shows as `ready` staying
low and `work_req` never being taken. The way out is `force_work`, a wait of
max(A, B) clocks, and `idle_req`.

## Checking a load

To verify a load, the same program is loaded a second time after pulsing
`check_clear` (switch R). On each insertion clock the bit being written is
compared with the bit arriving from the last line, which is the bit the first
loading put in that position. Any difference sets FF-M and lights
`load_error` (lamp N) until the next `check_clear`. The comparison is made only
on insertion clocks.

## Interface

All inputs are synchronous to `clk`; strobes are one clock long.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (one bit time), asynchronous active-low reset |
| `bit_one`, `bit_zero` | in | present a program bit; only when `ready` is high (assertion-checked) |
| `ready` | out | no program bit waiting |
| `work_req` | in | start work mode at the next beat coincidence |
| `idle_req` | in | stop work mode now |
| `force_work` | in | enter work mode now (start-up only; does not keep the search position) |
| `work`, `work_pending` | out | FF-G; start requested and not yet taken |
| `solution` | out | coincidence S: the number counted on this clock is a solution |
| `beat` | out | beat-counter coincidence Z |
| `counter_clear` | in | clear both counters |
| `result` | out | result counter (work-mode clocks; holds N after a stop) |
| `solutions` | out | number of coincidences found |
| `check_clear`, `load_error` | in/out | load check: clear, and error flag |
| `line_out` | out | output of every line, for observation |

Typical session: reset → wait ≥ max(A, B) clocks → `idle_req` → load L bits →
`counter_clear` → repeatedly `work_req` and wait for `work` to fall; read
`result`.

## Parameters

`number_sieve` parameters:

| parameter | default | meaning |
|---|---|---|
| `FIRST_LINE` | 0 | index of the first modulus in `sieve_pkg::PRIMES` (2, 3, 5, …, 127) |
| `NUM_LINES` | 31 | number of lines; the moduli are `PRIMES[FIRST_LINE +: NUM_LINES]` |
| `BEAT_A`, `BEAT_B` | 40, 43 | beat-line lengths; coprime, with product equal to the ring length (checked at elaboration) |
| `RESULT_W`, `SOLUTION_W` | 32, 16 | counter widths; the result counter wraps after 2³² numbers (≈ 71 min at 1 MHz) |

The two-line machine is `FIRST_LINE=29, NUM_LINES=2, BEAT_A=15, BEAT_B=16`.

## How it follows the original design, and where it departs

The original machine was built from LC delay boxes of 21 bits each, transistor
regenerating amplifiers and discrete flip-flops, clocked at about 1 MHz with
return-to-zero pulses. Only the two-line prototype was actually constructed.
This RTL keeps the logic and replaces the analogue parts:

* Each delay line is a chain of flip-flops, one per bit time. Pulse shaping,
  amplitude margins and the delay boxes themselves have no counterpart.
* The logic of the beat lines, of FF-A/FF-B/FF-D, of the first-line input gate
  (three terms: from the last line, the new bit, its own output) and of FF-M
  follows the original equations. Every "AND with the clock pulse" became a
  rising clock edge.
* The original control unit came from earlier work and is not described gate
  by gate. The version here has these properties of this design's own:
  starting only at Z, the request latch E, deferring a start while a bit is
  pending, K as a one-clock pulse on the falling edge of FF-G, and reset
  meaning "work mode".
* **Beat-counter lengths.** The original text pairs 33- and 61-bit beat lines
  (2013 bits) with the 31-line machine. Its own rule, and the working of the
  loading scheme, require the product to equal the ring length. The 31 prime
  lines add up to 1720 bits, so this design uses 40 × 43. The two-line values
  15 × 16 are the original ones.
* The second counter is taken to count solutions. The original only says that
  there are two binary counters, "to count solutions and also density".
* Reset values, counter widths and the synchronous input strobes are choices
  of this design. A truly asynchronous input, such as a tape reader, needs a
  synchroniser in front of `bit_one`/`bit_zero`.

Not built: the delay boxes and amplifiers (analogue); the power-on
differentiator (reset takes its place); the tape reader; and oscilloscope
monitoring of the lines (`line_out` is brought out for it).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_number_sieve`: the two-line machine (113, 127) runs five published test
  problems end to end. Loading goes through the handshake. Every answer is
  compared with both the known answer and a residue-arithmetic search.
  Answers checked:
  * x ≡ 0 mod both: 14351, and 1435100 after 100 starts;
  * 1016, 13334, 14350, 14351 (adjacent solutions);
  * 70, 635, 13786, 14351;
  * 4993, 8270, 10962, 14239;
  * 4854, 5080, 6215, 11295, 14125, 14351.

  It also checks, and requires at least once each: one number per clock; a
  start that waits for Z; a manual stop and resume; the start-up sequence; a
  clean double load; and a double load with one wrong bit, which must be
  flagged.
* `tb_number_sieve_full`: the full 31-line machine at default parameters. It
  loads a random 1720-bit program (about 3 million clocks) and checks the first
  twelve solutions against a reference search. It runs in a few seconds.
* `tb_sieve_examples`: the full machine at default parameters. Each problem
  is loaded as a complete program, with every line not involved allowing all
  residues. The problems and the answers checked:
  * primes by Eratosthenes over moduli 2, 3, 5: 1, 7, 11, …, 31, 37;
  * the Chinese remainder problem 1 mod 2, 2 mod 3, 3 mod 5: 23, 53;
  * x² + y² = 113 over moduli 3, 5, 7, 11: 7 and 8 come first;
  * the adjacent-solution two-line problem above.
* Unit tests cover the following:
  * `tb_delay_line`: latency.
  * `tb_beat_line`: period L and L+1, FF-F duration of one or two clocks, and
    erasure.
  * `tb_beat_counter`: Z period A·B and A·B+1.
  * `tb_input_unit`: the handshake.
  * `tb_control_unit`: start at Z, stop on S with K, consecutive solutions,
    and force.
  * `tb_sieve_array`: the ring revolves with period L and each line with its
    own modulus.
  * `tb_sieve_counters` and `tb_load_check`.

Running a test with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sieve_pkg.sv \
        tb/tb_number_sieve.sv --top-module tb_number_sieve -Mdir obj
    ./obj/Vtb_number_sieve

Assertions check that no bit is strobed while another waits, that one and
zero are not strobed together, and that no insertion happens in work mode.

## Files

* `rtl/sieve_pkg.sv`: table of moduli, ring-length and gcd functions.
* `rtl/delay_line.sv`: fixed-length serial store.
* `rtl/beat_line.sv`, `rtl/beat_counter.sv`: insertion marker.
* `rtl/input_unit.sv`: FF-A, FF-B, FF-D.
* `rtl/control_unit.sv`: FF-G, request latch, K.
* `rtl/sieve_array.sv`: the lines, their mode switching, and the coincidence gate.
* `rtl/sieve_counters.sv`: result and solution counters.
* `rtl/load_check.sv`: FF-M.
* `rtl/number_sieve.sv`: top level.
