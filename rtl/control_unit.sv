// control_unit: the mode flip-flop FF-G and its start and stop logic.
//
// FF-G high is work mode (lines recirculate on themselves and the result
// counter counts), low is idle mode (lines form one serial chain for loading).
// A request to work (`work_req`, the operator's work switch) is held in
// flip-flop E until the next beat-counter coincidence Z, and FF-G is set on
// that edge. Starting only at Z means the chain has made a whole number of
// revolutions since work last stopped, so every line resumes exactly where it
// stopped. In work mode the coincidence of all line outputs, S, clears FF-G on
// the same edge at which that number is counted. When FF-G falls, for any
// reason, output `k` pulses for that edge; it plants the single marker bit in
// the beat counter (the source design used a differentiator on G-bar).
// If the number right after a solution is also a solution, the next start
// stops again after exactly one counted clock, so no solution is skipped.
//
// `idle_req` is the manual work-to-idle switch. `force_work` sets FF-G
// directly, without waiting for Z; it is the extra start-up switch the source
// design proposes, and reset does the same (FF-G set at power-on), so that the
// first switch to idle plants a marker in the empty beat counter.
// Choices of this design: the request latch E, and that a start waits while a
// data bit is pending (`bit_waiting`) so a load is never cut short.
module control_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic work_req,     // one-clock strobe: go to work mode at next Z
  input  logic idle_req,     // one-clock strobe: go to idle mode now
  input  logic force_work,   // one-clock strobe: go to work mode now
  input  logic z,            // beat-counter coincidence
  input  logic all_ones,     // coincidence of all line outputs
  input  logic bit_waiting,  // FF-B of the input unit
  output logic g,            // FF-G: work mode
  output logic s,            // solution found on this edge
  output logic k,            // FF-G falls on this edge
  output logic start_pending // flip-flop E
);

  logic e;
  logic g_next;
  logic start_at_z;

  assign s          = g & all_ones;
  assign start_at_z = ~g & e & z & ~bit_waiting;

  always_comb begin
    if (g) g_next = ~(s | idle_req);
    else   g_next = start_at_z | force_work;
  end

  assign k = g & ~g_next;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      g <= 1'b1;
      e <= 1'b0;
    end else begin
      g <= g_next;
      e <= (e | work_req) & ~g & ~g_next;
    end

  assign start_pending = e;

endmodule
