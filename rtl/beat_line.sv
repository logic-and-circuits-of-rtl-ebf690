// beat_line: one line of the beat counter, a delay line that carries a single
// marker bit and is one bit time longer whenever a data bit is being loaded.
//
// The line is a delay line of LENGTH-1 bits followed by flip-flop FF-F. The
// marker leaving the delay line (`c`) sets FF-F on a clock edge. On the next
// edge FF-F is normally cleared and its bit re-enters the delay line, so the
// marker returns every LENGTH clocks. While FF-D of the input unit (`d`) is set,
// the re-entry is inhibited and FF-F stays set for one more edge; the bit then
// re-enters one clock later, so that revolution takes LENGTH+1 clocks. In work
// mode (`g` high) re-entry is blocked altogether and the marker is erased.
// A one-clock pulse on `k` (the differentiated fall of the mode flip-flop)
// sets FF-F and thus plants a fresh marker at the start of idle mode.
//
// Gate equations (CP is the clock edge):
//   delay-line input = F & ~D & ~G      FF-F set   = C | K
//   FF-F reset       = F & ~D           (set wins over reset)
// These follow the beat-counter logic of the source design (one flip-flop that
// is a one-bit delay normally and a two-bit delay during loading). Reset values
// (line empty, FF-F clear) are this design's choice.
module beat_line #(
  parameter int unsigned LENGTH = 40   // period of the marker in clocks
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // FF-D: a data bit is being loaded
  input  logic g,      // FF-G: work mode
  input  logic k,      // one-clock pulse at the start of idle mode
  output logic c       // delay-line output; the line's share of Z
);

  logic f;             // FF-F

  initial assert (LENGTH >= 2) else $error("beat_line: LENGTH must be at least 2");

  logic line_in;

  assign line_in = f & ~d & ~g;

  delay_line #(.LENGTH(LENGTH - 1)) u_line (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (line_in),
    .dout (c)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) f <= 1'b0;
    else        f <= c | k | (f & d);

endmodule
