// beat_counter: two beat lines of coprime lengths LEN_A and LEN_B whose
// coincidence Z recurs every LEN_A*LEN_B clocks, the length of the main chain.
//
// Each line carries one marker. Z = C_A & C_B is high for one clock whenever
// both markers leave their delay lines together; Z marks the clock edge at which
// the input unit may schedule the next bit. Because both lines stretch by one
// clock while a bit is loaded (`d`), the next Z comes LEN_A*LEN_B+1 clocks
// later, so successive bits land in successive positions of the main chain.
// Using two short lines instead of one line as long as the chain is the source
// design's economy measure. The source design pairs 15 and 16 bits for a
// 240-bit chain; the defaults here, 40 and 43, match the 1720-bit chain of the
// 31-line machine (see the README for the 33 x 61 figure it quotes).
module beat_counter #(
  parameter int unsigned LEN_A = 40,
  parameter int unsigned LEN_B = 43
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,      // FF-D: a bit is being loaded
  input  logic g,      // FF-G: work mode (erases the markers)
  input  logic k,      // plants a marker in each line
  output logic z       // coincidence of the two markers
);

  initial assert (sieve_pkg::gcd(LEN_A, LEN_B) == 1)
    else $error("beat_counter: LEN_A and LEN_B must be coprime");

  logic c_a, c_b;
  beat_line #(.LENGTH(LEN_A)) u_line_a (
    .clk(clk), .rst_n(rst_n), .d(d), .g(g), .k(k), .c(c_a)
  );

  beat_line #(.LENGTH(LEN_B)) u_line_b (
    .clk(clk), .rst_n(rst_n), .d(d), .g(g), .k(k), .c(c_b)
  );

  assign z = c_a & c_b;

endmodule
