// sieve_array: the main store, one recirculating delay line per modulus.
//
// Line i is a delay line of length PRIMES[FIRST+i]. In work mode (`g` high)
// every line feeds its own output back to its input, so line i shows the
// pattern it holds with period equal to its modulus, and `all_ones` is the
// coincidence of all line outputs. In idle mode the lines are chained in
// series, line i feeding line i+1 and the last line feeding the first, making
// one register of chain_length() bits. The head of that chain is where loading
// happens: on an insertion edge (`ins_en`) the first line takes `ins_bit`
// instead of the bit leaving the last line.
//
// The three-way input of the first line (own output in work mode, bit leaving
// the last line in idle mode, new bit while inserting) follows the source
// design; insertion is never requested in work mode, which an assertion checks.
module sieve_array #(
  parameter int unsigned FIRST  = 0,    // index of the first modulus in PRIMES
  parameter int unsigned NLINES = 31    // number of lines
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              g,          // work mode
  input  logic              ins_en,     // write ins_bit into the head of the chain
  input  logic              ins_bit,
  output logic [NLINES-1:0] line_out,   // output of every line
  output logic              last_out,   // output of the last line
  output logic              all_ones    // coincidence of all lines
);

  initial assert (NLINES >= 1 && FIRST + NLINES <= sieve_pkg::NUM_PRIMES)
    else $error("sieve_array: lines outside the table of moduli");

  logic [NLINES-1:0] line_in;

  always_comb begin
    for (int i = 0; i < NLINES; i++) begin
      if (g)           line_in[i] = line_out[i];
      else if (i == 0) line_in[i] = ins_en ? ins_bit : line_out[NLINES-1];
      else             line_in[i] = line_out[i-1];
    end
  end

  for (genvar i = 0; i < NLINES; i++) begin : g_line
    delay_line #(.LENGTH(sieve_pkg::PRIMES[FIRST + i])) u_line (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (line_in[i]),
      .dout (line_out[i])
    );
  end

  assign last_out = line_out[NLINES-1];
  assign all_ones = &line_out;

  assert property (@(posedge clk) disable iff (!rst_n) !(g && ins_en))
    else $error("sieve_array: insertion requested in work mode");

endmodule
