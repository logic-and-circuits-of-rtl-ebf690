// delay_line: a fixed-length serial store, the digital equivalent of a chain of
// LC delay boxes with a pulse regenerating amplifier after each box.
//
// A bit presented on `din` before a rising edge of `clk` (the clock pulse CP)
// appears on `dout` exactly LENGTH clock edges later. A line whose output is
// fed back to its input therefore holds a pattern of LENGTH bits that rotates
// with period LENGTH, which is how every register of the sieve stores its data.
// The analogue boxes stored 21 bits each at about 1 MHz and needed one
// regenerating amplifier per box; here each bit time is one flip-flop stage.
// Reset (active low, asynchronous) clears the line; the original lines had no
// reset, and the clear is this design's choice so that simulation starts from a
// known state.
module delay_line #(
  parameter int unsigned LENGTH = 21   // bits held; 21 is one delay box
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  initial assert (LENGTH >= 1) else $error("delay_line: LENGTH must be at least 1");

  logic [LENGTH-1:0] stage;

  if (LENGTH == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) stage <= '0;
      else        stage <= din;
  end else begin : g_many
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) stage <= '0;
      else        stage <= {stage[LENGTH-2:0], din};
  end

  assign dout = stage[LENGTH-1];

endmodule
