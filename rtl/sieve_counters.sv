// sieve_counters: the two binary counters of the sieve.
//
// The result counter advances on every clock edge of work mode. Work mode
// starts with the lines at number 0 and each work clock moves every line on by
// one number, so when a coincidence stops the machine the counter holds the
// solution itself; restarting without clearing continues from there. The
// solution counter advances once per coincidence and so counts the solutions
// found, from which their density follows. Both clear on `clear` (the operator's
// counter reset) and on reset. Counter widths are this design's choice; the
// result counter wraps modulo 2**RESULT_W.
module sieve_counters #(
  parameter int unsigned RESULT_W   = 32,
  parameter int unsigned SOLUTION_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  g,         // work mode
  input  logic                  s,         // coincidence on this edge
  output logic [RESULT_W-1:0]   result,
  output logic [SOLUTION_W-1:0] solutions
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      result    <= '0;
      solutions <= '0;
    end else if (clear) begin
      result    <= '0;
      solutions <= '0;
    end else begin
      if (g) result    <= result + 1'b1;
      if (s) solutions <= solutions + 1'b1;
    end

endmodule
