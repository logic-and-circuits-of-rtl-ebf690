// load_check: error detection by loading the same program twice.
//
// On the second loading, the bit that the input unit writes into the head of
// the chain (FF-A, while FF-D is set) must equal the bit that the first loading
// put in that position, which is just then leaving the last line (`last_out`).
// Any difference sets flip-flop FF-M, which drives the error lamp until the
// operator clears it with `clear` (switch R, pressed before the second
// loading). The comparison is the exclusive-or M = L'.K + L.K' of the source
// design with L = A.D and K the last line's output; this design evaluates it
// only on insertion edges (FF-D set), since between insertions nothing is
// being written to compare against.
module load_check (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,     // switch R
  input  logic ins_en,    // FF-D
  input  logic ins_bit,   // FF-A
  input  logic last_out,  // bit leaving the last line (point K)
  output logic error      // FF-M, lamp N
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      error <= 1'b0;
    else if (clear)  error <= 1'b0;
    else if (ins_en && (ins_bit != last_out)) error <= 1'b1;

endmodule
