// input_unit: the three loading flip-flops FF-A, FF-B and FF-D.
//
// A bit arrives from outside as a one-clock strobe on `u` (a one) or `v` (a
// zero). FF-A keeps its value and FF-B records that a bit is waiting. When the
// beat counter signals Z while FF-B is set, FF-D is set on that edge; on the
// next edge the value of FF-A is written into the head of the main chain
// (`ins_en`, `ins_bit`), FF-B is cleared and FF-D is cleared again. The caller
// may present the next bit as soon as `ready` is high, or during the insertion
// clock itself.
//
// Equations of the source design: A_s = U, A_r = V, B_s = U + V,
// B_r = D.CP.B, D_s = Z.CP.B, D_r = D.CP. Here a set and a reset on the same
// edge resolve in favour of the set, and all three flip-flops clear on reset;
// both are choices of this design. The strobes are synchronous to the clock
// (the source design took them from manual switches or a tape reader).
module input_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic u,         // input bit is a one
  input  logic v,         // input bit is a zero
  input  logic z,         // beat-counter coincidence
  output logic ready,     // FF-B clear: a new bit may be presented
  output logic ins_en,    // FF-D: a bit is written into the chain on this edge
  output logic ins_bit    // FF-A: value of the bit
);

  logic a, b, d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a <= 1'b0;
      b <= 1'b0;
      d <= 1'b0;
    end else begin
      if (u)      a <= 1'b1;
      else if (v) a <= 1'b0;
      b <= u | v | (b & ~d);
      d <= ~d & z & b;
      // A new bit must not overwrite one that is still waiting for its slot.
      assert (!(u || v) || !b || d)
        else $error("input_unit: bit presented while another is waiting");
      assert (!(u && v)) else $error("input_unit: one and zero strobed together");
    end

  assign ready   = ~b;
  assign ins_en  = d;
  assign ins_bit = a;

endmodule
