// tb_load_check: FF-M must stay clear while every inserted bit equals the bit
// leaving the last line, ignore the last line between insertions, set on the
// first mismatch and hold until cleared.
module tb_load_check;
  logic clk = 0, rst_n = 0;
  logic clear = 0, ins_en = 0, ins_bit = 0, last_out = 0;
  logic error;
  int checks = 0, failures = 0;
  bit exp_err = 0;

  always #5 clk = ~clk;

  load_check dut (.clk, .rst_n, .clear, .ins_en, .ins_bit, .last_out, .error);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      checks++;
      if (error != exp_err) begin
        failures++;
        $display("cycle %0d: error=%0b expected %0b", n, error, exp_err);
      end
      ins_en   = ($urandom_range(0, 3) == 0);
      last_out = 1'($urandom_range(0, 1));
      // mostly matching insertions, an occasional wrong bit
      ins_bit  = ($urandom_range(0, 99) == 0) ? ~last_out : last_out;
      clear    = ($urandom_range(0, 49) == 0);
      if (clear) exp_err = 0;
      else if (ins_en && ins_bit != last_out) exp_err = 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
