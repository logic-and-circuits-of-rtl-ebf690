// tb_sieve_counters: drives random work-mode and coincidence patterns and
// compares both counters with counts kept by the testbench; checks clear.
module tb_sieve_counters;
  logic clk = 0, rst_n = 0;
  logic clear = 0, g = 0, s = 0;
  logic [31:0] result;
  logic [15:0] solutions;
  int checks = 0, failures = 0;
  longint exp_r = 0, exp_s = 0;

  always #5 clk = ~clk;

  sieve_counters dut (.clk, .rst_n, .clear, .g, .s, .result, .solutions);

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
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (result != 32'(exp_r) || solutions != 16'(exp_s)) begin
        failures++;
        $display("cycle %0d: result %0d/%0d solutions %0d/%0d", n, result, exp_r, solutions, exp_s);
      end
      g = 1'($urandom_range(0, 3) != 0);
      s = g && ($urandom_range(0, 7) == 0);
      clear = ($urandom_range(0, 499) == 0);
      if (clear) begin exp_r = 0; exp_s = 0; end
      else begin exp_r += g; exp_s += s; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
