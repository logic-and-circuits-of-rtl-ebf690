// tb_delay_line: checks that a bit entering a delay line leaves it exactly
// LENGTH clocks later, for the 21-bit line of one delay box and for the
// shortest (1-bit) line. Random input; the expected output is taken from a
// record of what was driven.
module tb_delay_line;
  localparam int unsigned LEN = 21;
  localparam int unsigned CYCLES = 400;

  logic clk = 0, rst_n = 0;
  logic din = 0;
  logic dout, dout1;
  int checks = 0, failures = 0;
  logic hist [CYCLES];

  always #5 clk = ~clk;

  delay_line dut (.clk, .rst_n, .din, .dout);
  delay_line #(.LENGTH(1)) dut1 (.clk, .rst_n, .din, .dout(dout1));

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
    for (int t = 0; t < CYCLES; t++) begin
      // output now reflects inputs applied before the previous edges
      checks++;
      if (dout != ((t >= LEN) ? hist[t-LEN] : 1'b0)) begin
        failures++;
        $display("cycle %0d: dout=%0b", t, dout);
      end
      checks++;
      if (dout1 != ((t >= 1) ? hist[t-1] : 1'b0)) begin
        failures++;
        $display("cycle %0d: dout1=%0b", t, dout1);
      end
      din = 1'($urandom_range(0, 1));
      hist[t] = din;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
