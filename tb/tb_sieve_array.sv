// tb_sieve_array: fills the idle-mode chain of the full 31-line store with a
// random stream, checks that the chain then repeats the stream with period
// equal to its length, switches to work mode and checks that every line
// repeats its own share of the stream with period equal to its modulus and
// that the coincidence output is the AND of all lines. Expected values come
// from the chain geometry: the bit written k-th ends at chain position L-1-k.
module tb_sieve_array;
  import sieve_pkg::*;
  localparam int unsigned N = 31;
  localparam int unsigned L = chain_length(0, N);

  logic clk = 0, rst_n = 0;
  logic g = 0, ins_en = 0, ins_bit = 0;
  logic [N-1:0] line_out;
  logic last_out, all_ones;
  int checks = 0, failures = 0;
  bit stream [L];
  int start [N];         // chain position of the first bit of each line
  int coincidences = 0;
  bit exp_line [N];
  bit exp_all;

  always #5 clk = ~clk;

  sieve_array dut (.clk, .rst_n, .g, .ins_en, .ins_bit, .line_out, .last_out, .all_ones);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start[0] = 0;
    for (int i = 1; i < N; i++) start[i] = start[i-1] + int'(PRIMES[i-1]);
    for (int w = 0; w < L; w++) stream[w] = ($urandom_range(0, 15) != 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load: one bit per clock
    ins_en = 1;
    for (int w = 0; w < L; w++) begin
      ins_bit = stream[w];
      @(negedge clk);
    end
    ins_en = 0;
    // idle: the chain revolves with period L
    for (int t = 0; t < L + 50; t++) begin
      checks++;
      if (last_out != stream[t % L]) begin
        failures++;
        $display("idle clock %0d: last_out=%0b", t, last_out);
      end
      @(negedge clk);
    end
    // bring the chain back to its loaded position: it has moved L+50 places
    for (int t = 0; t < L - 50; t++) @(negedge clk);
    // work: line i shows stream[L - start[i] - m_i + (t mod m_i)]
    g = 1;
    for (int t = 0; t < 400; t++) begin
      exp_all = 1;
      for (int i = 0; i < N; i++) begin
        exp_line[i] = stream[L - start[i] - int'(PRIMES[i]) + (t % int'(PRIMES[i]))];
        exp_all &= exp_line[i];
        checks++;
        if (line_out[i] != exp_line[i]) begin
          failures++;
          if (failures < 10) $display("work clock %0d line %0d: %0b", t, i, line_out[i]);
        end
      end
      checks++;
      if (all_ones != exp_all) failures++;
      if (all_ones) coincidences++;
      @(negedge clk);
    end
    checks++;
    if (coincidences == 0) begin
      failures++;
      $display("no coincidence was exercised");
    end
    $display("coincidences seen: %0d", coincidences);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
