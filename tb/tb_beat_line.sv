// tb_beat_line: checks the marker timing of one beat-counter line.
// After the start pulse K the marker leaves the line every LENGTH clocks and
// FF-F is high for one clock each time; when FF-D is set on the edge after the
// marker appears, that revolution takes LENGTH+1 clocks and FF-F stays high
// for two clocks; in work mode the marker is erased.
module tb_beat_line;
  localparam int unsigned L = 40;

  logic clk = 0, rst_n = 0;
  logic d = 0, g = 0, k = 0;
  logic c;
  wire f = dut.f;   // FF-F inside the line
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  beat_line dut (.clk, .rst_n, .d, .g, .k, .c);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // wait (sampling at negedges) until c is high; return the cycle count waited
  task automatic wait_marker(input int limit, output int waited);
    waited = 0;
    while (!c && waited < limit) begin
      @(negedge clk);
      waited++;
    end
  endtask

  int w;
  int fcount;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // empty line: no marker
    wait_marker(3 * L, w);
    check("empty line shows no marker", !c);
    // plant a marker
    k = 1; @(negedge clk); k = 0;
    check("K sets FF-F", f);
    wait_marker(2 * L, w);
    check($sformatf("first marker after %0d clocks, expected %0d", w + 1, L), c && (w + 1 == L));
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      check("FF-F set by marker", f);
      fcount = 0;
      while (f) begin fcount++; @(negedge clk); end
      check($sformatf("FF-F high %0d clocks, expected 1", fcount), fcount == 1);
      wait_marker(2 * L, w);
      check($sformatf("period %0d, expected %0d", w + 2, L), c && (w + 2 == L));
    end
    // loading: FF-D set on the edge after the marker
    for (int r = 0; r < 2; r++) begin
      @(negedge clk);
      d = 1;
      @(negedge clk);
      d = 0;
      check("FF-F held during loading", f);
      @(negedge clk);
      check("FF-F cleared after loading", !f);
      wait_marker(2 * L, w);
      check($sformatf("stretched period %0d, expected %0d", w + 3, L + 1), c && (w + 3 == L + 1));
    end
    // work mode erases the marker
    g = 1;
    repeat (3 * L) begin
      @(negedge clk);
    end
    g = 0;
    wait_marker(3 * L, w);
    check("marker erased in work mode", !c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
