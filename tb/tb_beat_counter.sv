// tb_beat_counter: checks that Z recurs every LEN_A*LEN_B clocks, and every
// LEN_A*LEN_B+1 clocks when a bit is loaded at each Z, using the 15 x 16 pair
// of the two-line machine. Also checks that work mode removes the markers.
module tb_beat_counter;
  localparam int unsigned LA = 15, LB = 16;
  localparam int unsigned P = LA * LB;

  logic clk = 0, rst_n = 0;
  logic d = 0, g = 0, k = 0;
  logic z;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  beat_counter #(.LEN_A(LA), .LEN_B(LB)) dut (.clk, .rst_n, .d, .g, .k, .z);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // clocks from now until z is seen high (sampled at negedges)
  task automatic clocks_to_z(input int limit, output int n);
    n = 0;
    do begin
      @(negedge clk);
      n++;
    end while (!z && n < limit);
  endtask

  int n;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = 1; @(negedge clk); k = 0;
    clocks_to_z(2 * P, n);
    check($sformatf("first Z after %0d clocks, expected %0d", n + 1, P), z && n + 1 == P);
    repeat (3) begin
      clocks_to_z(2 * P, n);
      check($sformatf("Z period %0d, expected %0d", n, P), z && n == P);
    end
    repeat (3) begin
      @(negedge clk); d = 1;       // FF-D set on the edge after Z
      @(negedge clk); d = 0;
      clocks_to_z(2 * P, n);
      check($sformatf("Z period while loading %0d, expected %0d", n + 2, P + 1), z && n + 2 == P + 1);
    end
    // between two Z no coincidence of the lines may occur
    clocks_to_z(2 * P, n);
    check("Z period after loading", z && n == P);
    g = 1;
    clocks_to_z(2 * P, n);
    check("no Z in work mode", !z);
    g = 0;
    clocks_to_z(2 * P, n);
    check("markers erased by work mode", !z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
