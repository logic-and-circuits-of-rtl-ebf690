// tb_control_unit: checks the mode flip-flop. Reset enters work mode; an idle
// request stops it at once with a K pulse; a work request waits for Z and for
// the input buffer to be empty; a coincidence stops work on the same edge with
// S and K; force_work starts at once.
module tb_control_unit;
  logic clk = 0, rst_n = 0;
  logic work_req = 0, idle_req = 0, force_work = 0, z = 0, all_ones = 0, bit_waiting = 0;
  logic g, s, k, start_pending;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .work_req, .idle_req, .force_work, .z, .all_ones,
                    .bit_waiting, .g, .s, .k, .start_pending);

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
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic tick();
    @(negedge clk);
  endtask

  initial begin
    repeat (2) tick();
    check("reset puts FF-G in work mode", g);
    rst_n = 1;
    tick();
    check("stays in work", g && !k && !s);
    idle_req = 1;
    #1;
    check("K pulses as work ends", k);
    tick(); idle_req = 0;
    check("idle after idle request", !g && !k);
    // Z without a request does not start
    z = 1; tick(); z = 0;
    check("no start without request", !g);
    for (int n = 0; n < 10; n++) begin
      work_req = 1; tick(); work_req = 0;
      check("request held", start_pending && !g);
      repeat ($urandom_range(0, 4)) begin
        all_ones = 1'($urandom_range(0, 1));
        tick();
        check("no start before Z", !g && start_pending && !s);
      end
      all_ones = 0;
      // a waiting data bit defers the start
      bit_waiting = 1; z = 1; tick(); z = 0; bit_waiting = 0;
      check("no start while a bit waits", !g && start_pending);
      z = 1; tick(); z = 0;
      check("start at Z", g && !start_pending && !k);
      repeat ($urandom_range(0, 6)) begin
        tick();
        check("working", g && !s);
      end
      all_ones = 1;
      #1;
      check("S and K with coincidence", s && k);
      tick();
      all_ones = 0;
      check("idle after coincidence", !g && !s);
      if (n % 2 == 1) begin
        // consecutive solution: restart stops after one clock
        work_req = 1; tick(); work_req = 0;
        z = 1; all_ones = 1; tick(); z = 0;
        check("restart", g && s);
        tick();
        all_ones = 0;
        check("stopped again after one clock", !g);
      end
    end
    force_work = 1; tick(); force_work = 0;
    check("force_work starts at once", g);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
