// tb_input_unit: checks the loading handshake of FF-A, FF-B and FF-D.
// A bit strobed in makes `ready` fall; it waits through clocks without Z; the
// clock after a Z it is presented on ins_bit with ins_en high for exactly one
// clock, after which `ready` is high again. A Z with no bit waiting does
// nothing. A new bit may be strobed during the insertion clock.
module tb_input_unit;
  logic clk = 0, rst_n = 0;
  logic u = 0, v = 0, z = 0;
  logic ready, ins_en, ins_bit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_unit dut (.clk, .rst_n, .u, .v, .z, .ready, .ins_en, .ins_bit);

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

  bit val;
  int wait_clocks;

  initial begin
    repeat (2) tick();
    rst_n = 1;
    check("ready after reset", ready && !ins_en);
    // Z without a waiting bit: nothing happens
    z = 1; tick(); z = 0;
    check("no insertion without a bit", !ins_en && ready);
    for (int n = 0; n < 40; n++) begin
      val = 1'($urandom_range(0, 1));
      wait_clocks = $urandom_range(0, 5);
      if (val) u = 1; else v = 1;
      tick();
      u = 0; v = 0;
      check("bit waiting", !ready && !ins_en);
      repeat (wait_clocks) begin
        tick();
        check("still waiting without Z", !ready && !ins_en);
      end
      z = 1; tick(); z = 0;
      check("insertion clock after Z", ins_en && ins_bit == val);
      if (n % 3 == 2) begin
        // next bit strobed during the insertion clock
        val = ~val;
        if (val) u = 1; else v = 1;
        tick();
        u = 0; v = 0;
        check("new bit accepted during insertion", !ready && !ins_en);
        z = 1; tick(); z = 0;
        check("second insertion", ins_en && ins_bit == val);
      end
      tick();
      check("ready after insertion", ready && !ins_en);
      // a Z right after insertion must not insert again
      z = 1; tick(); z = 0;
      check("single insertion per bit", !ins_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
