// tb_status_led: with a 4-clock blink half-period, checks the interlock and
// local LEDs (copy of their inputs one clock later), the valve LED (on when
// open, off when closed, blinking with period 8 clocks in between), the
// error LED (steady on error, blinking while disconnected) and the
// stretched flash after a communication error.
module tb_status_led;
  import svcu_pkg::*;
  localparam int HALF = 4;
  logic clk = 0, rst = 1;
  logic [NUM_INTLK-1:0] intlk = '0, intlk_led;
  logic remt = 0, swo = 0, swc = 1, vs = 0, err = 0, comm_err = 0;
  logic local_led, valve_led, error_led;
  int checks = 0, failures = 0;

  status_led #(.BLINK_HALF_CYC(HALF)) dut (.*);
  always #500ns clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  // count toggles of an LED over n clocks
  task automatic toggles(input int n, input bit which_valve, output int t);
    logic last;
    t = 0;
    last = which_valve ? valve_led : error_led;
    repeat (n) begin
      @(negedge clk);
      if ((which_valve ? valve_led : error_led) != last) t++;
      last = which_valve ? valve_led : error_led;
    end
  endtask

  initial begin
    #2ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 20; i++) begin
      intlk = 10'($urandom); remt = 1'($urandom);
      @(negedge clk);
      check(intlk_led == intlk && local_led == remt, "interlock/local LEDs");
    end
    swo = 0; swc = 1; @(negedge clk); @(negedge clk); check(!valve_led, "valve LED off when closed");
    swo = 1; swc = 0; @(negedge clk); @(negedge clk); check(valve_led, "valve LED on when open");
    swo = 0; swc = 0;
    toggles(8 * HALF, 1, t);
    check(t >= 7 && t <= 8, $sformatf("valve LED blinks while moving (%0d toggles)", t));
    swc = 1;
    toggles(8 * HALF, 1, t);
    check(t <= 1 && !valve_led, "valve LED steady when closed");
    check(!error_led, "error LED off");
    err = 1; @(negedge clk); @(negedge clk); check(error_led, "error LED on error");
    err = 0; vs = 1;
    @(negedge clk); @(negedge clk);
    toggles(8 * HALF, 0, t);
    check(t >= 7 && t <= 8, $sformatf("error LED blinks when disconnected (%0d toggles)", t));
    vs = 0;
    repeat (3) @(negedge clk);
    check(!error_led, "error LED off again");
    comm_err = 1; @(negedge clk); comm_err = 0;
    @(negedge clk); check(error_led, "flash after comm error");
    repeat (3 * HALF) @(negedge clk);
    check(!error_led, "flash ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
