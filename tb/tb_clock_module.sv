// tb_clock_module: checks that the system clock follows the oscillator,
// that reset asserts immediately (without a clock edge) when the board
// reset goes low, and that it is released exactly RST_STAGES rising clock
// edges after the board reset goes high.
module tb_clock_module;
  logic osc_clk = 1'b0, ext_rst_n = 1'b0;
  logic clk, rst;
  int   checks = 0, failures = 0;

  clock_module dut (.osc_clk, .ext_rst_n, .clk, .rst);

  always #500ns osc_clk = !osc_clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge osc_clk);
    #1ns check(rst == 1'b1, "reset held while ext_rst_n low");
    for (int trial = 0; trial < 5; trial++) begin
      // release between clock edges
      @(negedge osc_clk) ext_rst_n = 1'b1;
      @(posedge osc_clk); #1ns check(rst == 1'b1, "still in reset after 1 edge");
      @(posedge osc_clk); #1ns check(rst == 1'b0, "released after 2 edges");
      repeat (3) @(posedge osc_clk);
      #1ns check(rst == 1'b0, "stays released");
      check(clk == osc_clk, "clk follows osc_clk (high)");
      @(negedge osc_clk); #1ns check(clk == osc_clk, "clk follows osc_clk (low)");
      // asynchronous assertion in the middle of the low phase
      #200ns ext_rst_n = 1'b0;
      #1ns check(rst == 1'b1, "asynchronous assertion");
      repeat (2) @(posedge osc_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
