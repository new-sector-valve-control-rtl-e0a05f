// tb_remote_local_switching: reset state (local), remote request from the
// interface selected by spi_en, request from the other interface ignored,
// button press returns to local one clock after the press is sampled twice,
// press wins over a simultaneous request, holding the button does not
// repeat.
module tb_remote_local_switching;
  logic clk = 0, rst = 1, blr_n = 1, spi_en = 0, spi_cmd = 0, prl_cmd = 0;
  logic remt;
  int checks = 0, failures = 0;

  remote_local_switching dut (.*);
  always #500ns clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic pulse(input bit spi);
    @(negedge clk);
    if (spi) spi_cmd = 1; else prl_cmd = 1;
    @(negedge clk);
    spi_cmd = 0; prl_cmd = 0;
  endtask

  initial begin
    #1ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk); check(remt == 1, "local after reset");
    for (int m = 0; m < 2; m++) begin
      spi_en = m[0];
      pulse(!spi_en);                 // wrong interface
      @(negedge clk); check(remt == 1, "request of unselected interface ignored");
      pulse(spi_en);
      check(remt == 0, "remote after request (next clock)");
      // press button: blr1 samples at edge 1, press seen, remt at edge 2
      @(negedge clk) blr_n = 0;
      @(negedge clk); check(remt == 0, "not yet local after 1 edge");
      @(negedge clk); check(remt == 1, "local after 2 edges");
      // keep holding: request goes remote, holding button does not re-press
      pulse(spi_en);
      check(remt == 0, "remote while button held");
      @(negedge clk) blr_n = 1;
      repeat (3) @(negedge clk);
      // simultaneous press and request
      blr_n = 0;
      @(negedge clk);
      if (spi_en) spi_cmd = 1; else prl_cmd = 1;
      @(negedge clk); spi_cmd = 0; prl_cmd = 0;
      check(remt == 1, "press wins over simultaneous request");
      blr_n = 1;
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
