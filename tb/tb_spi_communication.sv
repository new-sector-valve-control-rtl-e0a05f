// tb_spi_communication: end-to-end SPI unit test. A mode-0 master sends
// 16-bit frames at 500, 250 and 125 kHz; command frames must produce the
// requests (two clocks after chip select is seen high, i.e. on the third
// system clock edge after the pin rises), bad frames must produce cmd_err,
// and every frame must return the status byte twice.
module tb_spi_communication;
  import svcu_pkg::*;
  logic clk = 0, rst = 1;
  logic sclk = 0, mosi = 0, cs_n = 1, miso;
  logic swo = 0, swc = 1, ext = 0, vs = 0, t_pin = 1, bdr = 1, remt = 0, err = 0;
  logic [NUM_INTLK-1:0] intlk = '1;
  machine_e machine = MACH_LHC;
  logic open_cmd, close_cmd, spi_cmd, cmd_err;
  int checks = 0, failures = 0;
  int n_open = 0, n_close = 0, n_rem = 0, n_err = 0;

  spi_communication dut (.*);
  always #500ns clk = !clk;

  always @(posedge clk) begin
    n_open += int'(open_cmd); n_close += int'(close_cmd);
    n_rem += int'(spi_cmd); n_err += int'(cmd_err);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic xfer(input logic [15:0] w, input int half, output logic [15:0] got);
    got = '0;
    @(negedge clk) cs_n = 0;
    mosi = w[15];
    repeat (half) @(negedge clk);
    for (int b = 0; b < 16; b++) begin
      sclk = 1;
      got = {got[14:0], miso};
      repeat (half) @(negedge clk);
      sclk = 0;
      if (b < 15) mosi = w[14-b];
      repeat (half) @(negedge clk);
    end
    cs_n = 1;
  endtask

  function automatic logic [7:0] ref_status();
    return {err, vs, ~t_pin, ~bdr, remt, ((intlk == '1) && !ext), swc, swo};
  endfunction

  initial begin
    #50ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] got;
    logic [7:0] b;
    int o0, c0, r0, e0, half;
    bit bad;
    repeat (2) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      half = 1 << (i % 3);
      b = {1'b1, 4'($urandom), 3'($urandom)};
      bad = (i % 5 == 4);
      {swo, swc, remt, t_pin} = 4'($urandom);
      intlk = ($urandom % 3 == 0) ? 10'h1FF : 10'h3FF;
      repeat (3) @(negedge clk);
      o0 = n_open; c0 = n_close; r0 = n_rem; e0 = n_err;
      xfer(bad ? {b, b ^ 8'h10} : {b, b}, half, got);
      check(got == {ref_status(), ref_status()}, $sformatf("status frame half=%0d", half));
      @(negedge clk); @(negedge clk);
      check(!open_cmd && !close_cmd && !spi_cmd && !cmd_err, "no request before 3 edges");
      @(negedge clk);
      check(open_cmd == (!bad && b[0]), "open at 3 edges");
      check(close_cmd == (!bad && b[1]), "close at 3 edges");
      check(spi_cmd == (!bad && b[2]), "remote at 3 edges");
      check(cmd_err == bad, "cmd_err on bad frame");
      repeat (2) @(negedge clk);
      check(n_open - o0 == int'(!bad && b[0]) && n_err - e0 == int'(bad), "single pulses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
