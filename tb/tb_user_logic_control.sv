// tb_user_logic_control: feeds received frames straight into the user
// logic. Valid frames (equal halves, bit 7 set) must give the open / close /
// go-remote pulses of their set bits one clock after rx_valid; frames with
// unequal halves, with bit 7 clear, or a frame_err pulse must give cmd_err
// and no request. tx_data must carry the status byte, computed here from
// the inputs, in both halves.
module tb_user_logic_control;
  import svcu_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] rx_data = '0, tx_data;
  logic rx_valid = 0, frame_err = 0;
  logic swo = 0, swc = 0, ext = 0, vs = 0, t_pin = 1, bdr = 1, remt = 0, err = 0;
  logic [NUM_INTLK-1:0] intlk = '1;
  machine_e machine = MACH_LHC;
  logic open_cmd, close_cmd, spi_cmd, cmd_err;
  int checks = 0, failures = 0, n_good = 0, n_bad = 0;

  user_logic_control dut (.*);
  always #500ns clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  function automatic logic [7:0] ref_status();
    logic [NUM_INTLK-1:0] used;
    logic ok;
    used = (machine == MACH_SPS) ? 10'h0FF : (machine == MACH_CPS) ? 10'h03F : 10'h3FF;
    ok = ((intlk & used) == used) && !ext;
    return {err, vs, ~t_pin, ~bdr, remt, ok, swc, swo};
  endfunction

  initial begin
    #10ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] b, b2;
    bit good, ferr;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      b = 8'($urandom);
      b2 = ($urandom % 4 == 0) ? 8'($urandom) : b;
      ferr = ($urandom % 8 == 0);
      good = !ferr && (b == b2) && b[7];
      @(negedge clk);
      rx_data = {b, b2};
      rx_valid = !ferr;
      frame_err = ferr;
      @(negedge clk);
      rx_valid = 0; frame_err = 0;
      check(open_cmd == (good && b[0]), "open request");
      check(close_cmd == (good && b[1]), "close request");
      check(spi_cmd == (good && b[2]), "remote request");
      check(cmd_err == !good, "cmd_err");
      if (good) n_good++; else n_bad++;
      @(negedge clk);
      check(!open_cmd && !close_cmd && !spi_cmd && !cmd_err, "pulses last one clock");
      // status
      intlk = 10'($urandom | ($urandom & 32'h3FF));
      {swo, swc, ext, vs, t_pin, bdr, remt, err} = 8'($urandom);
      machine = machine_e'(2'($urandom));
      @(negedge clk);
      check(tx_data == {ref_status(), ref_status()}, "status frame");
    end
    check(n_good > 20 && n_bad > 20, "good and bad frames exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
