// tb_parallel_communication: plays the MUX side of the parallel bus.
// Write accesses (Select low, then a Write low pulse) with random 6-bit
// commands must give exactly the open / close / go-remote pulses of the set
// bits, three clocks after the Write edge; writes without Select must give
// nothing. dout must equal the low six status bits computed here from the
// inputs, and back must be low three clocks after Select goes low and high
// again three clocks after it is released.
module tb_parallel_communication;
  import svcu_pkg::*;
  logic clk = 0, rst = 1;
  logic [NUM_INTLK-1:0] intlk = '1;
  logic [7:0] din = 8'hFF;
  logic swo = 0, swc = 1, vs = 0, ext = 0, remt = 1, t_pin = 1, bdr = 1;
  machine_e machine = MACH_LHC;
  logic [5:0] dout;
  logic prl_cmd, back, close_rem, open_rem;
  int checks = 0, failures = 0;
  int n_open = 0, n_close = 0, n_rem = 0;

  parallel_communication dut (.*);
  always #500ns clk = !clk;

  always @(posedge clk) begin
    n_open  += int'(open_rem);
    n_close += int'(close_rem);
    n_rem   += int'(prl_cmd);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  function automatic logic [5:0] ref_status();
    logic [NUM_INTLK-1:0] used;
    logic ok;
    used = (machine == MACH_SPS) ? 10'h0FF : (machine == MACH_CPS) ? 10'h03F : 10'h3FF;
    ok = ((intlk & used) == used) && (ext == 0);
    return {~t_pin, ~bdr, remt, ok, swc, swo};
  endfunction

  // one write access; returns the clock count from the Write edge to the pulse
  task automatic write_cmd(input logic [5:0] data, input bit selected);
    int o0, c0, r0;
    @(negedge clk) din = {!selected, 1'b1, data};
    repeat (2) @(negedge clk);
    o0 = n_open; c0 = n_close; r0 = n_rem;
    din[6] = 1'b0;                     // Write edge
    repeat (2) @(negedge clk);
    check(n_open == o0 && n_close == c0 && n_rem == r0, "no pulse before 3 clocks");
    @(negedge clk);
    check(open_rem == (selected && data[0]), "open pulse at 3 clocks");
    check(close_rem == (selected && data[1]), "close pulse at 3 clocks");
    check(prl_cmd == (selected && data[2]), "remote pulse at 3 clocks");
    repeat (3) @(negedge clk);
    check(n_open - o0 == int'(selected && data[0]), "one open pulse");
    check(n_close - c0 == int'(selected && data[1]), "one close pulse");
    check(n_rem - r0 == int'(selected && data[2]), "one remote pulse");
    din[6] = 1'b1;
    repeat (2) @(negedge clk);
    din = 8'hFF;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #20ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    repeat (4) @(negedge clk);
    check(back == 1, "back high when not selected");
    // select handshake timing
    din[7] = 0;
    repeat (2) @(negedge clk); check(back == 1, "back still high after 2 clocks");
    @(negedge clk); check(back == 0, "back low 3 clocks after Select");
    din[7] = 1;
    repeat (3) @(negedge clk); check(back == 1, "back released");
    // directed writes then random ones
    write_cmd(6'b000001, 1);
    write_cmd(6'b000010, 1);
    write_cmd(6'b000100, 1);
    write_cmd(6'b000111, 0);
    for (int i = 0; i < 60; i++) write_cmd(6'($urandom), ($urandom % 4) != 0);
    // status reads under random inputs
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      intlk = 10'($urandom | ($urandom & 32'h3FF));
      {swo, swc, vs, ext, remt, t_pin, bdr} = 7'($urandom);
      machine = machine_e'(2'($urandom));
      din[7] = 1'($urandom);
      repeat (2) @(negedge clk);
      check(dout == ref_status(), "dout equals status bits");
    end
    check(n_open > 5 && n_close > 5 && n_rem > 5, "all command pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
