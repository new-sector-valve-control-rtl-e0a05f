// tb_valve_actuation: valve actuation with a simple valve model (end
// switches follow the Open line after TRAVEL clocks unless stalled) and a
// short movement timeout. Checks remote and local commands, mode gating,
// close priority, forced close on loss of permission (interlocks per
// machine, temperature, valve disconnected), the test-pin bypass in local
// mode, the beam-dump and neighbour interlock outputs and the timeout error
// with its exact cycle count.
module tb_valve_actuation;
  import svcu_pkg::*;
  localparam int TMO = 40;
  localparam int TRAVEL = 10;
  logic clk = 0, rst = 1;
  logic remt = 0, open_rem = 0, close_rem = 0, open_btn_n = 1, close_btn_n = 1;
  logic [NUM_INTLK-1:0] intlk = '1;
  machine_e machine = MACH_LHC;
  logic ext = 0, vs = 0, t_pin = 1, swo = 0, swc = 1;
  logic valve_open, valve_close, beam_dump, vvs_intlk, err, open_enable, bypass;
  int checks = 0, failures = 0;
  bit stall = 0;
  int travel_cnt = 0;

  valve_actuation #(.MOVE_TIMEOUT_CYC(TMO)) dut (.*);
  always #500ns clk = !clk;

  // valve model
  always @(posedge clk) begin
    if (stall) travel_cnt <= 0;
    else if ((valve_open && !swo) || (!valve_open && !swc)) begin
      if (travel_cnt == TRAVEL) begin
        travel_cnt <= 0;
        swo <= valve_open;
        swc <= !valve_open;
      end else begin
        travel_cnt <= travel_cnt + 1;
        swo <= 0; swc <= 0;          // in between
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic rem(input bit op);
    @(negedge clk);
    if (op) open_rem = 1; else close_rem = 1;
    @(negedge clk);
    open_rem = 0; close_rem = 0;
  endtask

  task automatic btn(input bit op);
    @(negedge clk);
    if (op) open_btn_n = 0; else close_btn_n = 0;
    @(negedge clk);
    repeat (3) @(negedge clk);
    open_btn_n = 1; close_btn_n = 1;
    @(negedge clk);
  endtask

  task automatic settle();
    repeat (TRAVEL + 4) @(negedge clk);
  endtask

  initial begin
    #10ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk);
    check(!valve_open && valve_close && beam_dump && vvs_intlk, "closed after reset");
    // remote open
    rem(1);
    check(valve_open && !valve_close, "remote open next clock");
    check(beam_dump, "beam dump until open confirmed");
    settle();
    check(swo && !beam_dump && !vvs_intlk, "open confirmed: no beam dump, no neighbour interlock");
    // interlock loss on LHC closes
    intlk[9] = 0;
    @(negedge clk); check(!valve_open && !open_enable, "interlock 9 loss closes on LHC");
    rem(1); check(!valve_open, "cannot open without permission");
    // SPS ignores interlock 9
    machine = MACH_SPS;
    @(negedge clk); check(open_enable, "SPS ignores interlock 9");
    rem(1); check(valve_open, "open on SPS");
    settle();
    intlk[7] = 0;
    @(negedge clk); check(!valve_open, "interlock 7 loss closes on SPS");
    machine = MACH_CPS;
    @(negedge clk); check(open_enable, "CPS ignores interlock 7");
    intlk[5] = 0;
    @(negedge clk); check(!open_enable, "CPS uses interlock 5");
    intlk = '1; machine = MACH_LHC;
    settle();
    // temperature and disconnection
    rem(1); settle(); check(valve_open && swo, "reopened");
    ext = 1; @(negedge clk); check(!valve_open, "temperature interlock closes");
    ext = 0; rem(1); check(valve_open, "reopen");
    vs = 1; @(negedge clk); check(!valve_open, "disconnected valve closes");
    vs = 0; settle();
    // close priority
    @(negedge clk); open_rem = 1; close_rem = 1;
    @(negedge clk); open_rem = 0; close_rem = 0;
    check(!valve_open, "close wins");
    // local mode: remote commands ignored, buttons work
    remt = 1;
    rem(1); check(!valve_open, "remote open ignored in local mode");
    btn(1); check(valve_open, "local open button");
    settle();
    btn(0); check(!valve_open, "local close button");
    settle();
    remt = 0;
    btn(1); check(!valve_open, "button ignored in remote mode");
    // bypass with test pin in local mode
    intlk[0] = 0;
    remt = 1; t_pin = 0;
    @(negedge clk); check(bypass, "bypass active");
    btn(1); check(valve_open, "open with bypass despite interlock");
    settle();
    remt = 0;
    @(negedge clk); check(!valve_open && !bypass, "bypass ends in remote mode");
    t_pin = 1; intlk = '1;
    settle();
    // movement timeout
    stall = 1;
    rem(1);
    cyc = 0;
    while (!err && cyc < 3 * TMO) begin @(negedge clk); cyc++; end
    check(err, "timeout error raised");
    check(cyc >= TMO - 1 && cyc <= TMO + 2, $sformatf("timeout after %0d clocks, expected about %0d", cyc, TMO));
    stall = 0;
    settle();
    check(err, "error sticky after valve arrives");
    rem(0);
    check(!err, "next command clears error");
    settle();
    check(!err && swc, "closed without error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
