// tb_svcu_top: end-to-end test of the SVCU gateware with a short movement
// timeout and blink period. The testbench plays the MUX card (SPI master
// and parallel bus master), the valve (end switches follow the Open line
// after TRAVEL clocks, or stall on request) and the operator (front-panel
// buttons, test pin, DIP switches). It walks through both communication
// modes and counts every mechanism of the design; a mechanism that never
// happened counts as a failure.
module tb_svcu_top;
  import svcu_pkg::*;
  localparam int TMO = 60;
  localparam int TRAVEL = 12;

  logic osc_clk = 0, ext_rst_n = 0;
  logic spi_en = 1;
  logic [1:0] machine_sel = 2'd0;
  logic [6:0] bp_wdata = 7'h7F;
  logic bp_select_n = 1, bp_spi_sclk = 0, bp_spi_mosi = 0;
  logic [7:0] bp_rdata;
  logic bp_rdata_oe, bp_back, bp_back_oe, bp_spi_miso, bp_spi_miso_oe, spi_buf_en, prl_buf_en;
  logic open_btn_n = 1, close_btn_n = 1, local_btn_n = 1, test_pin_n = 1;
  logic [NUM_INTLK-1:0] intlk_led;
  logic error_led, local_led, valve_led;
  logic [NUM_INTLK-1:0] intlk = '1;
  logic ext_intlk = 0, valve_status = 0, beam_dump_req_n = 1;
  logic valve_open_sw = 0, valve_closed_sw = 1;
  logic valve_open, valve_close, beam_dump, vvs_m1, vvs_p1;

  svcu_top #(.MOVE_TIMEOUT_CYC(TMO), .BLINK_HALF_CYC(4)) dut (.*);

  always #500ns osc_clk = !osc_clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_spi500 = 0, m_spi250 = 0, m_spi125 = 0, m_spi_reject = 0;
  int m_prl_write = 0, m_prl_read = 0, m_mode_switch = 0;
  int m_remote_spi = 0, m_remote_prl = 0, m_local_btn = 0;
  int m_intlk_close = 0, m_machine_mask = 0, m_bypass = 0, m_timeout = 0;
  int m_beam_dump = 0, m_led_blink = 0;

  // valve model
  bit stall = 0;
  int travel = 0;
  always @(posedge osc_clk) begin
    if (stall) travel <= 0;
    else if ((valve_open && !valve_open_sw) || (!valve_open && !valve_closed_sw)) begin
      if (travel == TRAVEL) begin
        travel <= 0;
        valve_open_sw <= valve_open;
        valve_closed_sw <= !valve_open;
      end else begin
        travel <= travel + 1;
        valve_open_sw <= 0; valve_closed_sw <= 0;
      end
    end
  end

  logic bd_last = 1, vl_last = 0;
  always @(posedge osc_clk) begin
    if (bd_last && !beam_dump) m_beam_dump++;
    bd_last <= beam_dump;
    if (!valve_open_sw && !valve_closed_sw && valve_led != vl_last) m_led_blink++;
    vl_last <= valve_led;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(negedge osc_clk);
  endtask

  // ---- MUX model: SPI master, mode 0, 16 bits ----
  task automatic spi(input logic [7:0] cmd, input int half, output logic [7:0] st,
                     input bit corrupt = 0);
    logic [15:0] w, got;
    w = {cmd, corrupt ? cmd ^ 8'h01 : cmd};
    got = '0;
    @(negedge osc_clk) bp_select_n = 0;
    bp_spi_mosi = w[15];
    clocks(half);
    for (int b = 0; b < 16; b++) begin
      bp_spi_sclk = 1;
      got = {got[14:0], bp_spi_miso};
      if (!bp_spi_miso_oe) got[0] = 1'b1;   // undriven line reads high
      clocks(half);
      bp_spi_sclk = 0;
      if (b < 15) bp_spi_mosi = w[14-b];
      clocks(half);
    end
    bp_select_n = 1;
    clocks(4);
    check(got[15:8] == got[7:0], "status byte sent twice");
    st = got[7:0];
    if (spi_en && got[15:8] == got[7:0]) begin
      if (half == 1) m_spi500++;
      if (half == 2) m_spi250++;
      if (half == 4) m_spi125++;
    end
  endtask

  // ---- MUX model: parallel bus ----
  task automatic prl_write(input logic [5:0] data);
    @(negedge osc_clk);
    bp_wdata = {1'b1, data};
    bp_select_n = 0;
    clocks(3);
    bp_wdata[6] = 0;
    clocks(4);
    bp_wdata[6] = 1;
    clocks(1);
    check(bp_back == 0 && bp_back_oe, "Back acknowledge during write");
    bp_select_n = 1;
    bp_wdata = 7'h7F;
    clocks(4);
    m_prl_write++;
  endtask

  task automatic prl_read(output logic [5:0] st);
    @(negedge osc_clk) bp_select_n = 0;
    clocks(4);
    check(bp_back == 0 && bp_back_oe && bp_rdata_oe, "Back acknowledge and drivers on read");
    st = bp_rdata[5:0];
    bp_select_n = 1;
    clocks(4);
    check(!bp_rdata_oe, "read drivers released");
    m_prl_read++;
  endtask

  task automatic press(ref logic b);
    @(negedge osc_clk) b = 0;
    clocks(6);
    b = 1;
    clocks(4);
  endtask

  initial begin
    #100ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] st;
    logic [5:0] pst;
    int cyc;
    clocks(3); ext_rst_n = 1;
    clocks(TRAVEL + 10);   // let the valve model settle after the random power-up state

    // ===== SPI mode =====
    check(spi_buf_en && !prl_buf_en, "SPI buffers enabled");
    spi(8'h80, 1, st);
    check(st == 8'b0000_1110, $sformatf("initial status %b: local, interlocks OK, closed", st));
    check(local_led && !valve_open && beam_dump, "starts local and closed");
    spi(8'h81, 2, st); clocks(2);
    check(!valve_open, "SPI open ignored in local mode");
    spi(8'h84, 2, st); clocks(2);
    check(!local_led, "SPI go-remote"); if (!local_led) m_remote_spi++;
    spi(8'h81, 4, st); clocks(2);
    check(valve_open && !valve_close, "SPI open");
    clocks(TRAVEL + 4);
    check(!beam_dump && !vvs_m1 && !vvs_p1, "beam permit and neighbours released when open");
    spi(8'h80, 1, st);
    check(st == 8'b0000_0101, $sformatf("status open %b", st));
    // corrupted frame: rejected, error LED flashes
    spi(8'h82, 1, st, 1);
    check(valve_open, "corrupted close frame ignored");
    cyc = 0;
    while (!error_led && cyc < 8) begin clocks(1); cyc++; end
    check(error_led, "error LED flashes after rejected frame");
    if (valve_open && error_led) m_spi_reject++;
    clocks(20);
    // interlock loss
    intlk[3] = 0; clocks(4);
    check(!valve_open && beam_dump, "interlock loss closes valve");
    if (!valve_open) m_intlk_close++;
    check(intlk_led[3] == 0, "interlock LED off");
    clocks(TRAVEL + 4);
    spi(8'h80, 2, st);
    check(st[2] == 0 && st[1] == 1, "status shows interlock lost, closed");
    intlk[3] = 1; clocks(4);

    // ===== mode switch to parallel =====
    spi_en = 0; clocks(4);
    check(prl_buf_en && !spi_buf_en, "parallel buffers enabled");
    if (prl_buf_en) m_mode_switch++;
    spi(8'h82, 1, st);
    check(!bp_spi_miso_oe && st == 8'hFF, "SPI silent in parallel mode");
    prl_write(6'b000001); clocks(3);
    check(valve_open, "parallel open");
    clocks(TRAVEL + 4);
    prl_read(pst);
    check(pst == 6'b000101, $sformatf("parallel status %b: open, interlocks OK", pst));
    // local button, then parallel command ignored, local buttons work
    press(local_btn_n);
    check(local_led, "local button"); if (local_led) m_local_btn++;
    prl_write(6'b000010); clocks(3);
    check(valve_open, "parallel close ignored in local mode");
    press(close_btn_n); clocks(2);
    check(!valve_open, "Close button");
    clocks(TRAVEL + 4);
    // machine mask: interlock 9 lost
    intlk[9] = 0; clocks(4);
    press(open_btn_n); clocks(2);
    check(!valve_open, "LHC uses interlock 9");
    machine_sel = 2'd1; clocks(4);
    press(open_btn_n); clocks(2);
    check(valve_open, "SPS ignores interlock 9"); if (valve_open) m_machine_mask++;
    clocks(TRAVEL + 4);
    machine_sel = 2'd0; clocks(4);
    check(!valve_open, "back on LHC: closed");
    // bypass with test pin
    test_pin_n = 0; clocks(4);
    press(open_btn_n); clocks(2);
    check(valve_open, "open with test pin bypass"); if (valve_open) m_bypass++;
    prl_read(pst);
    check(pst[5] == 1 && pst[2] == 0, "status shows test pin, interlock lost");
    clocks(TRAVEL + 4);
    test_pin_n = 1; intlk = '1; clocks(4);
    press(close_btn_n);
    clocks(TRAVEL + 4);
    // go remote over the parallel bus
    prl_write(6'b000100); clocks(2);
    check(!local_led, "parallel go-remote"); if (!local_led) m_remote_prl++;
    // movement timeout
    stall = 1;
    prl_write(6'b000001);
    cyc = 0;
    while (!error_led && cyc < 4 * TMO) begin clocks(1); cyc++; end
    check(error_led, "timeout lights error LED");
    check(cyc >= TMO - 12 && cyc <= TMO + 4, $sformatf("timeout after %0d clocks", cyc));
    if (error_led) m_timeout++;
    clocks(20);
    stall = 0;
    // read the error bit over SPI (not visible on the parallel bus)
    spi_en = 1; clocks(4); m_mode_switch++;
    spi(8'h80, 2, st);
    check(st[7] == 1, "SPI status shows movement error");
    spi(8'h82, 2, st); clocks(3);
    check(!valve_open && !error_led, "close clears error");
    clocks(TRAVEL + 4);

    // ===== mechanism coverage =====
    check(m_spi500 > 0, "SPI at 500 kHz");
    check(m_spi250 > 0, "SPI at 250 kHz");
    check(m_spi125 > 0, "SPI at 125 kHz");
    check(m_spi_reject > 0, "rejected SPI frame");
    check(m_prl_write > 0 && m_prl_read > 0, "parallel write and read");
    check(m_mode_switch > 1, "mode switches");
    check(m_remote_spi > 0 && m_remote_prl > 0, "go-remote over both buses");
    check(m_local_btn > 0, "local button");
    check(m_intlk_close > 0, "interlock forced close");
    check(m_machine_mask > 0, "machine mask");
    check(m_bypass > 0, "test pin bypass");
    check(m_timeout > 0, "movement timeout");
    check(m_beam_dump > 0, "beam permit given");
    check(m_led_blink > 0, "valve LED blinks while moving");
    $display("mechanisms: spi500=%0d spi250=%0d spi125=%0d reject=%0d prl_w=%0d prl_r=%0d mode=%0d rem_spi=%0d rem_prl=%0d local=%0d intlk=%0d mask=%0d bypass=%0d timeout=%0d permit=%0d blink=%0d",
             m_spi500, m_spi250, m_spi125, m_spi_reject, m_prl_write, m_prl_read, m_mode_switch,
             m_remote_spi, m_remote_prl, m_local_btn, m_intlk_close, m_machine_mask, m_bypass,
             m_timeout, m_beam_dump, m_led_blink);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
