// tb_svcu_full: the SVCU gateware at its default parameters (1 MHz clock,
// 10 s movement timeout, 2 Hz blink). The MUX card model talks SPI at
// 500 kHz: it takes the card to remote control, opens the valve, reads back
// the status, closes it again, and finally lets a stalled valve run into
// the 10 s movement timeout, checking that the error shows after 10 s and
// not before.
module tb_svcu_full;
  import svcu_pkg::*;
  localparam int TRAVEL = 2000;   // 2 ms valve travel in the model

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

  svcu_top dut (.*);

  always #500ns osc_clk = !osc_clk;

  int checks = 0, failures = 0;
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

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(negedge osc_clk);
  endtask

  task automatic spi(input logic [7:0] cmd, output logic [7:0] st);
    logic [15:0] w, got;
    w = {cmd, cmd};
    got = '0;
    @(negedge osc_clk) bp_select_n = 0;
    bp_spi_mosi = w[15];
    clocks(1);
    for (int b = 0; b < 16; b++) begin
      bp_spi_sclk = 1;
      got = {got[14:0], bp_spi_miso};
      clocks(1);
      bp_spi_sclk = 0;
      if (b < 15) bp_spi_mosi = w[14-b];
      clocks(1);
    end
    bp_select_n = 1;
    clocks(4);
    check(got[15:8] == got[7:0], "status byte sent twice");
    st = got[7:0];
  endtask

  initial begin
    #15s; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] st;
    clocks(3); ext_rst_n = 1;
    clocks(TRAVEL + 10);   // let the valve model settle after the random power-up state
    spi(8'h80, st);
    check(st == 8'b0000_1110, "initial status: local, interlocks OK, closed");
    spi(8'h84, st); clocks(2);
    check(!local_led, "remote control");
    spi(8'h81, st); clocks(2);
    check(valve_open && beam_dump, "opening");
    clocks(TRAVEL / 2);
    spi(8'h80, st);
    check(st[1:0] == 2'b00, "status while travelling");
    clocks(TRAVEL);
    spi(8'h80, st);
    check(st == 8'b0000_0101, "status open");
    check(!beam_dump && valve_led, "open confirmed");
    spi(8'h82, st); clocks(2);
    check(!valve_open && valve_close, "closing");
    clocks(TRAVEL + 10);
    spi(8'h80, st);
    check(st == 8'b0000_0110, "status closed");
    // stalled valve: error after 10 s, not at 9.9 s
    stall = 1;
    spi(8'h81, st);
    clocks(9_900_000);
    check(!error_led, "no error before 10 s");
    clocks(200_000);
    check(error_led, "error after 10 s");
    spi(8'h80, st);
    check(st[7], "status reports the error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
