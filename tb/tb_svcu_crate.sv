// tb_svcu_crate: a crate of eight SVCU cards on one backplane, as behind
// one MUX card. All cards share the write-data, SPI clock and MOSI lines
// and the read-data, Back and MISO lines; each has its own Select line.
// The testbench resolves the shared outputs from the cards' output
// enables and counts a failure whenever two cards drive at once.
// In parallel mode the MUX model sends go-remote to every card, then opens
// every other card and reads all statuses back; then all cards are switched
// to SPI mode, every card is polled at 500 kHz, and the open ones are
// closed. Each card must act only on its own accesses.
module tb_svcu_crate;
  import svcu_pkg::*;
  localparam int N = 8;
  localparam int TRAVEL = 12;

  logic osc_clk = 0, ext_rst_n = 0;
  logic spi_en = 0;
  logic [6:0] bp_wdata = 7'h7F;
  logic [N-1:0] sel_n = '1;
  logic bp_spi_sclk = 0, bp_spi_mosi = 0;

  logic [7:0]   rdata  [N];
  logic [N-1:0] rdata_oe, back, back_oe, miso, miso_oe, v_open, swo, swc;
  logic [7:0]   bus_rdata;
  logic         bus_back, bus_miso;

  int checks = 0, failures = 0, conflicts = 0;

  always #500ns osc_clk = !osc_clk;

  for (genvar k = 0; k < N; k++) begin : g_card
    logic [NUM_INTLK-1:0] intlk_led;
    logic error_led, local_led, valve_led, valve_close, beam_dump, vvs_m1, vvs_p1;
    logic spi_buf_en, prl_buf_en;

    svcu_top #(.MOVE_TIMEOUT_CYC(1000), .BLINK_HALF_CYC(4)) u_card (
      .osc_clk, .ext_rst_n, .spi_en, .machine_sel(2'd0),
      .bp_wdata, .bp_select_n(sel_n[k]), .bp_spi_sclk, .bp_spi_mosi,
      .bp_rdata(rdata[k]), .bp_rdata_oe(rdata_oe[k]), .bp_back(back[k]),
      .bp_back_oe(back_oe[k]), .bp_spi_miso(miso[k]), .bp_spi_miso_oe(miso_oe[k]),
      .spi_buf_en, .prl_buf_en,
      .open_btn_n(1'b1), .close_btn_n(1'b1), .local_btn_n(1'b1), .test_pin_n(1'b1),
      .intlk_led, .error_led, .local_led, .valve_led,
      .intlk('1), .ext_intlk(1'b0), .valve_status(1'b0), .beam_dump_req_n(1'b1),
      .valve_open_sw(swo[k]), .valve_closed_sw(swc[k]),
      .valve_open(v_open[k]), .valve_close, .beam_dump, .vvs_m1, .vvs_p1
    );

    valve_model #(.TRAVEL(TRAVEL)) u_valve (
      .clk(osc_clk), .stall(1'b0), .valve_open(v_open[k]), .swo(swo[k]), .swc(swc[k])
    );
  end

  // shared lines: pulled high when nobody drives
  always_comb begin
    bus_rdata = 8'hFF;
    bus_back  = 1'b1;
    bus_miso  = 1'b1;
    for (int k = 0; k < N; k++) begin
      if (rdata_oe[k]) bus_rdata = rdata[k];
      if (back_oe[k])  bus_back  = back[k];
      if (miso_oe[k])  bus_miso  = miso[k];
    end
  end

  always @(posedge osc_clk) begin
    if ($countones(rdata_oe) > 1 || $countones(back_oe) > 1 || $countones(miso_oe) > 1)
      conflicts++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  task automatic clocks(input int n);
    repeat (n) @(negedge osc_clk);
  endtask

  task automatic prl_write(input int k, input logic [5:0] data);
    @(negedge osc_clk);
    bp_wdata = {1'b1, data};
    sel_n[k] = 0;
    clocks(3);
    bp_wdata[6] = 0;
    clocks(4);
    check(bus_back == 0, $sformatf("card %0d acknowledges write", k));
    bp_wdata[6] = 1;
    clocks(1);
    sel_n[k] = 1;
    bp_wdata = 7'h7F;
    clocks(4);
  endtask

  task automatic prl_read(input int k, output logic [5:0] st);
    @(negedge osc_clk) sel_n[k] = 0;
    clocks(4);
    check(bus_back == 0, $sformatf("card %0d acknowledges read", k));
    st = bus_rdata[5:0];
    sel_n[k] = 1;
    clocks(4);
  endtask

  task automatic spi(input int k, input logic [7:0] cmd, output logic [7:0] st);
    logic [15:0] w, got;
    w = {cmd, cmd};
    got = '0;
    @(negedge osc_clk) sel_n[k] = 0;
    bp_spi_mosi = w[15];
    clocks(1);
    for (int b = 0; b < 16; b++) begin
      bp_spi_sclk = 1;
      got = {got[14:0], bus_miso};
      clocks(1);
      bp_spi_sclk = 0;
      if (b < 15) bp_spi_mosi = w[14-b];
      clocks(1);
    end
    sel_n[k] = 1;
    clocks(4);
    check(got[15:8] == got[7:0], $sformatf("card %0d status sent twice", k));
    st = got[7:0];
  endtask

  initial begin
    #100ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [5:0] pst;
    logic [7:0] st;
    clocks(3); ext_rst_n = 1;
    clocks(TRAVEL + 10);
    // parallel mode
    for (int k = 0; k < N; k++) prl_write(k, 6'b000100);
    for (int k = 0; k < N; k += 2) prl_write(k, 6'b000001);
    clocks(TRAVEL + 6);
    for (int k = 0; k < N; k++) begin
      prl_read(k, pst);
      check(pst == ((k % 2 == 0) ? 6'b000101 : 6'b000110),
            $sformatf("card %0d parallel status %b", k, pst));
      check(v_open[k] == (k % 2 == 0), $sformatf("card %0d valve", k));
    end
    // all cards to SPI mode
    spi_en = 1;
    clocks(4);
    for (int k = 0; k < N; k++) begin
      spi(k, 8'h80, st);
      check(st == ((k % 2 == 0) ? 8'b0000_0101 : 8'b0000_0110),
            $sformatf("card %0d SPI status %b", k, st));
    end
    for (int k = 0; k < N; k += 2) spi(k, 8'h82, st);
    clocks(TRAVEL + 6);
    check(v_open == '0, "all valves closed over SPI");
    for (int k = 0; k < N; k++) begin
      spi(k, 8'h80, st);
      check(st == 8'b0000_0110, $sformatf("card %0d closed", k));
    end
    check(conflicts == 0, $sformatf("no bus conflicts (%0d)", conflicts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
