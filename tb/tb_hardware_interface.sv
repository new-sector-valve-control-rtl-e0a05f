// tb_hardware_interface: drives random backplane and core-side values in
// both modes and compares every output with a reference written from the
// routing rules (parallel mode: DIN = {Select, data}, SPI idle; SPI mode:
// Select is chip select, parallel idle; drivers enabled only while
// selected in the active mode).
module tb_hardware_interface;
  logic       spi_en, bp_select_n, bp_spi_sclk, bp_spi_mosi;
  logic [6:0] bp_wdata;
  logic [7:0] bp_rdata, prl_din;
  logic       bp_rdata_oe, bp_back, bp_back_oe, bp_spi_miso, bp_spi_miso_oe;
  logic       spi_buf_en, prl_buf_en, prl_back, spi_cs_n, spi_sclk, spi_mosi, spi_miso;
  logic [5:0] prl_dout;
  int checks = 0, failures = 0;
  int n_spi = 0, n_prl = 0;

  hardware_interface dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s spi_en=%0b sel=%0b", what, spi_en, bp_select_n);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {spi_en, bp_select_n, bp_spi_sclk, bp_spi_mosi} = 4'($urandom);
      bp_wdata = 7'($urandom);
      prl_dout = 6'($urandom);
      {prl_back, spi_miso} = 2'($urandom);
      #1us;
      if (spi_en) begin
        n_spi++;
        check(prl_din == 8'hFF, "parallel side idle in SPI mode");
        check(spi_cs_n == bp_select_n, "CS from Select");
        check(spi_sclk == bp_spi_sclk && spi_mosi == bp_spi_mosi, "SPI lines routed");
        check(bp_rdata_oe == 0 && bp_back_oe == 0, "parallel drivers off");
        check(bp_spi_miso_oe == !bp_select_n, "MISO driver only when selected");
        check(spi_buf_en == 1 && prl_buf_en == 0, "buffer enables SPI");
      end else begin
        n_prl++;
        check(prl_din[6:0] == bp_wdata && prl_din[7] == bp_select_n, "DIN routed");
        check(spi_cs_n == 1 && spi_sclk == 0 && spi_mosi == 0, "SPI side idle");
        check(bp_rdata_oe == !bp_select_n && bp_back_oe == !bp_select_n, "parallel drivers when selected");
        check(bp_spi_miso_oe == 0, "MISO driver off");
        check(spi_buf_en == 0 && prl_buf_en == 1, "buffer enables parallel");
      end
      check(bp_rdata == {2'b00, prl_dout}, "read data");
      check(bp_back == prl_back && bp_spi_miso == spi_miso, "back/miso passthrough");
    end
    check(n_spi > 50 && n_prl > 50, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
