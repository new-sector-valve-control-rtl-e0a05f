// tb_spi_slave: an SPI master (mode 0, MSB first, 16 bits) exchanges random
// words with the slave at SPI clock half-periods of 1, 2 and 4 system clocks
// (500, 250 and 125 kHz at 1 MHz). Each word the master receives must be the
// tx_data presented before the frame, and each word sent must appear on
// rx_data with one rx_valid pulse, two system clocks after chip select goes
// high. Short and long frames must give frame_err and no rx_valid.
module tb_spi_slave;
  logic clk = 0, rst = 1;
  logic sclk = 0, mosi = 0, cs_n = 1, miso;
  logic [15:0] tx_data = '0, rx_data;
  logic rx_valid, frame_err;
  int checks = 0, failures = 0, n_valid = 0, n_err = 0;

  spi_slave #(.FRAME_BITS(16)) dut (.*);
  always #500ns clk = !clk;

  always @(posedge clk) begin
    n_valid += int'(rx_valid);
    n_err   += int'(frame_err);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s t=%0t", what, $time); end
  endtask

  // master: changes on the system clock's falling edge, half = clocks per level
  task automatic xfer(input logic [15:0] w, input int half, input int nbits,
                      output logic [15:0] got);
    got = '0;
    @(negedge clk) cs_n = 0;
    mosi = w[15];
    repeat (half) @(negedge clk);
    for (int b = 0; b < nbits; b++) begin
      sclk = 1;
      got = {got[14:0], miso};
      repeat (half) @(negedge clk);
      sclk = 0;
      if (b < 15) mosi = w[14-b];
      repeat (half) @(negedge clk);
    end
    cs_n = 1;
  endtask

  initial begin
    #50ms; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] w, got;
    int v0, e0, half;
    repeat (2) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 90; i++) begin
      half = (i % 3 == 0) ? 1 : (i % 3 == 1) ? 2 : 4;
      w = 16'($urandom);
      tx_data = 16'($urandom);
      if (i == 0) begin w = 16'h8080; tx_data = 16'hEEEE; end
      @(negedge clk);
      v0 = n_valid;
      xfer(w, half, 16, got);
      check(got == tx_data, $sformatf("MISO word at half=%0d", half));
      @(negedge clk); check(!rx_valid && n_valid == v0, "no rx_valid 1 clock after CS high");
      @(negedge clk); check(rx_valid, "rx_valid 2 clocks after CS high");
      check(rx_data == w, $sformatf("MOSI word at half=%0d", half));
      repeat (2) @(negedge clk);
      check(n_valid == v0 + 1, "exactly one rx_valid pulse");
    end
    // bad frames
    for (int n = 15; n <= 17; n += 2) begin
      v0 = n_valid; e0 = n_err;
      xfer(16'hA5A5, 2, n, got);
      repeat (4) @(negedge clk);
      check(n_valid == v0 && n_err == e0 + 1, $sformatf("frame of %0d bits rejected", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
