// hardware_interface: separates the backplane lines between the parallel
// bus logic and the SPI logic according to the communication mode.
//
// The mode comes from a DIP switch (spi_en = 1: SPI, 0: parallel). In
// parallel mode the seven write-data lines and the card's Select line form
// the parallel block's 8-bit input DIN = {Select, Write, data[5:0]}, the six
// status bits and the acknowledge (Back) go out on the read-data and
// FeedBackSelect lines, and the SPI side sees an idle bus (chip select high,
// clock low). In SPI mode the Select line becomes the SPI chip select, the
// differential clock and MOSI lines feed the SPI slave, MISO goes out, and
// the parallel block sees an idle bus (all lines high = not selected, no
// write). Output enables turn on a backplane driver only while this card is
// selected in the active mode, so that the eight cards of a crate can share
// the lines; the buffer enables switch on the line buffers of the active
// mode only.
//
// Purely combinational: it adds no latency, which the SPI timing at half
// the system clock needs. In the card's block diagram this function is drawn
// twice, once on the input side and once on the output side; here both sides
// are one module. Which line carries what, the idle levels and the enable
// rules are this design's choices.
module hardware_interface (
  input  logic       spi_en,          // 1: SPI mode, 0: parallel mode

  // backplane side, inputs
  input  logic [6:0] bp_wdata,        // write data lines b0..b6 (b6 = Write)
  input  logic       bp_select_n,     // this card's Select line, active low
  input  logic       bp_spi_sclk,     // SPI clock (from the differential receiver)
  input  logic       bp_spi_mosi,     // SPI master-out

  // backplane side, outputs
  output logic [7:0] bp_rdata,        // read data lines
  output logic       bp_rdata_oe,     // enable of the read data drivers
  output logic       bp_back,         // FeedBackSelect (Back) line
  output logic       bp_back_oe,
  output logic       bp_spi_miso,     // SPI master-in
  output logic       bp_spi_miso_oe,
  output logic       spi_buf_en,      // enable of the differential SPI buffers
  output logic       prl_buf_en,      // enable of the parallel bus buffers

  // core side
  output logic [7:0] prl_din,         // to parallel_communication DIN
  input  logic [5:0] prl_dout,        // from parallel_communication DOUT
  input  logic       prl_back,        // from parallel_communication BACK
  output logic       spi_cs_n,        // to the SPI slave
  output logic       spi_sclk,
  output logic       spi_mosi,
  input  logic       spi_miso         // from the SPI slave
);
  always_comb begin
    spi_buf_en = spi_en;
    prl_buf_en = !spi_en;

    if (spi_en) begin
      prl_din  = 8'hFF;
      spi_cs_n = bp_select_n;
      spi_sclk = bp_spi_sclk;
      spi_mosi = bp_spi_mosi;
    end else begin
      prl_din  = {bp_select_n, bp_wdata};
      spi_cs_n = 1'b1;
      spi_sclk = 1'b0;
      spi_mosi = 1'b0;
    end

    bp_rdata       = {2'b00, prl_dout};
    bp_back        = prl_back;
    bp_spi_miso    = spi_miso;
    bp_rdata_oe    = !spi_en && !bp_select_n;
    bp_back_oe     = !spi_en && !bp_select_n;
    bp_spi_miso_oe = spi_en && !bp_select_n;
  end
endmodule
