// spi_communication: the SPI communication unit of the card, made of the
// SPI slave (bit level, 16-bit frames, up to half the system clock) and the
// user logic control (frame contents: command byte in, status byte out).
// See spi_slave and user_logic_control for the protocol and its timing.
// A request reaches open_cmd / close_cmd / spi_cmd two clocks after chip
// select is seen high at the end of the frame (three to four clocks after
// the pin changes). The grouping of the two parts follows the card's
// gateware structure.
module spi_communication
  import svcu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sclk,
  input  logic                 mosi,
  input  logic                 cs_n,
  output logic                 miso,
  input  logic                 swo,
  input  logic                 swc,
  input  logic [NUM_INTLK-1:0] intlk,
  input  machine_e             machine,
  input  logic                 ext,
  input  logic                 vs,
  input  logic                 t_pin,
  input  logic                 bdr,
  input  logic                 remt,
  input  logic                 err,
  output logic                 open_cmd,
  output logic                 close_cmd,
  output logic                 spi_cmd,
  output logic                 cmd_err
);
  logic [SPI_FRAME_BITS-1:0] tx_data, rx_data;
  logic                      rx_valid, frame_err;

  spi_slave #(.FRAME_BITS(SPI_FRAME_BITS)) u_slave (
    .clk, .rst, .sclk, .mosi, .cs_n, .miso,
    .tx_data, .rx_data, .rx_valid, .frame_err
  );

  user_logic_control u_ulc (
    .clk, .rst, .rx_data, .rx_valid, .frame_err, .tx_data,
    .swo, .swc, .intlk, .machine, .ext, .vs, .t_pin, .bdr, .remt, .err,
    .open_cmd, .close_cmd, .spi_cmd, .cmd_err
  );
endmodule
