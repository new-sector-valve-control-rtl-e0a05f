// user_logic_control: the application layer above the SPI slave.
//
// Every SPI frame is 16 bits and carries one byte twice. From the MUX to
// the card the byte is a command (svcu_pkg::cmd_t): bit 7 must be set, and
// the two halves must be equal, or the frame is rejected and cmd_err
// pulses. The duplicated byte lets a glitch on the line be caught instead
// of moving a valve. A valid command with bit 0, 1 or 2 set gives a
// one-cycle pulse on open_cmd, close_cmd or spi_cmd (go to remote control)
// on the clock after the slave's rx_valid. A command byte of 0x80 (valid,
// no action) is a plain status poll.
// From the card to the MUX the byte is the full 8-bit status
// (svcu_pkg::status_t), registered every clock and sent in both halves of
// the next frame; the slave latches it when chip select goes low.
//
// Placing this decoding next to the SPI slave inside an SPI communication
// unit follows the card's gateware structure; the frame contents are this
// design's choice.
module user_logic_control
  import svcu_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  // from / to the SPI slave
  input  logic [SPI_FRAME_BITS-1:0] rx_data,
  input  logic                      rx_valid,
  input  logic                      frame_err,
  output logic [SPI_FRAME_BITS-1:0] tx_data,
  // card state for the status byte
  input  logic                      swo,
  input  logic                      swc,
  input  logic [NUM_INTLK-1:0]      intlk,
  input  machine_e                  machine,
  input  logic                      ext,
  input  logic                      vs,
  input  logic                      t_pin,
  input  logic                      bdr,
  input  logic                      remt,
  input  logic                      err,
  // decoded requests
  output logic                      open_cmd,
  output logic                      close_cmd,
  output logic                      spi_cmd,
  output logic                      cmd_err
);
  cmd_t    hi, lo;
  logic    good;
  status_t status;

  assign hi     = cmd_t'(rx_data[15:8]);
  assign lo     = cmd_t'(rx_data[7:0]);
  assign good   = (hi == lo) && hi.valid;
  assign status = pack_status(swo, swc, intlk, machine, ext, vs, t_pin, bdr,
                              remt, err);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_data   <= '0;
      open_cmd  <= 1'b0;
      close_cmd <= 1'b0;
      spi_cmd   <= 1'b0;
      cmd_err   <= 1'b0;
    end else begin
      tx_data   <= {status, status};
      open_cmd  <= rx_valid && good && hi.open;
      close_cmd <= rx_valid && good && hi.close;
      spi_cmd   <= rx_valid && good && hi.go_remote;
      cmd_err   <= (rx_valid && !good) || frame_err;
    end
  end
endmodule
