// spi_slave: SPI slave of the SVCU card, oversampled by the system clock.
//
// Frames are FRAME_BITS long (16), most significant bit first, SPI mode 0:
// the clock idles low, both sides sample on the rising edge and change data
// after it. Chip select is active low.
//
// sclk, mosi and cs_n are sampled on every system clock edge (first flop
// q1), and an edge of sclk is found by comparing q1 with its delayed copy
// q2. Because the sampling runs at the system clock, an SPI clock of up to
// half the system clock (500 kHz at 1 MHz) is received when each SPI clock
// level lasts at least one system clock period.
//
// One shift register serves both directions. While chip select is high it
// is loaded with tx_data, so the first MISO bit is valid before the frame
// starts. On each detected rising sclk edge the register shifts left and
// takes the sampled MOSI bit; miso is its top bit, so the next bit appears
// one to two system clocks after the master's sampling edge, in time for the
// next rising edge even at 500 kHz.
// When chip select returns high, rx_data takes the received word and
// rx_valid pulses for one clock if exactly FRAME_BITS bits came in;
// otherwise frame_err pulses and the word is dropped.
//
// The 16-bit frame and the SYSCLK/2 speed limit follow the card's
// documentation; SPI mode, bit order and the framing check are this
// design's choices.
module spi_slave #(
  parameter int unsigned FRAME_BITS = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sclk,
  input  logic                  mosi,
  input  logic                  cs_n,
  output logic                  miso,
  input  logic [FRAME_BITS-1:0] tx_data,   // word to send in the next frame
  output logic [FRAME_BITS-1:0] rx_data,   // last complete word received
  output logic                  rx_valid,  // one-cycle pulse per good frame
  output logic                  frame_err  // one-cycle pulse per bad frame
);
  localparam int unsigned CW = $clog2(FRAME_BITS + 2);

  logic                  sclk_q1, sclk_q2, mosi_q1, cs_q1, cs_q2;
  logic [FRAME_BITS-1:0] shreg;
  logic [CW-1:0]         bitcnt;
  logic                  sclk_rise, cs_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_q1 <= 1'b0;
      sclk_q2 <= 1'b0;
      mosi_q1 <= 1'b0;
      cs_q1   <= 1'b1;
      cs_q2   <= 1'b1;
    end else begin
      sclk_q1 <= sclk;
      sclk_q2 <= sclk_q1;
      mosi_q1 <= mosi;
      cs_q1   <= cs_n;
      cs_q2   <= cs_q1;
    end
  end

  assign sclk_rise = sclk_q1 && !sclk_q2 && !cs_q1;
  assign cs_end    = cs_q1 && !cs_q2;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bitcnt    <= '0;
      rx_data   <= '0;
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      if (cs_q1) begin
        shreg  <= tx_data;
        bitcnt <= '0;
        if (cs_end) begin
          if (bitcnt == CW'(FRAME_BITS)) begin
            rx_data  <= shreg;
            rx_valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end
      end else if (sclk_rise) begin
        shreg <= {shreg[FRAME_BITS-2:0], mosi_q1};
        if (bitcnt != CW'(FRAME_BITS + 1)) bitcnt <= bitcnt + 1'b1;
      end
    end
  end

  assign miso = shreg[FRAME_BITS-1];
endmodule
