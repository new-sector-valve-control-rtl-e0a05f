// status_led: drives the front-panel LEDs of the card.
//  * intlk_led[i] is on while interlock i is OK.
//  * local_led is on in local control mode.
//  * valve_led is on when the valve is confirmed open (open end switch
//    only), off when confirmed closed (closed end switch only), and blinks
//    while it travels or the switches disagree.
//  * error_led is on while the movement supervision reports an error,
//    blinks while the valve is disconnected, and lights for one blink
//    half-period after a rejected SPI frame (comm_err pulse).
// Blinking uses a free-running counter: the LED toggles every BLINK_HALF_CYC
// clocks (250 000 clocks = 2 Hz at 1 MHz). All outputs are registered, one
// clock after their inputs.
// Which LEDs exist follows the card's front panel; what each shows and the
// blink rate are this design's choices.
module status_led
  import svcu_pkg::*;
#(
  parameter int unsigned BLINK_HALF_CYC = 250_000
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_INTLK-1:0] intlk,
  input  logic                 remt,
  input  logic                 swo,
  input  logic                 swc,
  input  logic                 vs,
  input  logic                 err,
  input  logic                 comm_err,
  output logic [NUM_INTLK-1:0] intlk_led,
  output logic                 local_led,
  output logic                 valve_led,
  output logic                 error_led
);
  localparam int unsigned BW = $clog2(BLINK_HALF_CYC);

  logic [BW-1:0] div;
  logic          blink, comm_flag, comm_seen_blink;

  always_ff @(posedge clk) begin
    if (rst) begin
      div   <= '0;
      blink <= 1'b0;
    end else if (div == BW'(BLINK_HALF_CYC - 1)) begin
      div   <= '0;
      blink <= !blink;
    end else begin
      div <= div + 1'b1;
    end
  end

  // comm_flag holds from a comm_err pulse until the blink signal has
  // toggled twice, i.e. for one to two blink half-periods.
  always_ff @(posedge clk) begin
    if (rst) begin
      comm_flag       <= 1'b0;
      comm_seen_blink <= 1'b0;
    end else if (comm_err) begin
      comm_flag       <= 1'b1;
      comm_seen_blink <= 1'b0;
    end else if (comm_flag && div == BW'(BLINK_HALF_CYC - 1)) begin
      if (comm_seen_blink) comm_flag <= 1'b0;
      comm_seen_blink <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      intlk_led <= '0;
      local_led <= 1'b0;
      valve_led <= 1'b0;
      error_led <= 1'b0;
    end else begin
      intlk_led <= intlk;
      local_led <= remt;
      if (swo && !swc)      valve_led <= 1'b1;
      else if (swc && !swo) valve_led <= 1'b0;
      else                  valve_led <= blink;
      error_led <= err || (vs && blink) || comm_flag;
    end
  end
endmodule
