// remote_local_switching: decides whether the valve is commanded from the
// PLC (remote) or from the card's front-panel buttons (local).
//
// remt = 1 means local control, 0 remote control. The local button blr_n
// (active low, already debounced on the board) is sampled by two flops,
// blr1 and blr2; a press is blr1 low while blr2 is still high, and puts the
// card in local mode on the next clock. A request to go remote comes from
// the SPI unit (spi_cmd) in SPI mode or from the parallel bus block
// (prl_cmd) in parallel mode, each a one-cycle pulse; a request from the
// interface that is not selected by spi_en is ignored. A button press wins
// over a simultaneous remote request, so that an operator at the crate keeps
// control. After reset the card is in local mode, so nothing moves until the
// PLC asks for remote control.
//
// The signal names and the double sampling of the button follow the card's
// simulation of this block; the priority and the reset state are this
// design's choices.
module remote_local_switching (
  input  logic clk,
  input  logic rst,
  input  logic blr_n,    // local button, active low
  input  logic spi_en,   // 1: SPI mode, 0: parallel mode
  input  logic spi_cmd,  // go-remote pulse from the SPI unit
  input  logic prl_cmd,  // go-remote pulse from the parallel bus block
  output logic remt      // 1 = local, 0 = remote
);
  logic blr1, blr2, press, go_remote;

  always_ff @(posedge clk) begin
    if (rst) begin
      blr1 <= 1'b1;
      blr2 <= 1'b1;
    end else begin
      blr1 <= blr_n;
      blr2 <= blr1;
    end
  end

  assign press     = !blr1 && blr2;
  assign go_remote = spi_en ? spi_cmd : prl_cmd;

  always_ff @(posedge clk) begin
    if (rst)            remt <= 1'b1;
    else if (press)     remt <= 1'b1;
    else if (go_remote) remt <= 1'b0;
  end
endmodule
