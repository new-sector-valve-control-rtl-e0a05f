// parallel_communication: the card's side of the legacy parallel backplane
// bus to the MUX communication card.
//
// Bus format (din): din[5:0] command data, din[6] Write strobe, din[7]
// Select, both strobes active low. The three bus inputs are asynchronous to
// the 1 MHz clock and pass through a two-flop synchroniser (data and strobes
// together, so data set up before the Write edge is captured with it).
//  * Write access: when Select is low and Write goes from high to low, the
//    data field is taken as a command: bit 0 open, bit 1 close, bit 2 go to
//    remote control. Each set bit gives a one-cycle pulse on open_rem,
//    close_rem or prl_cmd, three clocks after the Write edge.
//  * Read access: dout always carries bits [5:0] of the status byte (valve
//    open and closed switches, interlocks OK, local mode, beam dump request,
//    test pin), registered, so it changes only on clock edges.
//  * back (FeedBackSelect) is the card's acknowledge, active low: it goes
//    low three clocks after Select goes low and returns high when Select is
//    released, telling the MUX that this card is present and answering.
//
// The inputs and outputs are those of the parallel communication block of
// the card's gateware (interlocks, read commands buffer, end switches, valve
// status, temperature interlock, remote mode, test pin, beam dump request,
// machine select in; status, remote request, acknowledge, open and close
// requests out). The strobe assignment of bits 6 and 7 follows the bus
// drawing; the strobe polarity, command and status bit layout, and the
// acknowledge rule are this design's choices.
module parallel_communication
  import svcu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_INTLK-1:0] intlk,     // interlocks, 1 = OK
  input  logic [7:0]           din,       // {Select_n, Write_n, data[5:0]}
  input  logic                 swo,       // valve open end switch
  input  logic                 swc,       // valve closed end switch
  input  logic                 vs,        // valve status, 0 = connected
  input  logic                 ext,       // local temperature interlock, 0 = OK
  input  logic                 remt,      // 1 = local control, 0 = remote
  input  logic                 t_pin,     // 0 = test pin inserted
  input  logic                 bdr,       // 0 = beam dump requested
  input  machine_e             machine,
  output logic [PRL_DOUT_BITS-1:0] dout,  // status to the PLC
  output logic                 prl_cmd,   // request: go to remote control
  output logic                 back,      // acknowledge, active low
  output logic                 close_rem, // request: close valve
  output logic                 open_rem   // request: open valve
);
  logic [7:0] din_s1, din_s2;
  logic       wr_s3;
  logic       sel, wr_fall;
  status_t    status;

  always_ff @(posedge clk) begin
    if (rst) begin
      din_s1 <= 8'hFF;
      din_s2 <= 8'hFF;
      wr_s3  <= 1'b1;
    end else begin
      din_s1 <= din;
      din_s2 <= din_s1;
      wr_s3  <= din_s2[6];
    end
  end

  assign sel     = !din_s2[7];
  assign wr_fall = !din_s2[6] && wr_s3;

  // The status byte is built from the raw inputs; bits [7:6] (error,
  // disconnected) are left unused here because only six bits fit the
  // parallel bus. Lint reports them as unused on purpose.
  assign status = pack_status(swo, swc, intlk, machine, ext, vs, t_pin, bdr,
                              remt, 1'b0);

  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      back      <= 1'b1;
      open_rem  <= 1'b0;
      close_rem <= 1'b0;
      prl_cmd   <= 1'b0;
    end else begin
      dout      <= status[PRL_DOUT_BITS-1:0];
      back      <= !sel;
      open_rem  <= sel && wr_fall && din_s2[0];
      close_rem <= sel && wr_fall && din_s2[1];
      prl_cmd   <= sel && wr_fall && din_s2[2];
    end
  end
endmodule
