// valve_actuation: opens and closes the sector valve and publishes the
// interlock and beam-dump signals that depend on it.
//
// The block keeps one bit of state, open_q, the commanded position (1 =
// open). Its outputs drive the Open and Close lines to the valve through
// the galvanic isolation: valve_open = open_q, valve_close = !open_q.
//  * Open permission (open_enable): every interlock used on the selected
//    machine is OK, the temperature interlock is OK and the valve is
//    connected. With the test pin inserted in local mode the permission is
//    bypassed (bypass).
//  * Without permission the valve is closed at once and cannot be opened
//    (close interlock); this overrides any command.
//  * Commands: in remote mode open_rem / close_rem pulses (from the parallel
//    bus or SPI unit); in local mode a press of the front-panel Open or
//    Close button (active low, debounced on the board, synchronised before
//    this block, edge found here). Close wins over open.
//  * Beam dump: beam_dump = 1 unless the valve is commanded open and its
//    open end switch (and not its closed one) confirms it.
//  * Neighbour interlock: vvs_intlk = 1 (to the valves on both sides) while
//    this valve is not confirmed open.
//  * Movement supervision: if the end switch of the commanded position is
//    not reached within MOVE_TIMEOUT_CYC clocks, err is set; it is cleared by
//    the next accepted command.
// Timing: a command or a loss of permission changes the outputs on the
// next clock.
//
// The inputs (interlocks, commands, local buttons, test pin, end switches)
// and outputs (Open, Close, beam dump, interlocks to the neighbouring
// valves) are those of the card; the permission and priority rules, the use
// of the test pin as a bypass and the movement timeout are this design's
// reading of the interlock scheme.
module valve_actuation
  import svcu_pkg::*;
#(
  parameter int unsigned MOVE_TIMEOUT_CYC = 10_000_000  // 10 s at 1 MHz
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 remt,         // 1 = local, 0 = remote
  input  logic                 open_rem,     // remote open request (pulse)
  input  logic                 close_rem,    // remote close request (pulse)
  input  logic                 open_btn_n,   // local Open button, active low
  input  logic                 close_btn_n,  // local Close button, active low
  input  logic [NUM_INTLK-1:0] intlk,        // 1 = OK
  input  machine_e             machine,
  input  logic                 ext,          // 0 = temperature interlock OK
  input  logic                 vs,           // 0 = valve connected
  input  logic                 t_pin,        // 0 = test pin inserted
  input  logic                 swo,          // open end switch
  input  logic                 swc,          // closed end switch
  output logic                 valve_open,
  output logic                 valve_close,
  output logic                 beam_dump,
  output logic                 vvs_intlk,
  output logic                 err,
  output logic                 open_enable,
  output logic                 bypass
);
  localparam int unsigned TW = $clog2(MOVE_TIMEOUT_CYC + 1);

  logic          open_q, ob_q, cb_q;
  logic          open_press, close_press, open_req, close_req, permit;
  logic          moving;
  logic [TW-1:0] tmr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ob_q <= 1'b1;
      cb_q <= 1'b1;
    end else begin
      ob_q <= open_btn_n;
      cb_q <= close_btn_n;
    end
  end

  assign open_press  = !open_btn_n && ob_q;
  assign close_press = !close_btn_n && cb_q;
  assign open_req    = remt ? open_press  : open_rem;
  assign close_req   = remt ? close_press : close_rem;

  assign open_enable = interlocks_ok(intlk, machine, ext) && !vs;
  assign bypass      = remt && !t_pin;
  assign permit      = open_enable || bypass;

  always_ff @(posedge clk) begin
    if (rst)             open_q <= 1'b0;
    else if (!permit)    open_q <= 1'b0;
    else if (close_req)  open_q <= 1'b0;
    else if (open_req)   open_q <= 1'b1;
  end

  assign moving = open_q ? !swo : !swc;

  always_ff @(posedge clk) begin
    if (rst) begin
      tmr <= '0;
      err <= 1'b0;
    end else if (open_req || close_req) begin
      tmr <= '0;
      err <= 1'b0;
    end else if (!moving) begin
      tmr <= '0;
    end else if (tmr == TW'(MOVE_TIMEOUT_CYC)) begin
      err <= 1'b1;
    end else begin
      tmr <= tmr + 1'b1;
    end
  end

  assign valve_open  = open_q;
  assign valve_close = !open_q;
  assign beam_dump   = !(open_q && swo && !swc);
  assign vvs_intlk   = !(swo && !swc);
endmodule
