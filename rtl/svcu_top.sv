// svcu_top: FPGA gateware of the Sector Valve Control Unit card.
//
// One SVCU card controls one vacuum sector valve. It reads the valve's end
// switches and its interlocks, takes open/close commands from the PLC
// through the crate's MUX card or from its own front-panel buttons, and
// drives the valve, the beam-dump request and the interlock lines to the
// neighbouring valves.
//
// Structure (all on one 1 MHz clock):
//   clock_module            clock and synchronously released reset
//   sync_bits               two-flop synchronisers for the board inputs
//   hardware_interface      routes backplane lines to the parallel or the
//                           SPI logic according to the spi_en DIP switch
//   parallel_communication  legacy parallel bus: 6-bit commands, 6-bit status
//   spi_communication       16-bit SPI frames: command byte in, status byte out
//   remote_local_switching  local (buttons) / remote (PLC) control
//   valve_actuation         open/close decision, interlocks, beam dump
//   status_led              front-panel LEDs
// Remote open/close requests of the two interfaces are merged by OR; the
// hardware interface guarantees that only the selected interface sees bus
// traffic.
//
// The block split, the 1 MHz clock, the DIP-switch selection of SPI or
// parallel mode and of the machine, and the card's inputs and outputs
// follow the card's description; line polarities, bit layouts and the
// protection rules are this design's choices, listed in each block.
module svcu_top
  import svcu_pkg::*;
#(
  parameter int unsigned MOVE_TIMEOUT_CYC = 10_000_000,
  parameter int unsigned BLINK_HALF_CYC   = 250_000
) (
  input  logic                 osc_clk,          // 1 MHz on-chip oscillator
  input  logic                 ext_rst_n,        // reset button / supervisor
  // DIP switches
  input  logic                 spi_en,           // 1: SPI, 0: parallel
  input  logic [1:0]           machine_sel,      // svcu_pkg::machine_e
  // backplane
  input  logic [6:0]           bp_wdata,
  input  logic                 bp_select_n,
  input  logic                 bp_spi_sclk,
  input  logic                 bp_spi_mosi,
  output logic [7:0]           bp_rdata,
  output logic                 bp_rdata_oe,
  output logic                 bp_back,
  output logic                 bp_back_oe,
  output logic                 bp_spi_miso,
  output logic                 bp_spi_miso_oe,
  output logic                 spi_buf_en,
  output logic                 prl_buf_en,
  // front panel (buttons debounced on the board, active low)
  input  logic                 open_btn_n,
  input  logic                 close_btn_n,
  input  logic                 local_btn_n,
  input  logic                 test_pin_n,       // 0 = test pin inserted
  output logic [NUM_INTLK-1:0] intlk_led,
  output logic                 error_led,
  output logic                 local_led,
  output logic                 valve_led,
  // valve and interlocks (through galvanic isolation)
  input  logic [NUM_INTLK-1:0] intlk,            // 1 = OK
  input  logic                 ext_intlk,        // 0 = temperature OK
  input  logic                 valve_status,     // 0 = valve connected
  input  logic                 beam_dump_req_n,  // 0 = beam dump requested
  input  logic                 valve_open_sw,
  input  logic                 valve_closed_sw,
  output logic                 valve_open,
  output logic                 valve_close,
  output logic                 beam_dump,
  output logic                 vvs_m1,           // interlock to valve VVS-1
  output logic                 vvs_p1            // interlock to valve VVS+1
);
  localparam int unsigned NSYNC = NUM_INTLK + 11;

  logic clk, rst;

  clock_module u_clk (
    .osc_clk, .ext_rst_n, .clk, .rst
  );

  // ---- synchronised board inputs ----
  logic [NUM_INTLK-1:0] intlk_s;
  logic                 ext_s, vs_s, tpin_s, bdr_s, swo_s, swc_s;
  logic                 obtn_s, cbtn_s, spi_en_s;
  logic [1:0]           mach_s;
  machine_e             machine;

  sync_bits #(
    .W(NSYNC), .STAGES(2),
    // idle levels: interlocks lost, temperature not OK, valve disconnected,
    // no test pin, no beam dump request, no end switch, buttons released,
    // parallel mode, machine code 3 (all interlocks)
    .RESET_VAL({{NUM_INTLK{1'b0}}, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0,
                1'b1, 1'b1, 1'b0, 2'b11})
  ) u_sync (
    .clk, .rst,
    .d({intlk, ext_intlk, valve_status, test_pin_n, beam_dump_req_n,
        valve_open_sw, valve_closed_sw, open_btn_n, close_btn_n, spi_en,
        machine_sel}),
    .q({intlk_s, ext_s, vs_s, tpin_s, bdr_s, swo_s, swc_s, obtn_s, cbtn_s,
        spi_en_s, mach_s})
  );

  assign machine = machine_e'(mach_s);

  // ---- mode-dependent line routing ----
  logic [7:0]               prl_din;
  logic [PRL_DOUT_BITS-1:0] prl_dout;
  logic                     prl_back, spi_cs_n, spi_sclk, spi_mosi, spi_miso;

  hardware_interface u_hwif (
    .spi_en(spi_en_s),
    .bp_wdata, .bp_select_n, .bp_spi_sclk, .bp_spi_mosi,
    .bp_rdata, .bp_rdata_oe, .bp_back, .bp_back_oe, .bp_spi_miso,
    .bp_spi_miso_oe, .spi_buf_en, .prl_buf_en,
    .prl_din, .prl_dout, .prl_back,
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso
  );

  // ---- communication ----
  logic remt, err;
  logic prl_open, prl_close, prl_cmd;
  logic spi_open, spi_close, spi_cmd, spi_cmd_err;

  parallel_communication u_prl (
    .clk, .rst, .intlk(intlk_s), .din(prl_din), .swo(swo_s), .swc(swc_s),
    .vs(vs_s), .ext(ext_s), .remt, .t_pin(tpin_s), .bdr(bdr_s), .machine,
    .dout(prl_dout), .prl_cmd, .back(prl_back), .close_rem(prl_close),
    .open_rem(prl_open)
  );

  spi_communication u_spi (
    .clk, .rst, .sclk(spi_sclk), .mosi(spi_mosi), .cs_n(spi_cs_n),
    .miso(spi_miso), .swo(swo_s), .swc(swc_s), .intlk(intlk_s), .machine,
    .ext(ext_s), .vs(vs_s), .t_pin(tpin_s), .bdr(bdr_s), .remt, .err,
    .open_cmd(spi_open), .close_cmd(spi_close), .spi_cmd,
    .cmd_err(spi_cmd_err)
  );

  // ---- control ----
  remote_local_switching u_rl (
    .clk, .rst, .blr_n(local_btn_n), .spi_en(spi_en_s), .spi_cmd, .prl_cmd,
    .remt
  );

  logic vvs_intlk;

  valve_actuation #(.MOVE_TIMEOUT_CYC(MOVE_TIMEOUT_CYC)) u_va (
    .clk, .rst, .remt,
    .open_rem(prl_open || spi_open), .close_rem(prl_close || spi_close),
    .open_btn_n(obtn_s), .close_btn_n(cbtn_s), .intlk(intlk_s), .machine,
    .ext(ext_s), .vs(vs_s), .t_pin(tpin_s), .swo(swo_s), .swc(swc_s),
    .valve_open, .valve_close, .beam_dump, .vvs_intlk, .err,
    // permission and bypass are visible in the status byte and the LEDs
    .open_enable(), .bypass()
  );

  assign vvs_m1 = vvs_intlk;
  assign vvs_p1 = vvs_intlk;

  status_led #(.BLINK_HALF_CYC(BLINK_HALF_CYC)) u_led (
    .clk, .rst, .intlk(intlk_s), .remt, .swo(swo_s), .swc(swc_s),
    .vs(vs_s), .err, .comm_err(spi_cmd_err), .intlk_led, .local_led, .valve_led, .error_led
  );
endmodule
