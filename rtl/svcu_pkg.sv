// svcu_pkg: types, constants and helper functions shared by the Sector Valve
// Control Unit (SVCU) gateware.
//
// The SVCU card sits in a crate behind a communication card (MUX) that talks
// to the vacuum PLC. The card's FPGA runs on a 1 MHz clock and receives
// commands either over the legacy parallel backplane bus or over a 16-bit SPI
// link; a DIP switch selects which. This package holds what the blocks share:
// the machine selection, the interlock masks per machine, the command byte
// and the status byte, and the functions that evaluate the interlocks and
// pack the status.
//
// Signal polarities of the board pins follow the card's documentation where
// it gives them: VS = 0 means the valve is connected, EXT = 0 means the local
// temperature interlock is OK, T_PIN = 0 means the test pin is inserted,
// BDR = 0 means a beam dump is requested, REMT = 1 means local control.
// The interlock vector polarity (1 = interlock OK), the command and status
// byte layouts and the per-machine masks are this design's own choices.
package svcu_pkg;

  // Number of interlock inputs coming through the galvanic isolation.
  localparam int unsigned NUM_INTLK = 10;

  // Bits in one SPI frame.
  localparam int unsigned SPI_FRAME_BITS = 16;

  // Width of the status word returned over the parallel bus (DOUT).
  localparam int unsigned PRL_DOUT_BITS = 6;

  // Machine selection from the DIP switch. Code 3 is unused; it is treated
  // as "all interlocks considered".
  typedef enum logic [1:0] {
    MACH_LHC = 2'd0,
    MACH_SPS = 2'd1,
    MACH_CPS = 2'd2,
    MACH_ALL = 2'd3
  } machine_e;

  // Interlock inputs taken into account on each machine (1 = used).
  localparam logic [NUM_INTLK-1:0] INTLK_MASK_LHC = 10'h3FF;
  localparam logic [NUM_INTLK-1:0] INTLK_MASK_SPS = 10'h0FF;
  localparam logic [NUM_INTLK-1:0] INTLK_MASK_CPS = 10'h03F;

  // Command byte. Sent once in each parallel write (low 6 bits only) and
  // twice in each SPI frame (both bytes must agree).
  typedef struct packed {
    logic       valid;      // [7] set in every SPI command frame
    logic [3:0] reserved;   // [6:3]
    logic       go_remote;  // [2] switch the card to remote control
    logic       close;      // [1] close the valve (remote mode)
    logic       open;       // [0] open the valve (remote mode)
  } cmd_t;

  // Status byte. The parallel bus carries bits [5:0]; SPI carries all 8.
  typedef struct packed {
    logic error;         // [7] valve did not reach its end position in time
    logic disconnected;  // [6] valve cable not connected (VS = 1)
    logic test_pin;      // [5] test pin inserted (T_PIN = 0)
    logic beam_dump;     // [4] beam dump requested (BDR = 0)
    logic local_mode;    // [3] card in local control (REMT = 1)
    logic intlk_ok;      // [2] all interlocks of this machine OK
    logic closed;        // [1] valve closed end switch
    logic open;          // [0] valve open end switch
  } status_t;

  function automatic logic [NUM_INTLK-1:0] intlk_mask(input machine_e m);
    case (m)
      MACH_LHC: return INTLK_MASK_LHC;
      MACH_SPS: return INTLK_MASK_SPS;
      MACH_CPS: return INTLK_MASK_CPS;
      default:  return '1;
    endcase
  endfunction

  // True when every interlock used on machine m is OK and the local
  // temperature interlock (ext, 0 = OK) is OK.
  function automatic logic interlocks_ok(input logic [NUM_INTLK-1:0] intlk,
                                         input machine_e m,
                                         input logic ext);
    return ((intlk | ~intlk_mask(m)) == '1) && !ext;
  endfunction

  function automatic status_t pack_status(input logic swo, input logic swc,
                                          input logic [NUM_INTLK-1:0] intlk,
                                          input machine_e m, input logic ext,
                                          input logic vs, input logic t_pin,
                                          input logic bdr, input logic remt,
                                          input logic err);
    status_t s;
    s.error        = err;
    s.disconnected = vs;
    s.test_pin     = !t_pin;
    s.beam_dump    = !bdr;
    s.local_mode   = remt;
    s.intlk_ok     = interlocks_ok(intlk, m, ext);
    s.closed       = swc;
    s.open         = swo;
    return s;
  endfunction

endpackage
