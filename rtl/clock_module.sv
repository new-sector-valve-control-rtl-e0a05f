// clock_module: clock and reset generation of the SVCU gateware.
//
// The FPGA's on-chip 1 MHz oscillator (a vendor primitive, not modelled
// here) arrives on osc_clk and is handed on unchanged as the system clock
// clk. The card's reset (push button and supervisor, active low, ext_rst_n)
// is asynchronous; this block asserts rst at once when ext_rst_n goes low
// and releases it synchronously, RST_STAGES clock edges after ext_rst_n has
// gone high, so that every flip-flop leaves reset on the same edge.
//
// The 1 MHz frequency and the split into a clock block producing CLK and RST
// follow the card's gateware description; the reset synchroniser and its
// depth are this design's choice.
module clock_module #(
  parameter int unsigned RST_STAGES = 2
) (
  input  logic osc_clk,    // 1 MHz from the on-chip oscillator
  input  logic ext_rst_n,  // asynchronous board reset, active low
  output logic clk,        // system clock
  output logic rst         // synchronous-release reset, active high
);
  logic [RST_STAGES-1:0] rst_pipe;

  assign clk = osc_clk;

  always_ff @(posedge osc_clk or negedge ext_rst_n) begin
    if (!ext_rst_n) rst_pipe <= '1;
    else            rst_pipe <= {rst_pipe[RST_STAGES-2:0], 1'b0};
  end

  assign rst = rst_pipe[RST_STAGES-1];
endmodule
