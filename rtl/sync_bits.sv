// sync_bits: brings a vector of asynchronous board inputs into the 1 MHz
// clock domain through STAGES flip-flops per bit. Each bit is synchronised
// on its own, so it suits independent level signals (buttons, switches,
// interlocks), not buses that must stay coherent.
// Latency: STAGES clock cycles. Reset loads RESET_VAL, the idle level of
// the inputs. A design helper; the card documentation does not describe it.
module sync_bits #(
  parameter int unsigned W         = 1,
  parameter int unsigned STAGES    = 2,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] pipe [STAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(STAGES); i++) pipe[i] <= RESET_VAL;
    end else begin
      pipe[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign q = pipe[STAGES-1];
endmodule
