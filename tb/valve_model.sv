// valve_model: behavioural model of a sector valve's end switches for the
// testbenches. When the Open line changes, both switches drop for TRAVEL
// clocks, then the switch of the new position closes. With stall = 1 the
// valve does not move. Not synthesizable logic of the card.
module valve_model #(
  parameter int TRAVEL = 12
) (
  input  logic clk,
  input  logic stall,
  input  logic valve_open,
  output logic swo,
  output logic swc
);
  int travel = 0;

  initial begin
    swo = 1'b0;
    swc = 1'b1;
  end

  always @(posedge clk) begin
    if (stall) travel <= 0;
    else if ((valve_open && !swo) || (!valve_open && !swc)) begin
      if (travel == TRAVEL) begin
        travel <= 0;
        swo <= valve_open;
        swc <= !valve_open;
      end else begin
        travel <= travel + 1;
        swo <= 1'b0;
        swc <= 1'b0;
      end
    end
  end
endmodule
