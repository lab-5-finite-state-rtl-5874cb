// mydff: state register (MYDFF) of the lock controller.
//
// WIDTH plain D flip-flops, loaded with d on every rising clock edge; q
// shows the stored value. There is no reset input: the lock's RESET button
// is handled by the next-state logic, which drives the rest state into d,
// so the register is cleared on the first clock edge while RESET is held.
// The encoded controller uses 3 bits, the one-hot controller 5.
module mydff #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,  // next state
  output logic [WIDTH-1:0] q   // present state
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
