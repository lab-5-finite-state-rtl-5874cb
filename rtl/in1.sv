// in1: first-number comparator (IN1) of the combination lock.
//
// com1 is high while the switches CODE[1:0] show the first number of the
// combination. The number is the parameter FIRST; its default, 01, is the
// first number of the example combination 01-11. Keeping the comparison in
// its own block makes the combination easy to change without touching the
// state machine. Purely combinational, written as the AND of per-bit
// equalities (XNORs), as a few gates would build it.
module in1 #(
  parameter logic [1:0] FIRST = 2'b01
) (
  input  logic [1:0] code,  // CODE[1:0] switches
  output logic       com1   // code equals the first number
);

  assign com1 = &(~(code ^ FIRST));

endmodule
