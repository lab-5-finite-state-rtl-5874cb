// in2: second-number comparator (IN2) of the combination lock.
//
// com2 is high while the switches CODE[1:0] show the second number of the
// combination. The number is the parameter SECOND; its default, 11, is the
// second number of the example combination 01-11. It must differ from the
// first number. Purely combinational, written as the AND of per-bit
// equalities (XNORs), as a few gates would build it.
module in2 #(
  parameter logic [1:0] SECOND = 2'b11
) (
  input  logic [1:0] code,  // CODE[1:0] switches
  output logic       com2   // code equals the second number
);

  assign com2 = &(~(code ^ SECOND));

endmodule
