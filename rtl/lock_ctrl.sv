// lock_ctrl: controller of the 2-bit serial combination lock.
//
// The user sets the two switches CODE[1:0] to the first number and presses
// ENTER, then sets the second number and presses ENTER again. If both were
// right OPEN goes high and stays high; after any wrong number ERROR goes
// high once two numbers have been entered, and stays high. RESET returns
// to the rest state at any time.
//
// The controller is split as the lock's block diagram splits it: IN1 and
// IN2 reduce CODE to "is the first number" (com1) and "is the second
// number" (com2), MYCLB is the combinational next-state and output logic,
// and MYDFF the state register. ENCODING selects the state assignment:
// ENC_BINARY builds the 3-bit encoded machine (myclb_encoded, 3 flip-flops),
// ENC_ONEHOT the one-hot one (myclb_onehot, 5 flip-flops). Both behave
// identically at the ports.
//
// Timing: enter is sampled at a rising clock edge, which loads the new
// state; open_lock and error follow the state combinationally in the same
// cycle, and reset forces them low at once and clears the state at the
// next edge. enter should be the one-cycle pulse of the debouncer.
// state_num shows the present state as its 3-bit code (000, 001, 101, 010,
// 110) in either assignment, for the board's state display.
module lock_ctrl
  import lock_pkg::*;
#(
  parameter encoding_e  ENCODING = ENC_BINARY,
  parameter logic [1:0] FIRST    = 2'b01,  // first number of the combination
  parameter logic [1:0] SECOND   = 2'b11   // second number, differs from FIRST
) (
  input  logic       clk,
  input  logic       reset,      // RESET button, synchronous
  input  logic       enter,      // debounced ENTER pulse
  input  logic [1:0] code,       // CODE[1:0] switches
  output logic       open_lock,  // OPEN: both numbers right
  output logic       error,      // ERROR: wrong sequence entered
  output logic [2:0] state_num   // present state, as its 3-bit code
);

  logic com1, com2;

  in1 #(.FIRST(FIRST))   u_in1 (.code(code), .com1(com1));
  in2 #(.SECOND(SECOND)) u_in2 (.code(code), .com2(com2));

  if (ENCODING == ENC_BINARY) begin : g_encoded
    logic [2:0] s, ns;

    myclb_encoded u_clb (
      .reset(reset), .enter(enter), .com1(com1), .com2(com2),
      .s(s), .ns(ns), .open_lock(open_lock), .error(error)
    );
    mydff #(.WIDTH(3)) u_dff (.clk(clk), .d(ns), .q(s));

    assign state_num = s;
  end else begin : g_onehot
    onehot_t s, ns;

    myclb_onehot u_clb (
      .reset(reset), .enter(enter), .com1(com1), .com2(com2),
      .s(s), .ns(ns), .open_lock(open_lock), .error(error)
    );
    mydff #(.WIDTH(NUM_STATES)) u_dff (.clk(clk), .d(ns), .q(s));

    assign state_num = onehot_to_code(s);
  end

endmodule
