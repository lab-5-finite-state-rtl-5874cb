// locktop: board-level top of the 2-bit serial combination lock.
//
// The raw ENTER button passes through the debouncer, which makes one
// clock-cycle pulse of each press held for at least two cycles. That pulse,
// the RESET button and the CODE[1:0] switches drive two lock controllers
// side by side: one built with the 3-bit encoded state assignment and one
// with the one-hot assignment. They behave identically; both are kept so
// that their size can be compared. Each has its own outputs:
//   *_open, *_error  the OPEN (relay) and ERROR (error light) signals
//   *_state          the present state as a 3-bit code, for the state display
//   *_leds           the status lights: bit 0 is OPEN, bit 1 is ERROR, and
//                    all other lights are always on
// RESET is not debounced: it acts synchronously and is harmless when
// repeated. LIGHTS, the number of status lights, is this design's choice.
module locktop
  import lock_pkg::*;
#(
  parameter int unsigned LIGHTS = 8,       // status lights per controller
  parameter logic [1:0]  FIRST  = 2'b01,   // first number of the combination
  parameter logic [1:0]  SECOND = 2'b11    // second number
) (
  input  logic              clk,
  input  logic              reset_btn,  // RESET button
  input  logic              enter_btn,  // raw ENTER button
  input  logic [1:0]        code,       // CODE[1:0] switches
  output logic              enc_open,
  output logic              enc_error,
  output logic [2:0]        enc_state,
  output logic [LIGHTS-1:0] enc_leds,
  output logic              oh_open,
  output logic              oh_error,
  output logic [2:0]        oh_state,
  output logic [LIGHTS-1:0] oh_leds
);

  logic enter;

  debouncer u_debounce (.clk(clk), .btn(enter_btn), .pulse(enter));

  lock_ctrl #(.ENCODING(ENC_BINARY), .FIRST(FIRST), .SECOND(SECOND)) u_lock_enc (
    .clk(clk), .reset(reset_btn), .enter(enter), .code(code),
    .open_lock(enc_open), .error(enc_error), .state_num(enc_state)
  );

  lock_ctrl #(.ENCODING(ENC_ONEHOT), .FIRST(FIRST), .SECOND(SECOND)) u_lock_oh (
    .clk(clk), .reset(reset_btn), .enter(enter), .code(code),
    .open_lock(oh_open), .error(oh_error), .state_num(oh_state)
  );

  always_comb begin
    enc_leds    = '1;
    enc_leds[0] = enc_open;
    enc_leds[1] = enc_error;
    oh_leds     = '1;
    oh_leds[0]  = oh_open;
    oh_leds[1]  = oh_error;
  end

endmodule
