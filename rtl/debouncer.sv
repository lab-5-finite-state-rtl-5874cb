// debouncer: turns a press of the ENTER button into one clock-cycle pulse.
//
// A press is accepted once the button has been seen high on two successive
// rising clock edges, so a glitch shorter than that is ignored. The pulse
// then rises on the third edge of the press and falls on the fourth, and
// stays low for the rest of the press, however long it is held; a new
// pulse needs the button to be seen low first.
//
// Three flip-flops sample the button (s1, then s2, then s3 one cycle
// later); the output flip-flop loads s1 & s2 & ~s3, i.e. "high for two
// edges and not yet high for three". The first stage also brings the
// asynchronous button into the clock domain. As the lock's design calls
// for, none of the flip-flops has a reset: hold the button low for three
// cycles after power-up and every stage is settled.
module debouncer (
  input  logic clk,
  input  logic btn,   // raw ENTER button, active high
  output logic pulse  // debounced ENTER, high for one cycle per press
);

  logic s1, s2, s3;

  always_ff @(posedge clk) begin
    s1    <= btn;
    s2    <= s1;
    s3    <= s2;
    pulse <= s1 && s2 && !s3;
  end

endmodule
