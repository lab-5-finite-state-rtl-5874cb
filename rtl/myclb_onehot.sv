// myclb_onehot: next-state and output logic (MYCLB) of the combination
// lock, for the one-hot state assignment.
//
// Same machine as myclb_encoded, but each of the five states has its own
// flip-flop (bit positions in lock_pkg::onehot_idx_e), so every next-state
// bit is a short sum of products of the present-state bits and the inputs:
//   rest      <- RESET | invalid | rest & ~ENTER
//   first ok  <- rest & ENTER & COM1      | first ok & ~ENTER
//   first bad <- rest & ENTER & ~COM1     | first bad & ~ENTER
//   open      <- first ok & ENTER & COM2  | open
//   error     <- first ok & ENTER & ~COM2 | first bad & ENTER | error
// (every term except the first line also needs ~RESET). OPEN is the open
// bit and ERROR the error bit, both forced low by RESET. A state vector that
// is not one-hot (no bit or several bits set) goes to rest with both outputs
// low; this recovery is a choice of this design. An assertion checks that
// the next state is always exactly one-hot.
module myclb_onehot
  import lock_pkg::*;
(
  input  logic    reset,  // RESET button, synchronous through ns
  input  logic    enter,  // debounced ENTER, one cycle per press
  input  logic    com1,   // CODE is the first number
  input  logic    com2,   // CODE is the second number
  input  onehot_t s,      // present state, one-hot
  output onehot_t ns,     // next state, one-hot
  output logic    open_lock,
  output logic    error
);

  logic valid;
  logic run;

  // exactly one bit set: non-zero, and clearing the lowest set bit leaves 0
  assign valid = (s != '0) && ((s & (s - 1'b1)) == '0);
  assign run   = !reset && valid;

  always_comb begin
    ns = '0;
    ns[OH_REST]      = !run || (s[OH_REST] && !enter);
    ns[OH_FIRST_OK]  = run && ((s[OH_REST] && enter && com1) ||
                               (s[OH_FIRST_OK] && !enter));
    ns[OH_FIRST_BAD] = run && ((s[OH_REST] && enter && !com1) ||
                               (s[OH_FIRST_BAD] && !enter));
    ns[OH_OPEN]      = run && ((s[OH_FIRST_OK] && enter && com2) ||
                               s[OH_OPEN]);
    ns[OH_ERROR]     = run && ((s[OH_FIRST_OK] && enter && !com2) ||
                               (s[OH_FIRST_BAD] && enter) || s[OH_ERROR]);
    // whatever the present state, exactly one next-state bit is set
    assert ($onehot(ns)) else $error("next state %b is not one-hot", ns);
  end

  assign open_lock = run && s[OH_OPEN];
  assign error     = run && s[OH_ERROR];

endmodule
