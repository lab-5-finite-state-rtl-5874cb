// lock_pkg: state codes and helpers shared by the 2-bit serial combination
// lock controller.
//
// The lock has five states. Their 3-bit codes (state_e) are the ones of the
// lock's truth table: 000 rest, 001 first number right, 101 first number
// wrong, 010 open and 110 error. The one-hot controller keeps one flip-flop
// per state; onehot_idx_e gives the bit that stands for each state, an
// ordering chosen for this design. encoding_e selects which of the two
// state assignments a lock controller is built with.
package lock_pkg;

  // Encoded state assignment (codes follow the lock's truth table).
  typedef enum logic [2:0] {
    S_REST      = 3'b000,  // waiting for the first number
    S_FIRST_OK  = 3'b001,  // first number right, waiting for the second
    S_OPEN      = 3'b010,  // both numbers right: lock open
    S_FIRST_BAD = 3'b101,  // first number wrong, waiting for the second
    S_ERROR     = 3'b110   // wrong sequence: error light on
  } state_e;

  // One-hot state assignment: bit index of each state.
  localparam int unsigned NUM_STATES = 5;
  typedef enum int unsigned {
    OH_REST      = 0,
    OH_FIRST_OK  = 1,
    OH_OPEN      = 2,
    OH_FIRST_BAD = 3,
    OH_ERROR     = 4
  } onehot_idx_e;

  typedef logic [NUM_STATES-1:0] onehot_t;

  // State assignment a lock controller is built with.
  typedef enum logic {
    ENC_BINARY = 1'b0,
    ENC_ONEHOT = 1'b1
  } encoding_e;

  // 3-bit state number of a one-hot state, for the state display.
  // A vector that is not one-hot shows as the rest state.
  function automatic logic [2:0] onehot_to_code(onehot_t s);
    unique case (s)
      onehot_t'(1) << OH_FIRST_OK:  return S_FIRST_OK;
      onehot_t'(1) << OH_OPEN:      return S_OPEN;
      onehot_t'(1) << OH_FIRST_BAD: return S_FIRST_BAD;
      onehot_t'(1) << OH_ERROR:     return S_ERROR;
      default:                      return S_REST;
    endcase
  endfunction

endpackage
