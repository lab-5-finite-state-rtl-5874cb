// myclb_encoded: next-state and output logic (MYCLB) of the combination
// lock, for the 3-bit encoded state assignment.
//
// Purely combinational. From RESET, the debounced ENTER pulse, the two
// comparator outputs COM1/COM2 and the present state s it computes the next
// state ns and the outputs. The transitions are those of the lock's truth
// table:
//   RESET                      -> 000 (rest), outputs low
//   000 rest:       ENTER & COM1  -> 001, ENTER & ~COM1 -> 101
//   001 first ok:   ENTER & COM2  -> 010, ENTER & ~COM2 -> 110
//   101 first bad:  ENTER         -> 110
//   010 open:       stays, OPEN high
//   110 error:      stays, ERROR high
// Without ENTER every state holds. OPEN and ERROR depend on the state and on
// RESET, which forces them low at once (Mealy outputs). The three unused
// codes 011, 100 and 111 go to rest with both outputs low; this recovery is
// a choice of this design.
module myclb_encoded
  import lock_pkg::*;
(
  input  logic       reset,  // RESET button, synchronous through ns
  input  logic       enter,  // debounced ENTER, one cycle per press
  input  logic       com1,   // CODE is the first number
  input  logic       com2,   // CODE is the second number
  input  logic [2:0] s,      // present state
  output logic [2:0] ns,     // next state
  output logic       open_lock,
  output logic       error
);

  always_comb begin
    ns        = S_REST;
    open_lock = 1'b0;
    error     = 1'b0;
    if (!reset) begin
      unique case (s)
        S_REST:      ns = !enter ? S_REST : (com1 ? S_FIRST_OK : S_FIRST_BAD);
        S_FIRST_OK:  ns = !enter ? S_FIRST_OK : (com2 ? S_OPEN : S_ERROR);
        S_FIRST_BAD: ns = enter ? S_ERROR : S_FIRST_BAD;
        S_OPEN: begin
          ns        = S_OPEN;
          open_lock = 1'b1;
        end
        S_ERROR: begin
          ns    = S_ERROR;
          error = 1'b1;
        end
        default:     ns = S_REST;
      endcase
    end
  end

endmodule
