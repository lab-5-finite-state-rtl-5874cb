// lock_truth_pkg: reference model of the lock's next-state logic for the
// testbenches, written directly from the lock's truth table.
//
// Each row is (care mask, value) over the inputs {reset, enter, com1, com2,
// s[2:0]} with the next state, ERROR and OPEN it gives; the first row that
// matches wins. Inputs no row covers (the unused codes 011, 100 and 111
// without RESET) go to rest with both outputs low, the recovery this design
// chose.
package lock_truth_pkg;

  typedef struct packed {
    logic [6:0] mask;   // 1 = input bit is compared
    logic [6:0] value;  // {reset, enter, com1, com2, s[2:0]}
    logic [2:0] ns;
    logic       error;
    logic       open;
  } row_t;

  localparam int ROWS = 11;
  localparam row_t TABLE [ROWS] = '{
    '{7'b1000000, 7'b1000000, 3'b000, 1'b0, 1'b0},
    '{7'b1100111, 7'b0000000, 3'b000, 1'b0, 1'b0},
    '{7'b1110111, 7'b0100000, 3'b101, 1'b0, 1'b0},
    '{7'b1110111, 7'b0110000, 3'b001, 1'b0, 1'b0},
    '{7'b1100111, 7'b0000001, 3'b001, 1'b0, 1'b0},
    '{7'b1101111, 7'b0100001, 3'b110, 1'b0, 1'b0},
    '{7'b1101111, 7'b0101001, 3'b010, 1'b0, 1'b0},
    '{7'b1000111, 7'b0000010, 3'b010, 1'b0, 1'b1},
    '{7'b1100111, 7'b0000101, 3'b101, 1'b0, 1'b0},
    '{7'b1100111, 7'b0100101, 3'b110, 1'b0, 1'b0},
    '{7'b1000111, 7'b0000110, 3'b110, 1'b1, 1'b0}
  };

  // Looks the inputs up in the table; returns 1 if a row matched.
  function automatic bit lookup(input logic reset, enter, com1, com2,
                                input logic [2:0] s,
                                output logic [2:0] ns,
                                output logic error, open);
    logic [6:0] in;
    in    = {reset, enter, com1, com2, s};
    ns    = 3'b000;
    error = 1'b0;
    open  = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      if ((in & TABLE[r].mask) == TABLE[r].value) begin
        ns    = TABLE[r].ns;
        error = TABLE[r].error;
        open  = TABLE[r].open;
        return 1'b1;
      end
    end
    return 1'b0;
  endfunction

endpackage
