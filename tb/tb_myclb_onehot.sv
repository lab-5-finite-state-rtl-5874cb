// tb_myclb_onehot: exhaustive self-checking test of the one-hot next-state
// and output logic.
//
// Every setting of RESET, ENTER, COM1 and COM2 is applied with every 5-bit
// state vector (16 x 32). For the five one-hot vectors the state is turned
// into its 3-bit code, looked up in the truth-table model of
// lock_truth_pkg, and the expected next code turned back into one-hot. All
// other vectors must lead to the rest state with OPEN and ERROR low.
module tb_myclb_onehot;
  import lock_truth_pkg::*;

  int checks = 0, failures = 0;

  logic       reset, enter, com1, com2;
  logic [4:0] s, ns;
  logic       open_lock, error;

  myclb_onehot dut (
    .reset(reset), .enter(enter), .com1(com1), .com2(com2),
    .s(s), .ns(ns), .open_lock(open_lock), .error(error)
  );

  // state codes in one-hot bit order: rest, first ok, open, first bad, error
  localparam logic [2:0] CODE_OF_BIT [5] = '{3'b000, 3'b001, 3'b010, 3'b101, 3'b110};

  function automatic logic [4:0] to_onehot(logic [2:0] code);
    for (int b = 0; b < 5; b++)
      if (CODE_OF_BIT[b] == code) return 5'(1) << b;
    return 5'b00001;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e_code;
    logic [4:0] e_ns;
    logic       e_err, e_open;
    int         ones;
    for (int st = 0; st < 32; st++) begin
      for (int in = 0; in < 16; in++) begin
        {reset, enter, com1, com2} = 4'(in);
        s = 5'(st);
        ones = $countones(s);
        if (ones == 1) begin
          void'(lookup(reset, enter, com1, com2, CODE_OF_BIT[$clog2(st)],
                       e_code, e_err, e_open));
          e_ns = to_onehot(e_code);
        end else begin
          e_ns = 5'b00001;
          e_err = 1'b0;
          e_open = 1'b0;
        end
        #1;
        checks++;
        if (ns !== e_ns || error !== e_err || open_lock !== e_open) begin
          failures++;
          $display("FAIL rst=%b ent=%b c1=%b c2=%b s=%b: ns=%b err=%b open=%b, expected %b %b %b",
                   reset, enter, com1, com2, s, ns, error, open_lock, e_ns, e_err, e_open);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
