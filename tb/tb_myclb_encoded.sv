// tb_myclb_encoded: exhaustive self-checking test of the encoded next-state
// and output logic.
//
// All 128 combinations of RESET, ENTER, COM1, COM2 and the 3-bit present
// state are applied, and the next state, ERROR and OPEN are compared with
// the truth-table model in lock_truth_pkg. A last check confirms that the
// table covered the 104 combinations it lists.
module tb_myclb_encoded;
  import lock_truth_pkg::*;

  int checks = 0, failures = 0;

  logic       reset, enter, com1, com2;
  logic [2:0] s, ns;
  logic       open_lock, error;

  myclb_encoded dut (
    .reset(reset), .enter(enter), .com1(com1), .com2(com2),
    .s(s), .ns(ns), .open_lock(open_lock), .error(error)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int listed;
    logic [2:0] e_ns;
    logic       e_err, e_open;
    listed = 0;
    for (int i = 0; i < 128; i++) begin
      {reset, enter, com1, com2, s} = 7'(i);
      if (lookup(reset, enter, com1, com2, s, e_ns, e_err, e_open)) listed++;
      #1;
      checks++;
      if (ns !== e_ns || error !== e_err || open_lock !== e_open) begin
        failures++;
        $display("FAIL rst=%b ent=%b c1=%b c2=%b s=%b: ns=%b err=%b open=%b, expected %b %b %b",
                 reset, enter, com1, com2, s, ns, error, open_lock, e_ns, e_err, e_open);
      end
    end
    // 64 combinations with RESET high, plus 5 listed states x 8 settings
    // of ENTER, COM1 and COM2 with RESET low
    checks++;
    if (listed != 64 + 5 * 8) begin
      failures++;
      $display("FAIL truth table covered %0d input combinations", listed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
