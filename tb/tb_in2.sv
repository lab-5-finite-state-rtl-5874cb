// tb_in2: self-checking test of the second-number comparator.
//
// Drives all four switch settings into the default instance (default second number
// 11) and into one built for second number 10, and compares com2 with a
// hand-written table of the expected values.
module tb_in2;

  int checks = 0, failures = 0;
  logic [1:0] code;
  logic com_def, com_alt;

  in2                    dut_def (.code(code), .com2(com_def));
  in2 #(.SECOND(2'b10))   dut_alt (.code(code), .com2(com_alt));

  // expected com2 for code = 00, 01, 10, 11
  localparam logic [3:0] EXP_DEF = 4'b1000;
  localparam logic [3:0] EXP_ALT = 4'b0100;

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      code = 2'(i);
      #1;
      checks += 2;
      if (com_def !== EXP_DEF[i]) begin
        failures++;
        $display("FAIL default: code=%b com2=%b", code, com_def);
      end
      if (com_alt !== EXP_ALT[i]) begin
        failures++;
        $display("FAIL SECOND=10: code=%b com2=%b", code, com_alt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
