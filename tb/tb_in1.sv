// tb_in1: self-checking test of the first-number comparator.
//
// Drives all four switch settings into the default instance (first number
// 01) and into one built for first number 10, and compares com1 with a
// hand-written table of the expected values.
module tb_in1;

  int checks = 0, failures = 0;
  logic [1:0] code;
  logic com_def, com_alt;

  in1                    dut_def (.code(code), .com1(com_def));
  in1 #(.FIRST(2'b10))   dut_alt (.code(code), .com1(com_alt));

  // expected com1 for code = 00, 01, 10, 11
  localparam logic [3:0] EXP_DEF = 4'b0010;
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
        $display("FAIL default: code=%b com1=%b", code, com_def);
      end
      if (com_alt !== EXP_ALT[i]) begin
        failures++;
        $display("FAIL FIRST=10: code=%b com1=%b", code, com_alt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
