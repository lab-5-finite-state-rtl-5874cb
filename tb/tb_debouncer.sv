// tb_debouncer: self-checking test of the ENTER debouncer.
//
// Presses of 1, 2, 3, 5 and 40 clock cycles, and a bouncing press that is
// never high on two edges in a row, are applied with idle gaps between
// them. A press held for two edges or more must give exactly one pulse,
// high from the third rising edge of the press to the fourth; shorter or
// bouncing presses must give none.
module tb_debouncer;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic btn = 1'b0;
  logic pulse;
  int   cyc = 0;

  debouncer dut (.clk(clk), .btn(btn), .pulse(pulse));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies the pattern (bit i = button level during edge i+1 of the
  // press), then idles, and checks the pulse seen over the whole window:
  // one pulse rising after edge rise_edge, or none.
  task automatic press(input logic [63:0] pattern, input int len, input bit expect_pulse,
                      input int rise_edge = 3);
    int c0, highs, first;
    @(negedge clk);
    c0 = cyc;
    highs = 0;
    first = -1;
    for (int i = 0; i < len + 8; i++) begin
      btn = (i < len) ? pattern[i] : 1'b0;
      @(negedge clk);
      if (pulse) begin
        highs++;
        if (first < 0) first = cyc - c0;
      end
    end
    checks++;
    if (expect_pulse) begin
      if (highs != 1 || first != rise_edge) begin
        failures++;
        $display("FAIL press len %0d: %0d pulse cycles, first after edge %0d (expected 1, edge %0d)",
                 len, highs, first, rise_edge);
      end
    end else if (highs != 0) begin
      failures++;
      $display("FAIL pattern %b len %0d: %0d pulse cycles, expected none", pattern, len, highs);
    end
  endtask

  initial begin
    btn = 1'b0;
    repeat (4) @(negedge clk);  // settle the unreset flip-flops
    checks++;
    if (pulse !== 1'b0) begin
      failures++;
      $display("FAIL pulse high while idle");
    end
    press(64'b1, 1, 1'b0);
    press(64'b11, 2, 1'b1);
    press(64'b111, 3, 1'b1);
    press(64'b11111, 5, 1'b1);
    press({64{1'b1}}, 40, 1'b1);
    press(64'b1010101, 7, 1'b0);
    // a glitch, one low edge, then a held press: the pulse counts from the
    // held part, which starts at edge 3, so it rises after edge 5
    press(64'b1111111101, 10, 1'b1, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
