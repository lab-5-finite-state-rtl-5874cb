// tb_mydff: self-checking test of the state register.
//
// Random values are put on d of a 3-bit and a 5-bit instance before every
// rising edge; after the edge q must equal the value that was on d, and it
// must not change while the clock is low.
module tb_mydff;

  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [2:0] d3, q3;
  logic [4:0] d5, q5;

  mydff               dut3 (.clk(clk), .d(d3), .q(q3));
  mydff #(.WIDTH(5))  dut5 (.clk(clk), .d(d5), .q(q5));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e3;
    logic [4:0] e5;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      e3 = 3'($urandom);
      e5 = 5'($urandom);
      d3 = e3;
      d5 = e5;
      @(posedge clk);
      #1;
      d3 = ~e3;  // a change after the edge must not reach q
      d5 = ~e5;
      #2;
      checks++;
      if (q3 !== e3 || q5 !== e5) begin
        failures++;
        $display("FAIL cycle %0d: q3=%b q5=%b, expected %b %b", i, q3, q5, e3, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
