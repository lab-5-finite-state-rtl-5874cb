// tb_lock_ctrl: self-checking test of the lock controller in both state
// assignments.
//
// An encoded and a one-hot controller for combination 01-11, and a
// one-hot controller for combination 10-00, share clock, RESET and ENTER.
// The test runs the lock's check-off scenarios:
//   (a) first number wrong   (b) second number wrong   (c) both wrong
//   (d) RESET after a right first number
//   (e) RESET after a wrong first number
//   (f) ENTER in the open and in the error state changes nothing
//   (g) the right combination opens the lock
// plus RESET while open (outputs drop at once) and switch changes without
// ENTER (ignored). Every cycle, each controller's state, OPEN and ERROR are
// compared with a model that steps the truth table of lock_truth_pkg; after
// each scenario the expected end state is also checked by hand-written
// value. ENTER is a one-cycle pulse, as the debouncer delivers it.
module tb_lock_ctrl;
  import lock_pkg::*;
  import lock_truth_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic       reset, enter;
  logic [1:0] code;

  logic       open_e, err_e, open_o, err_o, open_b, err_b;
  logic [2:0] st_e, st_o, st_b;

  lock_ctrl #(.ENCODING(ENC_BINARY)) dut_enc (
    .clk(clk), .reset(reset), .enter(enter), .code(code),
    .open_lock(open_e), .error(err_e), .state_num(st_e));
  lock_ctrl #(.ENCODING(ENC_ONEHOT)) dut_oh (
    .clk(clk), .reset(reset), .enter(enter), .code(code),
    .open_lock(open_o), .error(err_o), .state_num(st_o));
  lock_ctrl #(.ENCODING(ENC_ONEHOT), .FIRST(2'b10), .SECOND(2'b00)) dut_alt (
    .clk(clk), .reset(reset), .enter(enter), .code(code),
    .open_lock(open_b), .error(err_b), .state_num(st_b));

  always #5 clk = ~clk;

  // models: combination 01-11 and combination 10-00
  logic [2:0] m_std, m_alt;
  bit         models_valid = 0;

  always @(posedge clk) begin
    logic e, o;
    logic [2:0] n;
    void'(lookup(reset, enter, code == 2'b01, code == 2'b11, m_std, n, e, o));
    m_std <= n;
    void'(lookup(reset, enter, code == 2'b10, code == 2'b00, m_alt, n, e, o));
    m_alt <= n;
    if (reset) models_valid <= 1;
  end

  task automatic compare(string who, logic [2:0] m, logic [1:0] c1, logic [1:0] c2,
                         logic [2:0] st, logic op, logic er);
    logic e, o;
    logic [2:0] n;
    void'(lookup(reset, enter, code == c1, code == c2, m, n, e, o));
    checks++;
    if (st !== m || op !== o || er !== e) begin
      failures++;
      $display("FAIL %s at %0t: state=%b open=%b error=%b, model %b %b %b",
               who, $time, st, op, er, m, o, e);
    end
  endtask

  always @(negedge clk) begin
    if (models_valid) begin
      #1;
      compare("encoded",       m_std, 2'b01, 2'b11, st_e, open_e, err_e);
      compare("one-hot",       m_std, 2'b01, 2'b11, st_o, open_o, err_o);
      compare("one-hot 10-00", m_alt, 2'b10, 2'b00, st_b, open_b, err_b);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1;
    enter = 1'b0;
    @(negedge clk);
    reset = 1'b0;
  endtask

  // set the switches, press ENTER for one cycle, then wiggle the switches
  // for a few cycles without ENTER
  task automatic enter_code(logic [1:0] c);
    @(negedge clk);
    code  = c;
    enter = 1'b1;
    @(negedge clk);
    enter = 1'b0;
    repeat (3) begin
      code = 2'($urandom);
      @(negedge clk);
    end
  endtask

  // hand-written end-of-scenario check on the two 01-11 controllers
  task automatic expect_end(string scen, logic [2:0] st, logic op, logic er);
    #2;
    checks++;
    if (st_e !== st || open_e !== op || err_e !== er ||
        st_o !== st || open_o !== op || err_o !== er) begin
      failures++;
      $display("FAIL scenario %s: enc %b/%b/%b one-hot %b/%b/%b, expected %b/%b/%b",
               scen, st_e, open_e, err_e, st_o, open_o, err_o, st, op, er);
    end
  endtask

  initial begin
    reset = 1'b1;
    enter = 1'b0;
    code  = 2'b00;
    repeat (2) @(negedge clk);

    do_reset(); enter_code(2'b10); enter_code(2'b11); expect_end("a", 3'b110, 1'b0, 1'b1);
    do_reset(); enter_code(2'b01); enter_code(2'b00); expect_end("b", 3'b110, 1'b0, 1'b1);
    do_reset(); enter_code(2'b00); enter_code(2'b10); expect_end("c", 3'b110, 1'b0, 1'b1);
    do_reset(); enter_code(2'b01); expect_end("d before", 3'b001, 1'b0, 1'b0);
    do_reset(); expect_end("d", 3'b000, 1'b0, 1'b0);
    enter_code(2'b11); expect_end("e before", 3'b101, 1'b0, 1'b0);
    do_reset(); expect_end("e", 3'b000, 1'b0, 1'b0);
    enter_code(2'b01); enter_code(2'b11); expect_end("g", 3'b010, 1'b1, 1'b0);
    enter_code(2'b00); enter_code(2'b01); expect_end("f open", 3'b010, 1'b1, 1'b0);
    // RESET while open: OPEN must drop in the same cycle
    @(negedge clk);
    reset = 1'b1;
    #1;
    checks++;
    if (open_e !== 1'b0 || open_o !== 1'b0) begin
      failures++;
      $display("FAIL OPEN not forced low by RESET");
    end
    @(negedge clk);
    reset = 1'b0;
    enter_code(2'b11); enter_code(2'b11); expect_end("f error", 3'b110, 1'b0, 1'b1);
    enter_code(2'b01); enter_code(2'b11); expect_end("f error again", 3'b110, 1'b0, 1'b1);
    // the 10-00 controller opens with its own combination
    do_reset(); enter_code(2'b10); enter_code(2'b00);
    #2;
    checks++;
    if (st_b !== 3'b010 || open_b !== 1'b1 || st_e !== 3'b110) begin
      failures++;
      $display("FAIL combination 10-00: state %b open %b, 01-11 state %b", st_b, open_b, st_e);
    end
    // random sequences, checked against the model every cycle
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      reset = ($urandom % 8) == 0;
      enter = ($urandom % 3) == 0;
      code  = 2'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
