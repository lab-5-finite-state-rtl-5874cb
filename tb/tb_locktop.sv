// tb_locktop: end-to-end self-checking test of the board-level lock, with
// every parameter at its default (combination 01-11, 8 status lights).
//
// The raw ENTER button is pressed for several cycles at a time, as a
// person would, with some one-cycle glitches in between. The test runs the
// lock's check-off scenarios (a)-(g) and then random button activity.
// A model in the testbench follows the design independently: the debounced
// ENTER is high in the cycle after the button has been seen high on exactly
// two successive edges, and the lock steps through the truth table of
// lock_truth_pkg. Every cycle both controllers' state, OPEN, ERROR and
// lights are compared with it. The test also counts how often each
// behaviour of the lock happened and fails any that never did: entering a
// right and a wrong first number, opening, an error from the first and
// from the second number, ENTER ignored while open and while in error,
// RESET after a right and after a wrong first number and while open, a
// rejected glitch and a long press giving a single ENTER. One press lasts
// 16000 cycles, a 1 ms press at a 16 MHz clock.
module tb_locktop;
  import lock_truth_pkg::*;

  localparam int LIGHTS = 8;

  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic       reset_btn, enter_btn;
  logic [1:0] code;

  logic              enc_open, enc_error, oh_open, oh_error;
  logic [2:0]        enc_state, oh_state;
  logic [LIGHTS-1:0] enc_leds, oh_leds;

  locktop dut (
    .clk(clk), .reset_btn(reset_btn), .enter_btn(enter_btn), .code(code),
    .enc_open(enc_open), .enc_error(enc_error), .enc_state(enc_state), .enc_leds(enc_leds),
    .oh_open(oh_open), .oh_error(oh_error), .oh_state(oh_state), .oh_leds(oh_leds)
  );

  always #5 clk = ~clk;

  // ---- model ----
  int         run = 0;      // successive edges the button was seen high
  logic       m_enter = 0;  // debounced ENTER
  logic [2:0] m_state = 3'b000;
  bit         checking = 0;

  // behaviour counters
  typedef enum int {
    EV_FIRST_OK, EV_FIRST_BAD, EV_OPENED, EV_ERR_SECOND, EV_ERR_AFTER_BAD,
    EV_ENTER_OPEN, EV_ENTER_ERROR, EV_RESET_FIRST_OK, EV_RESET_FIRST_BAD,
    EV_RESET_OPEN, EV_GLITCH, EV_LONG_PRESS, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  localparam string EV_NAMES [EV_COUNT] = '{
    "right first number", "wrong first number", "lock opened",
    "error from second number", "error after wrong first number",
    "ENTER ignored while open", "ENTER ignored in error",
    "RESET after right first number", "RESET after wrong first number",
    "RESET while open", "glitch rejected", "long press, single ENTER"};

  always @(posedge clk) begin
    logic e, o;
    logic [2:0] n;
    logic c1, c2;
    c1 = code == 2'b01;
    c2 = code == 2'b11;
    if (checking) begin
      if (reset_btn) begin
        if (m_state == 3'b001) events[EV_RESET_FIRST_OK]++;
        if (m_state == 3'b101) events[EV_RESET_FIRST_BAD]++;
        if (m_state == 3'b010) events[EV_RESET_OPEN]++;
      end else if (m_enter) begin
        unique case (m_state)
          3'b000:  events[c1 ? EV_FIRST_OK : EV_FIRST_BAD]++;
          3'b001:  events[c2 ? EV_OPENED : EV_ERR_SECOND]++;
          3'b101:  events[EV_ERR_AFTER_BAD]++;
          3'b010:  events[EV_ENTER_OPEN]++;
          3'b110:  events[EV_ENTER_ERROR]++;
          default: ;
        endcase
      end
    end
    void'(lookup(reset_btn, m_enter, c1, c2, m_state, n, e, o));
    m_state <= n;
    m_enter <= (run == 2);
    run     <= enter_btn ? run + 1 : 0;
  end

  always @(negedge clk) begin
    if (checking) begin
      logic e, o;
      logic [2:0] n;
      logic [LIGHTS-1:0] leds;
      #1;
      void'(lookup(reset_btn, m_enter, code == 2'b01, code == 2'b11, m_state, n, e, o));
      leds = '1;
      leds[0] = o;
      leds[1] = e;
      checks += 2;
      if (enc_state !== m_state || enc_open !== o || enc_error !== e || enc_leds !== leds) begin
        failures++;
        $display("FAIL encoded at %0t: state=%b open=%b error=%b leds=%b, model %b %b %b %b",
                 $time, enc_state, enc_open, enc_error, enc_leds, m_state, o, e, leds);
      end
      if (oh_state !== m_state || oh_open !== o || oh_error !== e || oh_leds !== leds) begin
        failures++;
        $display("FAIL one-hot at %0t: state=%b open=%b error=%b leds=%b, model %b %b %b %b",
                 $time, oh_state, oh_open, oh_error, oh_leds, m_state, o, e, leds);
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus ----
  task automatic press(int len, int gap = 4);
    @(negedge clk);
    enter_btn = 1'b1;
    repeat (len) @(negedge clk);
    enter_btn = 1'b0;
    repeat (gap) @(negedge clk);
    if (len == 1) events[EV_GLITCH]++;
    if (len >= 10) events[EV_LONG_PRESS]++;
  endtask

  task automatic enter_code(logic [1:0] c);
    @(negedge clk);
    code = c;
    press(2 + $urandom % 20);
  endtask

  task automatic push_reset();
    @(negedge clk);
    reset_btn = 1'b1;
    repeat (2) @(negedge clk);
    reset_btn = 1'b0;
  endtask

  task automatic expect_state(string scen, logic [2:0] st);
    #2;
    checks++;
    if (enc_state !== st || oh_state !== st) begin
      failures++;
      $display("FAIL scenario %s: states %b %b, expected %b", scen, enc_state, oh_state, st);
    end
  endtask

  initial begin
    reset_btn = 1'b1;
    enter_btn = 1'b0;
    code      = 2'b00;
    repeat (4) @(negedge clk);  // settles the debouncer and clears the state
    checking = 1;
    reset_btn = 1'b0;

    push_reset(); enter_code(2'b00); enter_code(2'b11); expect_state("a", 3'b110);
    push_reset(); enter_code(2'b01); enter_code(2'b10); expect_state("b", 3'b110);
    push_reset(); enter_code(2'b11); enter_code(2'b01); expect_state("c", 3'b110);
    push_reset(); enter_code(2'b01); push_reset(); expect_state("d", 3'b000);
    enter_code(2'b10); push_reset(); expect_state("e", 3'b000);
    // glitches on ENTER are not presses
    code = 2'b01;
    press(1); press(1); expect_state("glitch", 3'b000);
    enter_code(2'b01); enter_code(2'b11); expect_state("g", 3'b010);
    @(negedge clk);
    code = 2'b01;
    press(30); expect_state("f open", 3'b010);
    // a 1 ms press at a 16 MHz clock: 16000 cycles, still one ENTER
    code = 2'b11;
    press(16_000); expect_state("1 ms press", 3'b010);
    push_reset(); expect_state("reset open", 3'b000);
    enter_code(2'b10); enter_code(2'b10); enter_code(2'b11); expect_state("f error", 3'b110);
    push_reset();
    // random activity
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      code = 2'($urandom);
      if ($urandom % 10 == 0) push_reset();
      press(1 + $urandom % 6, $urandom % 4);
    end

    foreach (events[i]) begin
      checks++;
      if (events[i] == 0) begin
        failures++;
        $display("FAIL never happened: %s", EV_NAMES[i]);
      end else begin
        $display("%-32s %0d", EV_NAMES[i], events[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
