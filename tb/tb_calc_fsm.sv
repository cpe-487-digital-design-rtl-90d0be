// Self-checking testbench of the calculator controller.
//
// The keypad and the buttons are driven as a user would: a key is held for
// two controller steps and released for one, a button is held for one step.
// Random calculations (first and second numbers of 1 to 6 digits, add or
// subtract, started after clear or straight from a shown result) are checked
// against the arithmetic done here: the display must show the digits typed so
// far (last four), the first number while the operation key is pressed, and
// (a + b) or (a - b) modulo 2^16 after "=". Directed cases cover the input
// priorities, a key held over many steps, the display in START_OP while a key
// is down, steps happening only on enable cycles, and the asynchronous clear.
module tb_calc_fsm;
  import hexcalc_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        sm_en;
  logic        kp_hit;
  logic [3:0]  kp_value;
  logic        bt_plus, bt_minus, bt_eq;
  logic [15:0] display;
  calc_state_t state;

  int checks = 0, failures = 0;
  int n_wrap_add = 0, n_wrap_sub = 0, n_long = 0, n_from_result = 0;

  calc_fsm dut (.clk, .rst, .sm_en, .kp_hit, .kp_value, .bt_plus, .bt_minus, .bt_eq,
                .display, .state);

  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc   <= cyc + 1;
    sm_en <= ((cyc + 1) % 4) == 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input int n = 1);
    repeat (n) begin
      @(posedge clk iff sm_en);
      #1;
    end
  endtask

  task automatic key(input logic [3:0] k, input int hold = 2);
    kp_hit = 1'b1; kp_value = k;
    step(hold);
    kp_hit = 1'b0; kp_value = 4'h0;
    step(1);
  endtask

  task automatic button(ref logic b);
    b = 1'b1;
    step(1);
    b = 1'b0;
    step(1);
  endtask

  task automatic clear();
    @(negedge clk);
    rst = 1'b1;
    #2;
    check(display == 16'h0 && state == ENTER_ACC, "clear acts at once");
    @(negedge clk);
    rst = 1'b0;
  endtask

  // Types a number of nd random digits, checks the display after each and
  // returns the value of the last four.
  task automatic type_number(input int nd, output logic [15:0] v);
    v = 16'h0;
    for (int i = 0; i < nd; i++) begin
      logic [3:0] d;
      d = 4'($urandom);
      key(d);
      v = {v[11:0], d};
      check(display == v, $sformatf("after digit %h display %h, expected %h", d, display, v));
    end
    if (nd > 4) n_long++;
  endtask

  initial begin
    #(64'd400_000 * 10);  // 400,000 clock cycles
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, expect_r, prev_b;
    bit sub;
    kp_hit = 1'b0; kp_value = 4'h0; bt_plus = 1'b0; bt_minus = 1'b0; bt_eq = 1'b0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(display == 16'h0 && state == ENTER_ACC, "reset state");

    // Steps happen only on enable cycles.
    step(1);
    kp_hit = 1'b1; kp_value = 4'h9;
    repeat (3) begin
      @(posedge clk); #1;
      if (!sm_en) check(display == 16'h0 && state == ENTER_ACC, "no step without enable");
    end
    step(1);
    check(display == 16'h9 && state == ACC_RELEASE, "digit taken on enable");
    // A key held for many steps gives one digit only.
    step(6);
    check(display == 16'h9 && state == ACC_RELEASE, "held key enters one digit");
    kp_hit = 1'b0;
    step(1);
    check(state == ENTER_ACC, "release returns to ENTER_ACC");

    // Key and "+" together: the key wins.
    kp_hit = 1'b1; kp_value = 4'h3; bt_plus = 1'b1;
    step(1);
    check(display == 16'h93 && state == ACC_RELEASE, "key wins over +");
    kp_hit = 1'b0; bt_plus = 1'b0;
    step(1);
    // "+" and "-" together: addition.
    bt_plus = 1'b1; bt_minus = 1'b1;
    step(1);
    bt_plus = 1'b0; bt_minus = 1'b0;
    check(state == START_OP && display == 16'h93, "+ and - together start an operation");
    // START_OP shows the old operand (zero after clear) while the first key is down.
    kp_hit = 1'b1; kp_value = 4'h5;
    #1;
    check(display == 16'h0, "START_OP with key down shows the previous operand");
    step(1);
    check(state == OP_RELEASE && display == 16'h5, "first operand digit");
    kp_hit = 1'b0;
    step(1);
    check(state == ENTER_OP && display == 16'h5, "ENTER_OP shows operand");
    // "=" and a key together: "=" wins.
    kp_hit = 1'b1; kp_value = 4'h1; bt_eq = 1'b1;
    step(1);
    bt_eq = 1'b0;
    check(state == SHOW_RESULT && display == 16'h98, "= wins over key, add chosen");
    // Buttons do nothing in SHOW_RESULT; the held key starts a new number.
    kp_hit = 1'b0;
    step(1);
    bt_minus = 1'b1; bt_eq = 1'b1;
    step(2);
    bt_minus = 1'b0; bt_eq = 1'b0;
    check(state == SHOW_RESULT && display == 16'h98, "SHOW_RESULT ignores buttons");
    // Asynchronous clear from the middle of a calculation.
    key(4'h4);
    check(display == 16'h4, "new calculation from SHOW_RESULT");
    clear();

    // Random calculations.
    prev_b = 16'h0;
    for (int c = 0; c < 60; c++) begin
      bit from_result;
      int na, nb;
      from_result = (c > 0) && (($urandom % 2) != 0);
      if (!from_result) begin
        clear();
        prev_b = 16'h0;
      end else n_from_result++;
      na = 1 + $urandom % 6;
      nb = 1 + $urandom % 6;
      type_number(na, a);
      check(state == ENTER_ACC, "first number entered");
      sub = ($urandom % 2) != 0;
      if (sub) button(bt_minus); else button(bt_plus);
      check(state == START_OP && display == a, $sformatf("operation key: display %h, expected %h", display, a));
      // Display before the first operand digit is taken.
      kp_hit = 1'b1; kp_value = 4'h0;
      #1;
      check(display == prev_b, $sformatf("START_OP key down shows %h, expected %h", display, prev_b));
      kp_hit = 1'b0;
      type_number(nb, b);
      check(state == ENTER_OP, "second number entered");
      button(bt_eq);
      expect_r = sub ? a - b : a + b;
      if (!sub && {1'b0, a} + {1'b0, b} > 17'hFFFF) n_wrap_add++;
      if (sub && b > a) n_wrap_sub++;
      check(state == SHOW_RESULT && display == expect_r,
            $sformatf("%h %s %h = %h, expected %h", a, sub ? "-" : "+", b, display, expect_r));
      prev_b = b;
    end
    check(n_wrap_add > 0 && n_wrap_sub > 0 && n_long > 0 && n_from_result > 0,
          $sformatf("coverage: add carry %0d, sub borrow %0d, long numbers %0d, from result %0d",
                    n_wrap_add, n_wrap_sub, n_long, n_from_result));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
