// End-to-end testbench of the calculator, at reduced timing.
//
// The calculator runs with a short timing counter (keypad tick every 4
// cycles, controller step every 256 cycles, digit change every 4 cycles) so
// that many calculations fit in a short simulation. A simulated user types on
// a keypad model, presses the buttons and reads the multiplexed display.
// Every calculation is random: first and second numbers of 1 to 6 digits,
// "+" or "-", sometimes started from a shown result instead of after clear.
// After each digit and after "=" the text on the display is compared with the
// expected number written with leading zeros blanked. The test counts how
// often each mechanism happened and fails if one never did: digit entry,
// numbers longer than four digits, addition, subtraction, a carry dropped, a
// borrow dropped, a key held over several controller steps, a calculation
// started from a result, clear, leading zero blanking and all four digits lit.
module tb_hexcalc;
  import hexcalc_tb_pkg::*;

  localparam int unsigned SM_BIT  = 7;
  localparam int unsigned MPX_LSB = 2;

  logic       clk = 1'b0;
  logic       bt_clr, bt_plus, bt_minus, bt_eq;
  logic [4:1] kb_col, kb_row;
  logic [3:0] anode;
  logic [6:0] seg;

  int checks = 0, failures = 0;
  int n_digit = 0, n_long = 0, n_add = 0, n_sub = 0, n_carry = 0, n_borrow = 0;
  int n_held = 0, n_from_result = 0, n_clear = 0, n_blank = 0;

  hexcalc #(.CNT_W(8), .KP_BIT(1), .SM_BIT(SM_BIT), .MPX_LSB(MPX_LSB)) dut (
    .clk_50MHz(clk), .bt_clr, .bt_plus, .bt_minus, .bt_eq,
    .KB_col(kb_col), .KB_row(kb_row), .SEG7_anode(anode), .SEG7_seg(seg));

  hexcalc_user #(.SM_PERIOD(1 << (SM_BIT + 1)), .MPX_LSB(MPX_LSB)) user (
    .clk, .bt_clr, .bt_plus, .bt_minus, .bt_eq, .kb_col, .kb_row, .anode, .seg);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_shown(input logic [15:0] v, input string what);
    string got, want;
    user.read_text(got);
    want = shown_text(v, 1'b1);
    check(got == want, $sformatf("%s: display \"%s\", expected \"%s\"", what, got, want));
    if (want.len() < 4) n_blank++;
  endtask

  task automatic type_number(input int nd, output logic [15:0] v);
    v = 16'h0;
    for (int i = 0; i < nd; i++) begin
      logic [3:0] d;
      d = 4'($urandom);
      user.press_key(d);
      v = {v[11:0], d};
      n_digit++;
      n_held++;  // each key is held for two controller periods
      expect_shown(v, $sformatf("digit %h", d));
    end
    if (nd > 4) n_long++;
  endtask

  initial begin
    #(64'd4_000_000 * 20);  // 4,000,000 clock cycles
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a, b, r;
    bit sub;
    user.wait_cycles(10);
    user.clear();
    n_clear++;
    expect_shown(16'h0, "after clear");
    for (int c = 0; c < 24; c++) begin
      int na, nb;
      if (c > 0 && ($urandom % 3) == 0) begin
        user.clear();
        n_clear++;
        expect_shown(16'h0, "after clear");
      end else if (c > 0) n_from_result++;
      na = 1 + $urandom % 6;
      nb = 1 + $urandom % 6;
      type_number(na, a);
      sub = ($urandom % 2) != 0;
      user.press_button(sub ? 1 : 0);
      expect_shown(a, "operation key");
      type_number(nb, b);
      user.press_button(2);
      r = sub ? a - b : a + b;
      if (sub) begin n_sub++; if (b > a) n_borrow++; end
      else begin n_add++; if ({1'b0, a} + {1'b0, b} > 17'hFFFF) n_carry++; end
      expect_shown(r, $sformatf("%h %s %h", a, sub ? "-" : "+", b));
    end
    check(user.bad_display == 0, $sformatf("%0d malformed display rounds", user.bad_display));
    check(user.lit_digits_max == 4, "all four digits lit at some point");
    check(n_digit > 0 && n_long > 0 && n_add > 0 && n_sub > 0 && n_carry > 0 && n_borrow > 0 &&
          n_held > 0 && n_from_result > 0 && n_clear > 1 && n_blank > 0,
          "every mechanism exercised");
    $display("mechanisms: digits %0d, long numbers %0d, add %0d, sub %0d, carry %0d, borrow %0d, held keys %0d, from result %0d, clear %0d, blanked %0d",
             n_digit, n_long, n_add, n_sub, n_carry, n_borrow, n_held, n_from_result, n_clear, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
