// Full-size testbench of the calculator: the design at its default timing
// (keypad tick every 2^16 cycles, controller step every 2^21 cycles, digit
// change every 2^17 cycles, i.e. the 50 MHz board rates) goes through one
// complete calculation as a user would make it: clear, type A7, press "+",
// type 5C, press "=". The display must show "0", "A7", "A7", "5C" and finally
// "103" (0xA7 + 0x5C), then 103 - 1F4 (typed after "-") must wrap to "FF0F".
// About 110 million clock cycles are simulated.
module tb_hexcalc_full;
  import hexcalc_tb_pkg::*;

  logic       clk = 1'b0;
  logic       bt_clr, bt_plus, bt_minus, bt_eq;
  logic [4:1] kb_col, kb_row;
  logic [3:0] anode;
  logic [6:0] seg;

  int checks = 0, failures = 0;

  hexcalc dut (
    .clk_50MHz(clk), .bt_clr, .bt_plus, .bt_minus, .bt_eq,
    .KB_col(kb_col), .KB_row(kb_row), .SEG7_anode(anode), .SEG7_seg(seg));

  hexcalc_user #(.SM_PERIOD(1 << 21), .MPX_LSB(17)) user (
    .clk, .bt_clr, .bt_plus, .bt_minus, .bt_eq, .kb_col, .kb_row, .anode, .seg);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check_shown(input string want, input string what);
    string got;
    user.read_text(got);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: %s: display \"%s\", expected \"%s\"", what, got, want);
    end
  endtask

  initial begin
    #(64'd150_000_000 * 20);  // 150,000,000 clock cycles
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    user.wait_cycles(10);
    user.clear();
    check_shown("0", "after clear");
    user.press_key(4'hA);
    user.press_key(4'h7);
    check_shown("A7", "first number");
    user.press_button(0);
    check_shown("A7", "after +");
    user.press_key(4'h5);
    user.press_key(4'hC);
    check_shown("5C", "second number");
    user.press_button(2);
    check_shown("103", "A7 + 5C");
    // The result is the first number of the next calculation only through
    // the keypad, so type it again and subtract.
    user.press_key(4'h1);
    user.press_key(4'h0);
    user.press_key(4'h3);
    user.press_button(1);
    user.press_key(4'h1);
    user.press_key(4'hF);
    user.press_key(4'h4);
    user.press_button(2);
    check_shown("FF0F", "103 - 1F4");
    checks++;
    if (user.bad_display != 0) begin
      failures++;
      $display("FAIL: %0d malformed display rounds", user.bad_display);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
