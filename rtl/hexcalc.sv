// Four-digit hexadecimal calculator for an FPGA board with a 4x4 keypad,
// four push-buttons and four multiplexed 7-segment displays.
//
// The user types a hex number on the keypad, presses "+" or "-", types a
// second number and presses "="; the sum or difference (modulo 2^16) is
// shown. "clear" zeroes the calculator at any time. Four blocks make it up:
//   timebase  - counter on the 50 MHz clock giving the keypad sampling tick
//               (every 2^16 cycles, 1.31 ms), the controller step
//               tick (2^21 cycles, 41.9 ms) and the digit select (381 Hz)
//   keypad    - walks a low level across the keypad columns, reads the rows
//               and reports the key held down (hit, value)
//   calc_fsm  - the calculator controller with its accumulator and operand
//   leddec16  - shows the controller's display word, one digit at a time
// The controller's slow step rate is what debounces the keys and buttons: it
// looks at them only once per 41.9 ms, and after each digit waits for the
// key to be released.
//
// Structure, rates and pin roles follow the original design. This version
// runs everything on the one 50 MHz clock with enables instead of clocks
// taken from counter bits, and the clear button also resets the timebase and
// the keypad scanner, which the original left free-running from power-up.
// The buttons and keypad rows are used without synchronising flip-flops, as
// in the original; they are sampled only at the slow enables.
//
// Ports: clk_50MHz; bt_clr, bt_plus, bt_minus, bt_eq (active-high buttons);
// KB_col[4:1] out and KB_row[4:1] in (keypad matrix, active low);
// SEG7_anode[3:0] and SEG7_seg[6:0] (active low, segments {a..g} = [6:0]).
module hexcalc
  import hexcalc_pkg::*;
#(
  parameter int unsigned CNT_W       = 21,   // timing counter width
  parameter int unsigned KP_BIT      = 15,   // counter bit clocking the keypad scan
  parameter int unsigned SM_BIT      = 20,   // counter bit clocking the controller
  parameter int unsigned MPX_LSB     = 17,   // low bit of the display digit select
  parameter bit          LZ_SUPPRESS = 1'b1  // blank leading zeros on the display
) (
  input  logic       clk_50MHz,
  input  logic       bt_clr,
  input  logic       bt_plus,
  input  logic       bt_minus,
  input  logic       bt_eq,
  output logic [4:1] KB_col,
  input  logic [4:1] KB_row,
  output logic [3:0] SEG7_anode,
  output logic [6:0] SEG7_seg
);

  logic        kp_tick, sm_tick;
  logic [1:0]  led_mpx;
  logic        kp_hit;
  digit_t      kp_value;
  word_t       display;

  timebase #(
    .CNT_W  (CNT_W),
    .KP_BIT (KP_BIT),
    .SM_BIT (SM_BIT),
    .MPX_LSB(MPX_LSB)
  ) u_timebase (
    .clk    (clk_50MHz),
    .rst    (bt_clr),
    .kp_tick(kp_tick),
    .sm_tick(sm_tick),
    .led_mpx(led_mpx)
  );

  keypad u_keypad (
    .clk    (clk_50MHz),
    .rst    (bt_clr),
    .samp_en(kp_tick),
    .col    (KB_col),
    .row    (KB_row),
    .value  (kp_value),
    .hit    (kp_hit)
  );

  calc_fsm u_calc (
    .clk     (clk_50MHz),
    .rst     (bt_clr),
    .sm_en   (sm_tick),
    .kp_hit  (kp_hit),
    .kp_value(kp_value),
    .bt_plus (bt_plus),
    .bt_minus(bt_minus),
    .bt_eq   (bt_eq),
    .display (display),
    .state   ()
  );

  leddec16 #(.LZ_SUPPRESS(LZ_SUPPRESS)) u_led (
    .dig  (led_mpx),
    .data (display),
    .anode(SEG7_anode),
    .seg  (SEG7_seg)
  );

endmodule
