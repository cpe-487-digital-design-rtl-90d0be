// Testbench helper that plays the user of the calculator board.
//
// It owns the keypad model and the four buttons and reads the multiplexed
// display back. press_key holds a key for two controller periods and then
// releases it for two; press_button holds a button for a little over one
// period and releases it for as long; clear pulses the clear button. read_text
// watches the display for two full multiplexing rounds, decodes each lit
// digit from its segments and returns the text seen, most significant digit
// first, with blank digits left out; it flags a round in which two anodes
// were low at once, a digit whose segments match no hex digit, or a blank
// digit to the right of a lit one. SM_PERIOD and MPX_LSB must match the
// calculator's SM_BIT (period 2^(SM_BIT+1)) and MPX_LSB.
module hexcalc_user
  import hexcalc_tb_pkg::*;
#(
  parameter int unsigned SM_PERIOD = 4096,
  parameter int unsigned MPX_LSB   = 2
) (
  input  logic       clk,
  output logic       bt_clr,
  output logic       bt_plus,
  output logic       bt_minus,
  output logic       bt_eq,
  input  logic [4:1] kb_col,
  output logic [4:1] kb_row,
  input  logic [3:0] anode,
  input  logic [6:0] seg
);

  logic       down;
  logic [3:0] k;
  int         bad_display = 0;
  int         lit_digits_max = 0;

  pmodkypd_model kp (.col(kb_col), .row(kb_row), .down_a(down), .key_a(k),
                     .down_b(1'b0), .key_b(4'h0));

  initial begin
    down = 1'b0; k = 4'h0;
    bt_clr = 1'b1; bt_plus = 1'b0; bt_minus = 1'b0; bt_eq = 1'b0;
  end

  task automatic wait_cycles(input int unsigned n);
    repeat (n) @(posedge clk);
  endtask

  task automatic press_key(input logic [3:0] key);
    k = key;
    down = 1'b1;
    wait_cycles(2 * SM_PERIOD);
    down = 1'b0;
    wait_cycles(2 * SM_PERIOD);
  endtask

  task automatic press_button(input int which);  // 0 "+", 1 "-", 2 "="
    case (which)
      0: bt_plus = 1'b1;
      1: bt_minus = 1'b1;
      default: bt_eq = 1'b1;
    endcase
    wait_cycles(SM_PERIOD + SM_PERIOD / 4);
    bt_plus = 1'b0; bt_minus = 1'b0; bt_eq = 1'b0;
    wait_cycles(SM_PERIOD + SM_PERIOD / 4);
  endtask

  task automatic clear();
    bt_clr = 1'b1;
    wait_cycles(10);
    bt_clr = 1'b0;
    wait_cycles(10);
  endtask

  task automatic read_text(output string txt);
    int seen [4];
    bit gap;
    int nlit;
    for (int i = 0; i < 4; i++) seen[i] = -2;  // -2: never lit
    repeat (2 * 4 * (1 << MPX_LSB)) begin
      @(posedge clk);
      #1;
      if ($countones(~anode) > 1) bad_display++;
      for (int i = 0; i < 4; i++)
        if (!anode[i]) begin
          if (seen[i] != -2 && seen[i] != seg_to_hex(seg)) bad_display++;
          seen[i] = seg_to_hex(seg);
          if (seen[i] < 0) bad_display++;
        end
    end
    txt = "";
    gap = 1'b0;
    nlit = 0;
    for (int i = 3; i >= 0; i--) begin
      if (seen[i] >= 0) begin
        txt = {txt, $sformatf("%h", seen[i][3:0])};
        nlit++;
      end else if (txt.len() > 0) gap = 1'b1;
    end
    if (gap) bad_display++;
    if (nlit > lit_digits_max) lit_digits_max = nlit;
    txt = txt.toupper();
  endtask

endmodule
