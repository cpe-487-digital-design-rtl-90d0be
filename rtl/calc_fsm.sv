// Controller of the hexadecimal calculator.
//
// Two 16-bit registers hold the numbers: acc, the first number and later the
// result, and operand, the second number. Hex digits from the keypad are
// shifted in from the right (the oldest digit falls out of the top after four
// digits). The controller steps once per sm_en tick:
//
//   ENTER_ACC   key   -> acc = {acc[11:0], key}, go to ACC_RELEASE
//               "+"   -> remember add,      go to START_OP
//               "-"   -> remember subtract, go to START_OP
//   ACC_RELEASE no key -> ENTER_ACC
//   START_OP    key   -> operand = key, go to OP_RELEASE
//   OP_RELEASE  no key -> ENTER_OP
//   ENTER_OP    "="   -> acc = acc + operand or acc - operand, go to SHOW_RESULT
//               key   -> operand = {operand[11:0], key}, go to OP_RELEASE
//   SHOW_RESULT key   -> acc = key (new calculation), go to ACC_RELEASE
//
// Where several inputs are active the key wins over "+" and "+" over "-" in
// ENTER_ACC, and "=" wins over a key in ENTER_OP. Results wrap modulo 2^16:
// a carry out of an addition and a borrow out of a subtraction are dropped,
// so 0001 - 0002 shows FFFF. The display output is acc, except in OP_RELEASE
// and ENTER_OP, and in START_OP while a key is down, where it is operand.
// clear (rst) asynchronously zeroes both registers, selects addition and
// returns to ENTER_ACC.
//
// States, transitions, priorities and the display choice follow the original
// design, which used a derived clock where this version uses the sm_en
// enable. Subtraction is the extension the original proposes (a register
// remembering "+" or "-", tested on "="); its priority below "+" is this
// version's choice.
//
// Timing: inputs are sampled only in sm_en cycles; registers and state change
// at the clock edge closing that cycle. display is combinational.
module calc_fsm
  import hexcalc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,       // "clear" button, asynchronous, active high
  input  logic        sm_en,     // one-cycle step enable
  input  logic        kp_hit,    // a keypad key is down
  input  digit_t      kp_value,  // its hex value
  input  logic        bt_plus,   // "+" button
  input  logic        bt_minus,  // "-" button
  input  logic        bt_eq,     // "=" button
  output word_t       display,   // word to show on the 7-segment display
  output calc_state_t state      // present state, for observation
);

  calc_state_t pr_state, nx_state;
  word_t       acc, nx_acc;
  word_t       operand, nx_operand;
  calc_op_t    op, nx_op;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pr_state <= ENTER_ACC;
      acc      <= '0;
      operand  <= '0;
      op       <= OP_ADD;
    end else if (sm_en) begin
      pr_state <= nx_state;
      acc      <= nx_acc;
      operand  <= nx_operand;
      op       <= nx_op;
    end
  end

  always_comb begin
    nx_state   = pr_state;
    nx_acc     = acc;
    nx_operand = operand;
    nx_op      = op;
    display    = acc;
    unique case (pr_state)
      ENTER_ACC: begin
        if (kp_hit) begin
          nx_acc   = {acc[DATA_W-DIGIT_W-1:0], kp_value};
          nx_state = ACC_RELEASE;
        end else if (bt_plus) begin
          nx_op    = OP_ADD;
          nx_state = START_OP;
        end else if (bt_minus) begin
          nx_op    = OP_SUB;
          nx_state = START_OP;
        end
      end
      ACC_RELEASE: begin
        if (!kp_hit) nx_state = ENTER_ACC;
      end
      START_OP: begin
        if (kp_hit) begin
          nx_operand = word_t'(kp_value);
          nx_state   = OP_RELEASE;
          display    = operand;
        end
      end
      OP_RELEASE: begin
        display = operand;
        if (!kp_hit) nx_state = ENTER_OP;
      end
      ENTER_OP: begin
        display = operand;
        if (bt_eq) begin
          nx_acc   = (op == OP_SUB) ? acc - operand : acc + operand;
          nx_state = SHOW_RESULT;
        end else if (kp_hit) begin
          nx_operand = {operand[DATA_W-DIGIT_W-1:0], kp_value};
          nx_state   = OP_RELEASE;
        end
      end
      SHOW_RESULT: begin
        if (kp_hit) begin
          nx_acc   = word_t'(kp_value);
          nx_state = ACC_RELEASE;
        end
      end
      default: nx_state = ENTER_ACC;
    endcase
  end

  assign state = pr_state;

endmodule
