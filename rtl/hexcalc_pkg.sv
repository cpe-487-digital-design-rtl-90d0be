// Shared types and constants of the hexadecimal calculator.
//
// The calculator works on four hex digits (a 16-bit word). The state type
// lists the six states of the calculator controller: two for entering the
// first number, three for entering the second number, and one for showing
// the result. The operation type records which operation key ("+" or "-")
// started the second number. The 7-segment code function returns the
// active-low segment pattern of one hex digit in the order {a,b,c,d,e,f,g}
// (bit 6 is segment a, bit 0 is segment g), a common-anode display being lit
// by a '0'.
package hexcalc_pkg;

  localparam int unsigned DIGIT_W  = 4;                 // bits per hex digit
  localparam int unsigned N_DIGITS = 4;                 // digits on the display
  localparam int unsigned DATA_W   = DIGIT_W * N_DIGITS; // calculator word width

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [DIGIT_W-1:0] digit_t;

  typedef enum logic [2:0] {
    ENTER_ACC   = 3'd0,  // waiting for the next digit of the first number
    ACC_RELEASE = 3'd1,  // digit taken, waiting for the key to be released
    START_OP    = 3'd2,  // operation chosen, waiting for the first digit of the second number
    OP_RELEASE  = 3'd3,  // operand digit taken, waiting for the key to be released
    ENTER_OP    = 3'd4,  // waiting for the next operand digit or "="
    SHOW_RESULT = 3'd5   // result shown, next digit starts a new calculation
  } calc_state_t;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } calc_op_t;

  // Active-low segment code {a,b,c,d,e,f,g} of one hex digit.
  function automatic logic [6:0] hex_to_seg(input digit_t d);
    logic [6:0] s;
    unique case (d)
      4'h0: s = 7'b000_0001;
      4'h1: s = 7'b100_1111;
      4'h2: s = 7'b001_0010;
      4'h3: s = 7'b000_0110;
      4'h4: s = 7'b100_1100;
      4'h5: s = 7'b010_0100;
      4'h6: s = 7'b010_0000;
      4'h7: s = 7'b000_1111;
      4'h8: s = 7'b000_0000;
      4'h9: s = 7'b000_0100;
      4'hA: s = 7'b000_1000;
      4'hB: s = 7'b110_0000;
      4'hC: s = 7'b011_0001;
      4'hD: s = 7'b100_0010;
      4'hE: s = 7'b011_0000;
      4'hF: s = 7'b011_1000;
      default: s = 7'b111_1111;
    endcase
    return s;
  endfunction

endpackage
