// Scanner and decoder for a 4x4 hexadecimal key matrix.
//
// The matrix connects a row line to a column line where a key is pressed.
// The rows are pulled high on the keypad board. On every sampling tick the
// scanner holds exactly one column line low (codes 1110, 1101, 1011, 0111 for
// columns 1..4 in turn), and stores the row lines of the column that was low
// during the past tick period into that column's 4-bit vector, then moves on
// to the next column. Any code other than the four valid ones returns the
// scanner to column 1. A '0' in a stored vector means a key of that column is
// down. The decoder searches the four vectors, column 1 first and row 1 first
// within a column, and outputs the hex value of the first key found with
// hit = 1; with no key down hit = 0 and value = 0. One key at a time is
// expected; with several, the first in that search order wins.
//
// The key layout (rows top to bottom, columns left to right) is
//     1 2 3 A
//     4 5 6 B
//     7 8 9 C
//     0 F E D
// Scanning, search order and layout follow the original design. The use of a
// clock enable instead of a derived sampling clock, and the reset (all vectors
// "no key", column 1) in place of power-up initial values, are choices of this
// version.
//
// Timing: one column per samp_en tick; a key press or release is reflected in
// hit/value at the latest four ticks later. value and hit are combinational
// from the stored vectors, so they change only just after a tick.
module keypad (
  input  logic       clk,
  input  logic       rst,      // asynchronous, active high
  input  logic       samp_en,  // one-cycle sampling tick
  output logic [4:1] col,      // column lines, the active column is low
  input  logic [4:1] row,      // row lines, low where a key connects to the active column
  output logic [3:0] value,    // hex value of the key held down
  output logic       hit       // a key is held down
);

  // Row vectors captured per column, index = column number.
  logic [4:1] cv [1:4];
  logic [4:1] curr_col;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      curr_col <= 4'b1110;
      for (int c = 1; c <= 4; c++) cv[c] <= 4'b1111;
    end else if (samp_en) begin
      unique case (curr_col)
        4'b1110: begin cv[1] <= row; curr_col <= 4'b1101; end
        4'b1101: begin cv[2] <= row; curr_col <= 4'b1011; end
        4'b1011: begin cv[3] <= row; curr_col <= 4'b0111; end
        4'b0111: begin cv[4] <= row; curr_col <= 4'b1110; end
        default: curr_col <= 4'b1110;
      endcase
    end
  end

  assign col = curr_col;

  // Hex value of the key at (row r, column c), r and c counted from 1.
  function automatic logic [3:0] key_at(input int unsigned r, input int unsigned c);
    logic [3:0] layout [4][4];
    layout = '{'{4'h1, 4'h2, 4'h3, 4'hA},
               '{4'h4, 4'h5, 4'h6, 4'hB},
               '{4'h7, 4'h8, 4'h9, 4'hC},
               '{4'h0, 4'hF, 4'hE, 4'hD}};
    return layout[r-1][c-1];
  endfunction

  always_comb begin
    hit   = 1'b0;
    value = 4'h0;
    for (int c = 4; c >= 1; c--) begin
      for (int r = 4; r >= 1; r--) begin
        // Scanned from the end of the search order, so the first key found wins.
        if (!cv[c][r]) begin
          hit   = 1'b1;
          value = key_at(r, c);
        end
      end
    end
  end

endmodule
