// Behavioural model of a 16-key matrix keypad board (4 row and 4 column
// lines, rows pulled up). A pressed key connects its row line to its column
// line, so a row reads low when a pressed key in it sits on a column that is
// driven low. Up to two keys can be held at once (key_a, key_b with their
// down flags). The layout, rows from top:
//     1 2 3 A / 4 5 6 B / 7 8 9 C / 0 F E D
module pmodkypd_model (
  input  logic [4:1] col,     // column lines driven by the scanner
  output logic [4:1] row,     // row lines read by the scanner
  input  logic       down_a,
  input  logic [3:0] key_a,
  input  logic       down_b,
  input  logic [3:0] key_b
);

  localparam string LAYOUT [4] = '{"123a", "456b", "789c", "0fed"};

  // Row and column (1..4) of a key, from the printed layout.
  function automatic void locate(input logic [3:0] k, output int r, output int c);
    string name;
    name = $sformatf("%h", k);
    r = 0; c = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (LAYOUT[i][j] == name[0]) begin r = i + 1; c = j + 1; end
  endfunction

  always_comb begin
    int ra, ca, rb, cb;
    locate(key_a, ra, ca);
    locate(key_b, rb, cb);
    row = 4'b1111;
    if (down_a && !col[ca]) row[ra] = 1'b0;
    if (down_b && !col[cb]) row[rb] = 1'b0;
  end

endmodule
