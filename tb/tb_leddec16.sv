// Self-checking testbench of the 7-segment display driver.
//
// Two instances, one with leading zero suppression and one without, see the
// same word and digit select. For every digit position of a set of words
// (all digit values in all positions, words with 0..4 leading zeros, random
// words) the anode code and the segment code are compared with values built
// from the segment letters of each digit and from the blanking rule.
module tb_leddec16;
  import hexcalc_tb_pkg::*;

  logic [1:0]  dig;
  logic [15:0] data;
  logic [3:0]  anode_lz, anode_all;
  logic [6:0]  seg_lz, seg_all;

  int checks = 0, failures = 0;

  leddec16 #(.LZ_SUPPRESS(1'b1)) dut_lz  (.dig, .data, .anode(anode_lz),  .seg(seg_lz));
  leddec16 #(.LZ_SUPPRESS(1'b0)) dut_all (.dig, .data, .anode(anode_all), .seg(seg_all));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic try_word(input logic [15:0] w);
    string txt;
    int    ndig;
    txt  = shown_text(w, 1'b1);
    ndig = txt.len();
    data = w;
    for (int d = 0; d < 4; d++) begin
      logic [3:0] on_code;
      int nib;
      dig = 2'(d);
      #1;
      nib = (w >> (4 * d)) & 15;
      on_code = 4'b1111;
      on_code[d] = 1'b0;
      check(seg_lz == seg_pattern(nib) && seg_all == seg_pattern(nib),
            $sformatf("word %h digit %0d: segments %b / %b", w, d, seg_lz, seg_all));
      check(anode_all == on_code, $sformatf("word %h digit %0d: anode %b (no suppression)", w, d, anode_all));
      // Digit d is shown only if the suppressed text is longer than d digits.
      check(anode_lz == (d < ndig ? on_code : 4'b1111),
            $sformatf("word %h digit %0d: anode %b (suppression)", w, d, anode_lz));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int p = 0; p < 4; p++) try_word(16'(v << (4 * p)));
    try_word(16'h0000); try_word(16'h0023); try_word(16'h0100); try_word(16'hF000);
    try_word(16'h000A); try_word(16'h0B0C); try_word(16'hFFFF); try_word(16'h1000);
    repeat (200) try_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
