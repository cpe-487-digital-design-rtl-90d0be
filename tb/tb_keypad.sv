// Self-checking testbench of the keypad scanner.
//
// A keypad model sits on the column and row lines. The test checks the
// column walk (1110, 1101, 1011, 0111, one step per sampling tick), then
// presses every key in turn and checks that hit rises with the right value
// within one full scan (four ticks) and falls within four ticks of the
// release. It ends with two keys held at once, where the key met first in a
// column-by-column, row-by-row search must be reported.
module tb_keypad;

  localparam int TICK_PERIOD = 3;  // clock cycles between sampling ticks

  logic       clk = 1'b0;
  logic       rst;
  logic       samp_en;
  logic [4:1] col, row;
  logic [3:0] value;
  logic       hit;
  logic       down_a, down_b;
  logic [3:0] key_a, key_b;

  int checks = 0, failures = 0;

  keypad dut (.clk, .rst, .samp_en, .col, .row, .value, .hit);
  pmodkypd_model kp (.col, .row, .down_a, .key_a, .down_b, .key_b);

  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) begin
    cyc     <= cyc + 1;
    samp_en <= ((cyc + 1) % TICK_PERIOD) == 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_ticks(input int n);
    repeat (n) begin
      @(posedge clk iff samp_en);
      #1;
    end
  endtask

  // Column of a key, written out independently of the model.
  function automatic int col_of(input int k);
    case (k)
      1, 4, 7, 0:        return 1;
      2, 5, 8, 15:       return 2;
      3, 6, 9, 14:       return 3;
      default:           return 4;
    endcase
  endfunction


  initial begin
    #(64'd200_000 * 10);  // 200,000 clock cycles
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic [4:1] expect_col, prev_col;
    down_a = 1'b0; down_b = 1'b0; key_a = 4'h0; key_b = 4'h0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(col == 4'b1110 && !hit && value == 4'h0, "state after reset");

    // Column walk over two full scans.
    for (int i = 1; i <= 8; i++) begin
      wait_ticks(1);
      expect_col = ~(4'b0001 << (i % 4));
      check(col == expect_col, $sformatf("column code %b after %0d ticks, expected %b", col, i, expect_col));
    end

    // Every key alone.
    for (int k = 0; k < 16; k++) begin
      key_a = 4'(k);
      down_a = 1'b1;
      lat = 0;
      prev_col = col;
      while (!hit && lat < 10) begin prev_col = col; wait_ticks(1); lat++; end
      check(hit && lat <= 4, $sformatf("key %h: hit after %0d ticks", k, lat));
      check(value == 4'(k), $sformatf("key %h: value %X", k, value));
      // The key must be seen in the column it sits in.
      // The key must be found while scanning the column it sits in.
      check(prev_col == ~(4'b0001 << (col_of(k) - 1)), $sformatf("key %h found in column code %b", k, prev_col));
      wait_ticks(5);
      check(hit && value == 4'(k), $sformatf("key %h: held steady", k));
      down_a = 1'b0;
      lat = 0;
      while (hit && lat < 10) begin wait_ticks(1); lat++; end
      check(!hit && lat <= 4 && value == 4'h0, $sformatf("key %h: released after %0d ticks", k, lat));
    end

    // Two keys: column 1 before column 2, row 1 before row 4 in a column.
    key_a = 4'h5; key_b = 4'h7; down_a = 1'b1; down_b = 1'b1;
    wait_ticks(5);
    check(hit && value == 4'h7, $sformatf("keys 5+7: value %X, expected 7", value));
    key_a = 4'h0; key_b = 4'h1;
    wait_ticks(5);
    check(hit && value == 4'h1, $sformatf("keys 0+1: value %X, expected 1", value));
    key_a = 4'hD; key_b = 4'hE;
    wait_ticks(5);
    check(hit && value == 4'hE, $sformatf("keys D+E: value %X, expected E", value));
    down_a = 1'b0; down_b = 1'b0;
    wait_ticks(5);
    check(!hit, "all released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
