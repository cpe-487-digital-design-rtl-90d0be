// Self-checking testbench of the timing generator.
//
// A small instance (6-bit counter, taps at bits 1, 4 and 2) is checked cycle
// by cycle against a counter kept by the testbench: a tick must be high
// exactly in the cycles after which the tapped bit goes from 0 to 1, and the
// digit select must equal the two tapped bits. An instance with the default
// taps is run for just over two controller periods and the spacing of its
// ticks is checked: 2^16 cycles for the keypad tick, 2^21 for the controller
// tick (1.31 ms and 41.9 ms at 50 MHz), and a change of digit every 2^17
// cycles (381 Hz).
module tb_timebase;

  logic       clk = 1'b0;
  logic       rst;
  logic       kp_s, sm_s, kp_d, sm_d;
  logic [1:0] mpx_s, mpx_d;

  int checks = 0, failures = 0;

  timebase #(.CNT_W(6), .KP_BIT(1), .SM_BIT(4), .MPX_LSB(2)) dut_s (
    .clk, .rst, .kp_tick(kp_s), .sm_tick(sm_s), .led_mpx(mpx_s));
  timebase dut_d (.clk, .rst, .kp_tick(kp_d), .sm_tick(sm_d), .led_mpx(mpx_d));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #(64'd5_000_000 * 10);  // 5,000,000 clock cycles
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;          // cycles since reset, = expected counter value
    int unsigned nxt;
    int last_kp, last_sm, last_mpx, kp_count, sm_count, mpx_count;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    n = 0;
    last_kp = -1; last_sm = -1; last_mpx = 0; kp_count = 0; sm_count = 0; mpx_count = 0;
    for (int unsigned t = 0; t < (1 << 21) * 2 + 1000; t++) begin
      // Small instance, exact comparison.
      nxt = (n + 1) % 64;
      check(kp_s == (((n >> 1) & 1) == 0 && ((nxt >> 1) & 1) == 1), $sformatf("small kp_tick at count %0d", n % 64));
      check(sm_s == (((n >> 4) & 1) == 0 && ((nxt >> 4) & 1) == 1), $sformatf("small sm_tick at count %0d", n % 64));
      check(mpx_s == 2'((n % 64) >> 2), $sformatf("small led_mpx at count %0d", n % 64));
      // Default instance, spacing of events.
      if (kp_d) begin
        if (last_kp >= 0) check(t - last_kp == 65536, $sformatf("kp_tick spacing %0d", t - last_kp));
        last_kp = t; kp_count++;
      end
      if (sm_d) begin
        if (last_sm >= 0) check(t - last_sm == 2097152, $sformatf("sm_tick spacing %0d", t - last_sm));
        last_sm = t; sm_count++;
      end
      if (mpx_d != 2'(last_mpx)) begin
        check(t % 131072 == 0 && mpx_d == 2'(last_mpx + 1), $sformatf("led_mpx step at cycle %0d", t));
        last_mpx = mpx_d; mpx_count++;
      end
      @(posedge clk);
      #1;
      n++;
    end
    check(kp_count == 64, $sformatf("%0d keypad ticks in 2^22 cycles", kp_count));
    check(sm_count == 2, $sformatf("%0d controller ticks in 2^22 cycles", sm_count));
    check(mpx_count == 32, $sformatf("%0d digit changes in 2^22 cycles", mpx_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
