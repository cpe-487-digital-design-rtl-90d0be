// Timing generator of the calculator.
//
// A free-running counter on the system clock supplies all the slower rates
// of the design. Bit KP_BIT is the keypad sampling clock, bit SM_BIT the
// state machine clock and bits MPX_LSB+1:MPX_LSB the display digit select.
// With the default 21-bit counter on a 50 MHz clock this gives a keypad
// sample every 2^16 cycles (1.31 ms), a state machine step every 2^21 cycles
// (41.9 ms) and a digit change every 2^17 cycles (2.62 ms, 381 Hz, each digit
// refreshed 95 times a second). These bit positions are the original design's.
//
// Instead of using counter bits as clocks, this version keeps one clock
// domain: kp_tick and sm_tick are one-cycle enables, high in the cycle whose
// closing clock edge is the one where the corresponding counter bit rises.
// A register enabled by a tick therefore updates at the same edge at which
// the original derived clock would have clocked it.
//
// Interface: clk, rst (asynchronous, active high, clears the counter);
// outputs kp_tick, sm_tick (pulses), led_mpx (2-bit digit select, registered).
module timebase #(
  parameter int unsigned CNT_W   = 21,  // counter width
  parameter int unsigned KP_BIT  = 15,  // counter bit used as keypad sampling clock
  parameter int unsigned SM_BIT  = 20,  // counter bit used as state machine clock
  parameter int unsigned MPX_LSB = 17   // low bit of the 2-bit display digit select
) (
  input  logic       clk,
  input  logic       rst,
  output logic       kp_tick,
  output logic       sm_tick,
  output logic [1:0] led_mpx
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  // Bit b rises at the next edge exactly when bits b..0 read 0111...1.
  function automatic logic rises_next(input logic [CNT_W-1:0] c, input int unsigned b);
    logic [CNT_W-1:0] mask;
    mask = (CNT_W'(1) << (b + 1)) - 1'b1;
    return (c & mask) == (mask >> 1);
  endfunction

  assign kp_tick = rises_next(cnt, KP_BIT);
  assign sm_tick = rises_next(cnt, SM_BIT);
  assign led_mpx = cnt[MPX_LSB +: 2];

  initial begin
    assert (KP_BIT < CNT_W && SM_BIT < CNT_W && MPX_LSB + 1 < CNT_W)
      else $error("timebase: tap bits must lie inside the counter");
  end

endmodule
