// Multiplexed driver for four common-anode 7-segment displays.
//
// The display shows a 16-bit word as four hex digits, one digit at a time.
// The digit select dig (0..3, digit 0 being the rightmost, least significant)
// picks the 4-bit field data[4*dig+3:4*dig], turns it into its active-low
// segment code and takes the anode of that digit low (1110, 1101, 1011, 0111
// for digits 0..3). Cycling dig fast enough makes all four digits appear lit.
//
// With LZ_SUPPRESS set, leading zeros are blanked: a digit's anode is taken
// low only if that digit or a more significant one is non-zero, so 0023 shows
// as "23". Digit 0 is always lit, so a zero word shows as a single "0" rather
// than a dark display; that exception is this version's choice. Digit
// selection, anode and segment codes follow the original design, as does the
// zero suppression rule.
//
// Interface: dig, data in; anode, seg out (both active low). Purely
// combinational.
module leddec16
  import hexcalc_pkg::*;
#(
  parameter bit LZ_SUPPRESS = 1'b1   // blank leading zeros
) (
  input  logic [1:0] dig,     // which digit to show in this multiplexing period
  input  word_t      data,    // four hex digits to show
  output logic [3:0] anode,   // active-low anode of each digit
  output logic [6:0] seg      // active-low segments {a,b,c,d,e,f,g}
);

  digit_t data4;
  logic   lit;

  assign data4 = data[DIGIT_W*dig +: DIGIT_W];

  always_comb begin
    // Non-zero bits at or above the selected digit.
    lit = !LZ_SUPPRESS || dig == 2'd0 || (data >> (DIGIT_W*dig)) != '0;
    anode = lit ? ~(4'b0001 << dig) : 4'b1111;
  end

  assign seg = hex_to_seg(data4);

endmodule
