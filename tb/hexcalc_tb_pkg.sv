// Helpers shared by the calculator testbenches.
//
// The expected 7-segment patterns are built here from the names of the lit
// segments of each hex digit (the usual a..g lettering: a top, b top right,
// c bottom right, d bottom, e bottom left, f top left, g middle), so they do
// not depend on the code table of the design. seg_pattern returns the
// active-low code {a,b,c,d,e,f,g}; seg_to_hex inverts it (-1 when no digit
// matches).
package hexcalc_tb_pkg;

  function automatic string lit_segments(input int d);
    case (d)
      0: return "abcdef";   1: return "bc";      2: return "abdeg";   3: return "abcdg";
      4: return "bcfg";     5: return "acdfg";   6: return "acdefg";  7: return "abc";
      8: return "abcdefg";  9: return "abcdfg";  10: return "abcefg"; 11: return "cdefg";
      12: return "adef";    13: return "bcdeg";  14: return "adefg";  15: return "aefg";
      default: return "";
    endcase
  endfunction

  function automatic logic [6:0] seg_pattern(input int d);
    logic [6:0] s;
    string      l;
    s = 7'b111_1111;
    l = lit_segments(d);
    for (int i = 0; i < l.len(); i++) s[6 - (l[i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic int seg_to_hex(input logic [6:0] s);
    for (int d = 0; d < 16; d++) if (seg_pattern(d) == s) return d;
    return -1;
  endfunction

  // Text a 4-digit display shows for w: upper-case hex, leading zeros blank
  // when lz is set, digit 0 always shown.
  function automatic string shown_text(input logic [15:0] w, input bit lz);
    string t;
    t = $sformatf("%04h", w);
    t = t.toupper();
    if (lz) while (t.len() > 1 && t[0] == "0") t = t.substr(1, t.len() - 1);
    return t;
  endfunction

endpackage
