// tb_seg_pkg: seven-segment reference for the testbenches, written from the
// lit segment letters of each digit (a = top, b = upper right, c = lower
// right, d = bottom, e = lower left, f = upper left, g = middle), so that it
// does not reuse the design's own table. Patterns are {g..a}, 1 = lit.
package tb_seg_pkg;

  function automatic logic [6:0] from_letters(input string s);
    logic [6:0] p = '0;
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b1;
    return p;
  endfunction

  function automatic logic [6:0] digit_pat(input int d);
    case (d)
      0: return from_letters("abcdef");
      1: return from_letters("bc");
      2: return from_letters("abdeg");
      3: return from_letters("abcdg");
      4: return from_letters("bcfg");
      5: return from_letters("acdfg");
      6: return from_letters("acdefg");
      7: return from_letters("abc");
      8: return from_letters("abcdefg");
      9: return from_letters("abcdfg");
      default: return '0;
    endcase
  endfunction

  localparam logic [6:0] BLANK = 7'b0;
  localparam logic [6:0] MINUS = 7'b1000000;

  // Expected two-digit display of a point value: tens/units patterns and
  // decimal points (tens dp = hundred, units dp = negative).
  function automatic void points_pats(input int v, output logic [6:0] t,
                                      output logic [6:0] u, output logic dpt,
                                      output logic dpu);
    int m = (v < 0) ? -v : v;
    u   = digit_pat(m % 10);
    if (m >= 10) t = digit_pat((m / 10) % 10);
    else if (v < 0) t = MINUS;
    else t = BLANK;
    dpt = (m >= 100);
    dpu = (v < 0);
  endfunction

  function automatic void dice_pats(input int v, output logic [6:0] t,
                                    output logic [6:0] u);
    u = digit_pat(v % 10);
    t = (v >= 10) ? digit_pat(v / 10) : BLANK;
  endfunction

endpackage
