// tb_ref_pkg: reference values for the Segment_LCD testbenches, written
// independently of the RTL. Digit glyphs are spelled as the letters of the lit
// segments (a = top, b = upper right, ... g = middle) and turned into the
// {dp, g, f, e, d, c, b, a} bit pattern here.
package tb_ref_pkg;

  function automatic logic [7:0] glyph(input int unsigned v);
    string lit;
    logic [7:0] p;
    case (v)
      0: lit = "abcdef";   1: lit = "bc";      2: lit = "abdeg";   3: lit = "abcdg";
      4: lit = "bcfg";     5: lit = "acdfg";   6: lit = "acdefg";  7: lit = "abc";
      8: lit = "abcdefg";  9: lit = "abcdfg";  10: lit = "abcefg"; 11: lit = "cdefg";
      12: lit = "adef";    13: lit = "bcdeg";  14: lit = "adefg";  default: lit = "aefg";
    endcase
    p = '0;
    for (int i = 0; i < lit.len(); i++) p[3'(lit[i] - 8'd97)] = 1'b1;
    return p;
  endfunction

  // Expected byte stream of the text LCD controller: 4 init commands, then
  // repeated passes of {0x80, line 1, 0xC0, line 2}. Returns {rs, byte}.
  function automatic logic [8:0] lcd_expect(input int unsigned n, input logic [7:0] text [32]);
    int unsigned s;
    logic [7:0] init_cmd [4] = '{8'h38, 8'h0C, 8'h06, 8'h01};
    if (n < 4) return {1'b0, init_cmd[n]};
    s = (n - 4) % 34;
    if (s == 0)  return {1'b0, 8'h80};
    if (s == 17) return {1'b0, 8'hC0};
    if (s < 17)  return {1'b1, text[s-1]};
    return {1'b1, text[s-2]};
  endfunction

endpackage
