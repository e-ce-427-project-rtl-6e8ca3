// seg_ref_pkg: reference seven-segment patterns for the testbenches,
// written as the list of lit segment letters of each hex digit
// (a top, b upper right, c lower right, d bottom, e lower left,
// f upper left, g middle) and turned into the active-low bus value.
package seg_ref_pkg;

  function automatic logic [6:0] seg_ref(input logic [3:0] d);
    string lit;
    logic [6:0] bus;
    case (d)
      4'h0: lit = "abcdef";   4'h1: lit = "bc";      4'h2: lit = "abdeg";
      4'h3: lit = "abcdg";    4'h4: lit = "bcfg";    4'h5: lit = "acdfg";
      4'h6: lit = "acdefg";   4'h7: lit = "abc";     4'h8: lit = "abcdefg";
      4'h9: lit = "abcdfg";   4'hA: lit = "abcefg";  4'hB: lit = "cdefg";
      4'hC: lit = "adef";     4'hD: lit = "bcdeg";   4'hE: lit = "adefg";
      default: lit = "aefg";
    endcase
    bus = 7'b1111111;
    for (int i = 0; i < lit.len(); i++) bus[3'(lit[i] - "a")] = 1'b0;
    return bus;
  endfunction

endpackage
