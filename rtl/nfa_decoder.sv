// nfa_decoder: 8-to-256 symbol decoder shared by the states of one matcher.
//
// Output line c is 1 exactly when the current input symbol equals c. Each
// line is written as its own equality, so that synthesis removes every line
// no state uses; with all lines used it is a full one-hot decoder. Purely
// combinational: the lines follow `data` in the same cycle.
//
// The decoder, its 8-bit input and its 256 outputs follow the source design
// (one 8-bit ASCII symbol per clock).
module nfa_decoder
  import regex_nfa_pkg::*;
(
  input  sym_t       data,   // current input symbol
  output sym_lines_t lines   // one-hot: lines[c] = (data == c)
);

  always_comb begin
    for (int unsigned c = 0; c < NUM_SYMS; c++) begin
      lines[c] = (data == sym_t'(c));
    end
  end

endmodule
