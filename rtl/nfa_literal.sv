// nfa_literal: one literal-character NFA state, in either comparator style.
//
// With USE_DECODER = 0 the state compares the 8-bit symbol itself
// (nfa_comparator, the FPGA-oriented style). With USE_DECODER = 1 it takes
// the line for CHAR from a decoder shared by the whole matcher
// (nfa_dec_comparator, the ASIC-oriented style). Either way `hit` is 1 in
// the cycle in which the state, entered through `en` on the previous clock,
// consumes CHAR. The unused input (`lines` or `data`) is ignored.
module nfa_literal
  import regex_nfa_pkg::*;
#(
  parameter sym_t CHAR        = 8'h61,  // literal character ('a')
  parameter bit   USE_DECODER = 1'b0    // 1: use the shared decoder's line
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sym_t       data,   // current symbol (comparator style)
  input  sym_lines_t lines,  // decoded symbol (decoder style)
  input  logic       en,
  output logic       hit
);

  if (USE_DECODER) begin : g_dec
    nfa_dec_comparator u_state (
      .clk, .rst_n, .sym_line(lines[CHAR]), .en, .hit
    );
  end else begin : g_cmp
    nfa_comparator #(.CHAR(CHAR)) u_state (
      .clk, .rst_n, .data, .en, .hit
    );
  end

endmodule
