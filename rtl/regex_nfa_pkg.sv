// Shared types and constants for the regular-expression NFA circuits.
//
// Every matcher in this library reads one 8-bit input symbol (an ASCII
// character) per clock, so the symbol type, its width and the size of the
// symbol alphabet are kept here once. The 8-bit symbol and the 256-line
// decoder follow the source design; the names are this library's own.
package regex_nfa_pkg;

  // Width of one input symbol (ASCII character).
  localparam int unsigned SYM_W = 8;

  // Number of distinct symbols, and so of decoder lines.
  localparam int unsigned NUM_SYMS = 1 << SYM_W;

  // One input symbol.
  typedef logic [SYM_W-1:0] sym_t;

  // One-hot decoded symbol: bit c is 1 when the symbol equals c.
  typedef logic [NUM_SYMS-1:0] sym_lines_t;

endpackage
