// nfa_regex: matcher for any regular expression given as a string parameter.
//
// The NFA netlist is built at elaboration by nfa_build_pkg::compile_pattern
// (tokenize and rewrite, convert to postfix, build nodes with a stack), and
// one brick is instantiated per node: a literal state (comparator or
// decoder-fed), '.', union, concatenation, closure, option, exclusion or
// anchor. Every node n has an activation en_w[n] and a completion hit_w[n];
// each operator drives the activations of its operands, and the root's
// activation is tied to 1, so a match may start anywhere in the text.
//
// Supported syntax: literals, "\c" escapes, '.', '|', '*', '+', '?',
// parentheses, classes [abc], ranges [a-z], negated classes [^...],
// counted repetition r{n}, a leading '^' before a single-symbol atom and a
// trailing '$'. Ranged repetition {n,m} is not supported.
//
// Interface and timing as the hand-built matchers: one 8-bit symbol per
// clock on `data`; `sof`/`eof` mark the first/last symbol of a string for
// the anchors; `match` is 1, combinationally, in the cycle of the symbol that
// completes a match. After reset the first symbol is taken in the cycle
// after the first rising edge. USE_DECODER = 1 feeds all literal states from
// one shared 8-to-256 decoder. `sof`/`eof` go unused when the pattern has
// no anchor, as does `data` in decoder style; lint reports them as unused.
//
// The bricks and the construction steps follow the source design; doing the
// construction at elaboration, instead of in a separate generator program,
// is this library's choice. The default pattern is the worked example.
module nfa_regex
  import regex_nfa_pkg::*;
  import nfa_build_pkg::*;
#(
  parameter string PATTERN     = "(a|b)*c(d|e)f*g",  // the regular expression
  parameter bit    USE_DECODER = 1'b0                // 1: shared decoder
) (
  input  logic clk,
  input  logic rst_n,
  input  sym_t data,    // input symbol, one per clock
  input  logic sof,     // first symbol of a string (for '^')
  input  logic eof,     // last symbol of a string (for '$')
  output logic match    // a match ends with the current symbol
);

  localparam netlist_t NL = compile_pattern(PATTERN);
  localparam int unsigned NN = NL.count;

  if (NN == 0) begin : g_bad
    $error("nfa_regex: pattern cannot be built (malformed, unsupported or too large)");
  end

  sym_lines_t lines;

  if (USE_DECODER) begin : g_dec
    nfa_decoder u_decoder (.data, .lines);
  end else begin : g_nodec
    assign lines = '0;
  end

  logic en_w  [NN];
  logic hit_w [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam node_t ND = NL.nodes[n];
    localparam int unsigned L = 32'(ND.left);
    localparam int unsigned R = 32'(ND.right);
    if (ND.kind == N_LIT) begin : g_lit
      nfa_literal #(.CHAR(ND.ch), .USE_DECODER(USE_DECODER)) u_brick (
        .clk, .rst_n, .data, .lines, .en(en_w[n]), .hit(hit_w[n])
      );
    end else if (ND.kind == N_DOT) begin : g_dot
      nfa_dot u_brick (.clk, .rst_n, .en(en_w[n]), .hit(hit_w[n]));
    end else if (ND.kind == N_UNION) begin : g_union
      nfa_union u_brick (.hit(hit_w[n]), .en(en_w[n]),
                         .a_en(en_w[L]), .a_hit(hit_w[L]),
                         .b_en(en_w[R]), .b_hit(hit_w[R]));
    end else if (ND.kind == N_CONCAT) begin : g_concat
      nfa_concat u_brick (.hit(hit_w[n]), .en(en_w[n]),
                          .a_en(en_w[L]), .a_hit(hit_w[L]),
                          .b_en(en_w[R]), .b_hit(hit_w[R]));
    end else if (ND.kind == N_STAR) begin : g_star
      nfa_closure u_brick (.hit(hit_w[n]), .en(en_w[n]),
                           .sub_en(en_w[L]), .sub_hit(hit_w[L]));
    end else if (ND.kind == N_OPT) begin : g_opt
      nfa_optional u_brick (.hit(hit_w[n]), .en(en_w[n]),
                            .sub_en(en_w[L]), .sub_hit(hit_w[L]));
    end else if (ND.kind == N_EXCL) begin : g_excl
      nfa_exclusion u_brick (.clk, .rst_n, .hit(hit_w[n]), .en(en_w[n]),
                             .sub_en(en_w[L]), .sub_hit(hit_w[L]));
    end else if (ND.kind == N_ANCH_S) begin : g_anch_s
      nfa_anchor u_brick (.hit(hit_w[n]), .en(en_w[n]),
                          .sub_en(en_w[L]), .sub_hit(hit_w[L]), .mark(sof));
    end else begin : g_anch_e
      nfa_anchor u_brick (.hit(hit_w[n]), .en(en_w[n]),
                          .sub_en(en_w[L]), .sub_hit(hit_w[L]), .mark(eof));
    end
  end

  assign en_w[NN-1] = 1'b1;
  assign match      = hit_w[NN-1];

endmodule
