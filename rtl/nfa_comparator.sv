// nfa_comparator: one NFA state that consumes one literal character.
//
// This is the leaf "brick" of the generated NFA circuits. A flip-flop holds
// the NFA state: it is 1 when the match has reached the point just before
// this character. In every clock cycle one input symbol is on `data`; the
// state's output `hit` is 1 when the flip-flop holds a 1 and `data` equals
// CHAR, i.e. the character has just been consumed. `hit` then enables
// whatever follows through `en` of the next state, and is captured by that
// state's flip-flop on the next rising clock edge.
//
// Interface: `en` is the activation input (the structure's w2), `hit` the
// output (w1). Timing: `hit` is combinational in `data` and registered in
// `en`, so a chain of N comparators advances one character per clock.
//
// The flip-flop-then-compare structure follows the source design. The
// asynchronous active-low reset, which clears the state, is this library's
// own addition; the source shows no reset.
module nfa_comparator
  import regex_nfa_pkg::*;
#(
  parameter sym_t CHAR = 8'h61   // literal character to match ('a')
) (
  input  logic clk,
  input  logic rst_n,
  input  sym_t data,   // current input symbol
  input  logic en,     // state is entered (w2)
  output logic hit     // character consumed in this cycle (w1)
);

  logic active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= en;
  end

  assign hit = active_q && (data == CHAR);

endmodule
