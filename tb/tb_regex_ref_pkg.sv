// Reference models for the matcher testbenches.
//
// Each function decides, from the symbols seen so far, whether a match of
// its pattern ends at position t of the stream, by scanning the history
// directly (no automaton), so that it is independent of the circuits under
// test. `h` holds the stream, `sof`/`eof` the string start and end marks.
package tb_regex_ref_pkg;
  import regex_nfa_pkg::*;

  // (a|b)*c(d|e)f*g as a substring ending at t: ... c [de] f* g.
  function automatic bit example_ends(const ref sym_t h[$], input int t);
    int j;
    if (h[t] != "g") return 1'b0;
    j = t - 1;
    while (j >= 0 && h[j] == "f") j--;
    if (j < 1) return 1'b0;
    return (h[j] == "d" || h[j] == "e") && h[j-1] == "c";
  endfunction

  // Number of 'f' between [de] and the 'g' of the match ending at t.
  function automatic int example_fcount(const ref sym_t h[$], input int t);
    int j = t - 1, n = 0;
    while (j >= 0 && h[j] == "f") begin j--; n++; end
    return n;
  endfunction

  // (a|b)*a(a|b)^k ending at t: an 'a' at t-k and only a/b after it.
  function automatic bit kth_ends(const ref sym_t h[$], input int t, input int k);
    if (t < k) return 1'b0;
    if (h[t-k] != "a") return 1'b0;
    for (int j = t - k + 1; j <= t; j++)
      if (h[j] != "a" && h[j] != "b") return 1'b0;
    return 1'b1;
  endfunction

  // ^d[^eE]e?.f$ for the string that ends at t (eof at t, sof at its start).
  // Returns 0 for no match, 4 or 5 for a match of that length.
  function automatic int ext_ends(const ref sym_t h[$], const ref bit sof[$],
                                  const ref bit eof[$], input int t);
    if (!eof[t] || h[t] != "f") return 0;
    if (t >= 3 && sof[t-3] && h[t-3] == "d" && h[t-2] != "e" && h[t-2] != "E")
      return 4;
    if (t >= 4 && sof[t-4] && h[t-4] == "d" && h[t-3] != "e" && h[t-3] != "E"
        && h[t-2] == "e")
      return 5;
    return 0;
  endfunction

  // A near miss of (a|b)*a(a|b)^k at t: the last k+1 symbols are all a/b,
  // but the decisive one, k back, is a 'b'.
  function automatic bit kth_near_miss(const ref sym_t h[$], input int t, input int k);
    if (t < k) return 1'b0;
    if (h[t-k] != "b") return 1'b0;
    for (int j = t - k + 1; j <= t; j++)
      if (h[j] != "a" && h[j] != "b") return 1'b0;
    return 1'b1;
  endfunction

  // x[0-9]+y ending at t.
  function automatic bit digits_ends(const ref sym_t h[$], input int t);
    int j;
    if (h[t] != "y") return 1'b0;
    j = t - 1;
    while (j >= 0 && h[j] >= "0" && h[j] <= "9") j--;
    return j >= 0 && j < t - 1 && h[j] == "x";
  endfunction

  // \*+\. (one or more '*' then '.') ending at t.
  function automatic bit stardot_ends(const ref sym_t h[$], input int t);
    return t >= 1 && h[t] == "." && h[t-1] == "*";
  endfunction

  // (ab)+c ending at t.
  function automatic bit abc_ends(const ref sym_t h[$], input int t);
    return t >= 2 && h[t] == "c" && h[t-1] == "b" && h[t-2] == "a";
  endfunction

  // A random symbol from the given set.
  function automatic sym_t pick(input string set);
    return sym_t'(set[$urandom_range(set.len() - 1)]);
  endfunction

endpackage
