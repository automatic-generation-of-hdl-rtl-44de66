// nfa_build_pkg: elaboration-time construction of an NFA brick netlist from
// a regular expression.
//
// compile_pattern() does at elaboration what a netlist generator would do
// in software, in three steps:
//   1. Tokenize and rewrite. Classes [abc], ranges [a-z] and negated classes
//      [^...] become a parenthesized union of literals (followed by an
//      exclusion operator for [^...]); "\c" makes any character a literal;
//      a leading '^' is moved behind the first single-symbol atom (a
//      literal, '.' or a class), so "^ben" is read as b^en; a trailing '$'
//      is applied to the whole expression; r{n} is marked for n copies.
//      Concatenation, implicit in the
//      text, is made an explicit operator.
//   2. Convert to postfix with an operator stack (precedence: postfix
//      operators * + ? bind tightest, then concatenation, then '|';
//      parentheses group).
//   3. Read the postfix form left to right with a stack of node numbers: an
//      operand creates a leaf node, an operator pops its operand(s) and
//      creates a node over them. r+ is built as r r*: the nodes of r are
//      copied (a subtree is a contiguous run of node numbers ending at its
//      root, because nodes are created in postfix order); r{n} likewise
//      becomes r concatenated with n-1 copies. The root is the last node.
//
// The result lists, per node, its kind, its literal character and its
// operands' node numbers; nfa_regex instantiates one brick per node.
// Not supported: ranged repetition {n,m}, and '^' in front of a group that
// can match more than one symbol. A malformed pattern gives a count of 0.
package nfa_build_pkg;

  // Largest netlist, in nodes, and longest token stream.
  localparam int unsigned MAX_NODES  = 512;
  localparam int unsigned MAX_TOKENS = 2048;

  // Node kinds (one brick each).
  localparam logic [3:0] N_LIT    = 4'd0;  // literal state
  localparam logic [3:0] N_DOT    = 4'd1;  // any-symbol state
  localparam logic [3:0] N_UNION  = 4'd2;  // left | right
  localparam logic [3:0] N_CONCAT = 4'd3;  // left right
  localparam logic [3:0] N_STAR   = 4'd4;  // left*
  localparam logic [3:0] N_OPT    = 4'd5;  // left?
  localparam logic [3:0] N_EXCL   = 4'd6;  // negated class over left
  localparam logic [3:0] N_ANCH_S = 4'd7;  // left gated by the start pulse
  localparam logic [3:0] N_ANCH_E = 4'd8;  // left gated by the finish pulse

  typedef struct packed {
    logic [3:0] kind;
    logic [7:0] ch;     // character of an N_LIT
    logic [9:0] left;   // first (or only) operand
    logic [9:0] right;  // second operand of N_UNION / N_CONCAT
  } node_t;

  typedef struct packed {
    logic [31:0]                  count;  // number of nodes; root = count-1
    node_t [MAX_NODES-1:0]        nodes;
  } netlist_t;

  // Token kinds.
  localparam int T_LIT = 0, T_DOT = 1, T_LP = 2, T_RP = 3, T_OR = 4,
                 T_CAT = 5, T_STAR = 6, T_PLUS = 7, T_OPT = 8, T_EXCL = 9,
                 T_ANCH_S = 10, T_ANCH_E = 11, T_REP = 12;

  function automatic bit is_postfix_op(input int k);
    return k == T_STAR || k == T_PLUS || k == T_OPT || k == T_EXCL || k == T_ANCH_S ||
           k == T_REP;
  endfunction

  function automatic int unsigned node_kids(input logic [3:0] kind);
    if (kind == N_LIT || kind == N_DOT) return 0;
    if (kind == N_UNION || kind == N_CONCAT) return 2;
    return 1;
  endfunction

  function automatic netlist_t compile_pattern(input string pat);
    netlist_t   nl;
    int         rk[MAX_TOKENS];   // raw tokens
    byte        rc[MAX_TOKENS];
    int         nr;
    int         tk[MAX_TOKENS];   // with explicit concatenation
    byte        tc[MAX_TOKENS];
    int         nt;
    int         pk[MAX_TOKENS];   // postfix
    byte        pc[MAX_TOKENS];
    int         np;
    int         ops[MAX_TOKENS];  // operator stack
    int         nops;
    int         stk[MAX_TOKENS];  // node stack
    int         nstk;
    int         len, i, first_end;
    bit         anchor_s, anchor_e, ok;
    int         cnt;

    nl  = 0;
    ok  = 1'b1;
    nr  = 0;
    len = pat.len();
    anchor_s = 1'b0;
    anchor_e = 1'b0;
    i = 0;
    if (len > 0 && pat[0] == "^") begin
      anchor_s = 1'b1;
      i = 1;
    end
    if (len > i && pat[len-1] == "$" && !(len > 1 && pat[len-2] == "\\")) begin
      anchor_e = 1'b1;
      len = len - 1;
    end

    // 1. Tokenize, expanding classes.
    while (i < len && ok) begin
      byte c;
      c = pat[i];
      case (c)
        "\\": begin
          if (i + 1 < len) begin rk[nr] = T_LIT; rc[nr] = pat[i+1]; nr++; end
          else ok = 1'b0;
          i += 2;
        end
        ".": begin rk[nr] = T_DOT;  nr++; i++; end
        "(": begin rk[nr] = T_LP;   nr++; i++; end
        ")": begin rk[nr] = T_RP;   nr++; i++; end
        "|": begin rk[nr] = T_OR;   nr++; i++; end
        "*": begin rk[nr] = T_STAR; nr++; i++; end
        "+": begin rk[nr] = T_PLUS; nr++; i++; end
        "?": begin rk[nr] = T_OPT;  nr++; i++; end
        "{": begin
          // r{n}: n copies of r; the count travels in the token's character.
          int n;
          n = 0;
          i++;
          while (i < len && pat[i] >= "0" && pat[i] <= "9") begin
            n = n * 10 + int'(pat[i]) - int'("0");
            i++;
          end
          if (i >= len || pat[i] != "}" || n < 1 || n > 255) ok = 1'b0;
          i++;
          rk[nr] = T_REP; rc[nr] = byte'(n); nr++;
        end
        "[": begin
          bit neg, first;
          i++;
          neg = 1'b0;
          if (i < len && pat[i] == "^") begin neg = 1'b1; i++; end
          rk[nr] = T_LP; nr++;
          first = 1'b1;
          while (i < len && pat[i] != "]" && ok) begin
            byte lo, hi;
            if (pat[i] == "\\" && i + 1 < len) i++;
            lo = pat[i];
            if (i + 2 < len && pat[i+1] == "-" && pat[i+2] != "]") begin
              hi = pat[i+2];
              i += 3;
            end else begin
              hi = lo;
              i++;
            end
            for (int v = int'(lo); v <= int'(hi); v++) begin
              if (nr + 2 >= MAX_TOKENS) ok = 1'b0;
              else begin
                if (!first) begin rk[nr] = T_OR; nr++; end
                rk[nr] = T_LIT; rc[nr] = byte'(v); nr++;
                first = 1'b0;
              end
            end
          end
          if (i >= len || first) ok = 1'b0;
          i++;  // the closing ]
          rk[nr] = T_RP; nr++;
          if (neg) begin rk[nr] = T_EXCL; nr++; end
        end
        default: begin rk[nr] = T_LIT; rc[nr] = c; nr++; i++; end
      endcase
      if (nr + 4 >= MAX_TOKENS) ok = 1'b0;
    end
    if (nr == 0) ok = 1'b0;

    // Move a leading '^' behind the first atom.
    if (ok && anchor_s) begin
      first_end = 0;
      if (rk[0] == T_LP) begin
        int depth;
        depth = 0;
        for (int j = 0; j < nr; j++) begin
          if (rk[j] == T_LP) depth++;
          if (rk[j] == T_RP) begin
            depth--;
            if (depth == 0 && first_end == 0) first_end = j;
          end
        end
        if (first_end + 1 < nr && rk[first_end+1] == T_EXCL) first_end++;
      end
      for (int j = nr; j > first_end + 1; j--) begin
        rk[j] = rk[j-1];
        rc[j] = rc[j-1];
      end
      rk[first_end+1] = T_ANCH_S;
      nr++;
    end

    // Make concatenation explicit.
    nt = 0;
    for (int j = 0; j < nr; j++) begin
      if (j > 0 && (rk[j] == T_LIT || rk[j] == T_DOT || rk[j] == T_LP) &&
          (rk[j-1] == T_LIT || rk[j-1] == T_DOT || rk[j-1] == T_RP ||
           is_postfix_op(rk[j-1]))) begin
        if (nt < MAX_TOKENS) begin tk[nt] = T_CAT; nt++; end
      end
      if (nt < MAX_TOKENS) begin tk[nt] = rk[j]; tc[nt] = rc[j]; nt++; end
      else ok = 1'b0;
    end

    // 2. Postfix conversion.
    np = 0;
    nops = 0;
    for (int j = 0; j < nt && ok; j++) begin
      int k;
      k = tk[j];
      if (k == T_LIT || k == T_DOT || is_postfix_op(k)) begin
        pk[np] = k; pc[np] = tc[j]; np++;
      end else if (k == T_LP) begin
        ops[nops] = k; nops++;
      end else if (k == T_RP) begin
        while (nops > 0 && ops[nops-1] != T_LP) begin
          nops--; pk[np] = ops[nops]; np++;
        end
        if (nops == 0) ok = 1'b0;
        else nops--;
      end else begin
        // T_OR or T_CAT: pop operators of equal or higher precedence.
        while (nops > 0 && ops[nops-1] != T_LP &&
               (ops[nops-1] == T_CAT || k == T_OR)) begin
          nops--; pk[np] = ops[nops]; np++;
        end
        ops[nops] = k; nops++;
      end
    end
    while (nops > 0) begin
      nops--;
      if (ops[nops] == T_LP) ok = 1'b0;
      pk[np] = ops[nops]; np++;
    end
    if (anchor_e) begin pk[np] = T_ANCH_E; np++; end

    // 3. Build the nodes.
    cnt = 0;
    nstk = 0;
    for (int j = 0; j < np && ok; j++) begin
      int k, a;
      k = pk[j];
      if (cnt + 4 > int'(MAX_NODES)) ok = 1'b0;
      else if (k == T_LIT || k == T_DOT) begin
        nl.nodes[cnt].kind = (k == T_LIT) ? N_LIT : N_DOT;
        nl.nodes[cnt].ch   = pc[j];
        stk[nstk] = cnt; nstk++; cnt++;
      end else if (k == T_OR || k == T_CAT) begin
        if (nstk < 2) ok = 1'b0;
        else begin
          nl.nodes[cnt].kind  = (k == T_OR) ? N_UNION : N_CONCAT;
          nl.nodes[cnt].left  = 10'(stk[nstk-2]);
          nl.nodes[cnt].right = 10'(stk[nstk-1]);
          nstk -= 2;
          stk[nstk] = cnt; nstk++; cnt++;
        end
      end else if (k == T_REP) begin
        // r{n} = r r ... r: n-1 copies of r, each concatenated on.
        if (nstk < 1) ok = 1'b0;
        else begin
          int lo, root, reps;
          a = stk[nstk-1]; nstk--;
          lo = a;
          while (node_kids(nl.nodes[lo].kind) != 0) lo = int'(nl.nodes[lo].left);
          reps = int'(pc[j]);
          if (cnt + (reps - 1) * (a - lo + 2) > int'(MAX_NODES)) ok = 1'b0;
          else begin
            root = a;
            for (int r = 1; r < reps; r++) begin
              int off;
              off = cnt - lo;
              for (int s = lo; s <= a; s++) begin
                nl.nodes[cnt] = nl.nodes[s];
                if (node_kids(nl.nodes[s].kind) >= 1) nl.nodes[cnt].left  = 10'(int'(nl.nodes[s].left) + off);
                if (node_kids(nl.nodes[s].kind) == 2) nl.nodes[cnt].right = 10'(int'(nl.nodes[s].right) + off);
                cnt++;
              end
              nl.nodes[cnt].kind  = N_CONCAT;
              nl.nodes[cnt].left  = 10'(root);
              nl.nodes[cnt].right = 10'(cnt - 1);
              root = cnt;
              cnt++;
            end
            stk[nstk] = root; nstk++;
          end
        end
      end else if (k == T_PLUS) begin
        // r+ = r r*: copy r's nodes, star the copy, concatenate.
        if (nstk < 1) ok = 1'b0;
        else begin
          int lo, off;
          a = stk[nstk-1]; nstk--;
          lo = a;
          while (node_kids(nl.nodes[lo].kind) != 0) lo = int'(nl.nodes[lo].left);
          off = cnt - lo;
          if (cnt + (a - lo + 1) + 2 > int'(MAX_NODES)) ok = 1'b0;
          else begin
            for (int s = lo; s <= a; s++) begin
              nl.nodes[cnt] = nl.nodes[s];
              if (node_kids(nl.nodes[s].kind) >= 1) nl.nodes[cnt].left  = 10'(int'(nl.nodes[s].left) + off);
              if (node_kids(nl.nodes[s].kind) == 2) nl.nodes[cnt].right = 10'(int'(nl.nodes[s].right) + off);
              cnt++;
            end
            nl.nodes[cnt].kind = N_STAR;
            nl.nodes[cnt].left = 10'(cnt - 1);
            cnt++;
            nl.nodes[cnt].kind  = N_CONCAT;
            nl.nodes[cnt].left  = 10'(a);
            nl.nodes[cnt].right = 10'(cnt - 1);
            stk[nstk] = cnt; nstk++; cnt++;
          end
        end
      end else begin
        // Unary: * ? exclusion, anchors.
        if (nstk < 1) ok = 1'b0;
        else begin
          a = stk[nstk-1]; nstk--;
          case (k)
            T_STAR:   nl.nodes[cnt].kind = N_STAR;
            T_OPT:    nl.nodes[cnt].kind = N_OPT;
            T_EXCL:   nl.nodes[cnt].kind = N_EXCL;
            T_ANCH_S: nl.nodes[cnt].kind = N_ANCH_S;
            default:  nl.nodes[cnt].kind = N_ANCH_E;
          endcase
          nl.nodes[cnt].left = 10'(a);
          stk[nstk] = cnt; nstk++; cnt++;
        end
      end
    end
    if (nstk != 1) ok = 1'b0;

    nl.count = ok ? 32'(cnt) : 32'd0;
    return nl;
  endfunction

endpackage
