// Reference model for the testbenches: builds Aho-Corasick state tables the way the
// host software does, and finds matches by direct string comparison.
//
// build() inserts the patterns into a trie (pattern k gets match ID k+1, states are
// numbered in insertion order, state 0 is the root), computes failure links in
// breadth-first order and fills the complete transition function delta(s, c) for all
// 256 byte values. The match ID of a transition is the output of the state it enters:
// the ID of the longest pattern that ends there. naive_match() gives, for one end
// position of a text, the ID of the longest pattern ending there, independently of the
// automaton.
package ac_model_pkg;

  class ac_table;
    int nstates;
    int delta[];   // [state*256 + c] -> next state
    int outid[];   // [state] -> match ID of entering that state
    string pats[$];

    function void build(string p[$], int max_states);
      int g[];      // trie edges, -1 = none
      int own[];
      int fail[];
      int q[$];
      pats = p;
      g     = new[max_states * 256];
      delta = new[max_states * 256];
      own   = new[max_states];
      outid = new[max_states];
      fail  = new[max_states];
      foreach (g[i]) begin g[i] = -1; delta[i] = 0; end
      foreach (own[i]) begin own[i] = 0; outid[i] = 0; fail[i] = 0; end
      nstates = 1;
      foreach (p[k]) begin
        int s = 0;
        for (int i = 0; i < p[k].len(); i++) begin
          int c = int'(p[k][i]);
          if (g[s*256 + c] < 0) begin
            if (nstates >= max_states) $fatal(1, "pattern set needs more than %0d states", max_states);
            g[s*256 + c] = nstates;
            nstates++;
          end
          s = g[s*256 + c];
        end
        if (own[s] == 0) own[s] = k + 1;
      end
      // root
      for (int c = 0; c < 256; c++) begin
        int u = g[c];
        if (u >= 0) begin
          fail[u]  = 0;
          outid[u] = own[u];
          delta[c] = u;
          q.push_back(u);
        end else begin
          delta[c] = 0;
        end
      end
      while (q.size() > 0) begin
        int r = q.pop_front();
        for (int c = 0; c < 256; c++) begin
          int u = g[r*256 + c];
          if (u >= 0) begin
            fail[u]  = delta[fail[r]*256 + c];
            outid[u] = (own[u] != 0) ? own[u] : outid[fail[u]];
            delta[r*256 + c] = u;
            q.push_back(u);
          end else begin
            delta[r*256 + c] = delta[fail[r]*256 + c];
          end
        end
      end
    endfunction

    // Table entry {next_state, match_id} for (s, c), packed with the given widths.
    function longint entry(int s, int c, int match_w);
      int ns = delta[s*256 + c];
      return (longint'(ns) << match_w) | longint'(outid[ns]);
    endfunction

    // ID of the longest pattern that ends at text[pos], 0 if none.
    function int naive_match(byte text[$], int pos);
      int best = 0, best_len = 0;
      foreach (pats[k]) begin
        int l = pats[k].len();
        if (l <= pos + 1 && l > best_len) begin
          bit ok = 1;
          for (int i = 0; i < l; i++)
            if (text[pos - l + 1 + i] != pats[k][i]) ok = 0;
          if (ok) begin best = k + 1; best_len = l; end
        end
      end
      return best;
    endfunction
  endclass

endpackage
