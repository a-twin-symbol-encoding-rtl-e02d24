// tse_tb_pkg: reference model of the off-chip side of twin-symbol encoding (TSE), used by the
// testbenches to make stimulus and expected results independently of the RTL.
//
//   adjacent_fill  - fills each don't-care bit of a test cube with the value of the bit before
//                    it (leading don't-cares take a given start value).
//   tse_symbols    - cuts a filled bit stream into runs of equal bits and each run of length L
//                    into symbols: M' (M bits, value held) while more than M bits remain, then
//                    one symbol k = remaining length (k bits, value then toggles).
//   rl_count       - number of symbols the earlier run-length Huffman scheme would need for the
//                    same stream: a run of L bits takes ceil(L/M) length symbols plus one
//                    "empty" symbol between each pair of them.
//   huff_code      - a Huffman code over the M+1 symbols built from symbol frequencies (each
//                    frequency counted plus one so every symbol has a codeword), with the tree
//                    numbered breadth-first from the root (node 0) as the decoder's table
//                    expects; or the decoder's reset-default code.
package tse_tb_pkg;

  typedef struct {
    int unsigned len;   // run length 1..M
    bit          hold;  // twin symbol M'
    bit          val;   // data value of the run
  } sym_t;

  // cube: 0, 1 or 2 (= don't care) per bit
  function automatic void adjacent_fill(input byte cube[$], input bit start, output bit bits[$]);
    bit last;
    last = start;
    bits = {};
    foreach (cube[i]) begin
      if (cube[i] != 2) last = cube[i][0];
      bits.push_back(last);
    end
  endfunction

  function automatic void tse_symbols(input bit bits[$], input int unsigned m, output sym_t syms[$]);
    int unsigned i, l;
    bit v;
    syms = {};
    i = 0;
    while (i < bits.size()) begin
      v = bits[i];
      l = 0;
      while (i < bits.size() && bits[i] == v) begin
        l++;
        i++;
      end
      while (l > m) begin
        syms.push_back('{len: m, hold: 1'b1, val: v});
        l -= m;
      end
      syms.push_back('{len: l, hold: 1'b0, val: v});
    end
  endfunction

  function automatic int unsigned rl_count(input bit bits[$], input int unsigned m);
    int unsigned i, l, n;
    bit v;
    n = 0;
    i = 0;
    while (i < bits.size()) begin
      v = bits[i];
      l = 0;
      while (i < bits.size() && bits[i] == v) begin
        l++;
        i++;
      end
      n += 2 * ((l + m - 1) / m) - 1;
    end
    return n;
  endfunction

  function automatic int unsigned sym_index(input sym_t s, input int unsigned m);
    return s.hold ? m : s.len - 1;
  endfunction

  // Random test cube: runs of specified bits separated by don't-care stretches.
  // x_pct: percentage of bits that are don't care.
  function automatic void random_cube(input int unsigned nbits, input int unsigned x_pct,
                                      output byte cube[$]);
    cube = {};
    for (int unsigned i = 0; i < nbits; i++) begin
      if (($urandom % 100) < x_pct) cube.push_back(8'd2);
      else                          cube.push_back(byte'($urandom % 2));
    end
  endfunction

  class huff_code;
    int unsigned m;
    // decoder table: node n, bit b -> leaf flag and index
    bit          t_leaf[][2];
    int unsigned t_idx[][2];
    // codeword per symbol, first bit to send in bit [len-1]
    longint unsigned cw[];
    int unsigned     cl[];

    function new(int unsigned m_);
      m      = m_;
      t_leaf = new[m];
      t_idx  = new[m];
      cw     = new[m + 1];
      cl     = new[m + 1];
    endfunction

    // The decoder's reset code: node n: bit 0 -> symbol n, bit 1 -> node n+1 (last: symbol m).
    function void set_default();
      for (int unsigned n = 0; n < m; n++) begin
        t_leaf[n][0] = 1'b1;
        t_idx[n][0]  = n;
        t_leaf[n][1] = (n == m - 1);
        t_idx[n][1]  = (n == m - 1) ? m : n + 1;
      end
      make_codes();
    endfunction

    // Huffman construction from frequencies freq[0..m].
    function void build(int unsigned freq[]);
      longint unsigned w[$];
      bit              il[$];     // item is a leaf
      int unsigned     id[$];     // symbol or temporary node
      bit              tl[][2];
      int unsigned     ti[][2];
      int unsigned     nt, a, b, root;
      int unsigned     map[];
      int unsigned     q[$];
      int unsigned     next;
      tl = new[m];
      ti = new[m];
      map = new[m];
      for (int unsigned s = 0; s <= m; s++) begin
        w.push_back(longint'(freq[s]) + 1);
        il.push_back(1'b1);
        id.push_back(s);
      end
      nt = 0;
      while (w.size() > 1) begin
        a = 0;
        foreach (w[i]) if (w[i] < w[a]) a = i;
        b = (a == 0) ? 1 : 0;
        foreach (w[i]) if (i != a && w[i] < w[b]) b = i;
        tl[nt][0] = il[a]; ti[nt][0] = id[a];
        tl[nt][1] = il[b]; ti[nt][1] = id[b];
        w[a] = w[a] + w[b]; il[a] = 1'b0; id[a] = nt;
        w.delete(b); il.delete(b); id.delete(b);
        nt++;
      end
      root = nt - 1;
      // breadth-first renumbering, root -> node 0
      next = 0;
      q.push_back(root);
      map[root] = next++;
      while (q.size() > 0) begin
        a = q.pop_front();
        for (int c = 0; c < 2; c++)
          if (!tl[a][c]) begin
            map[ti[a][c]] = next++;
            q.push_back(ti[a][c]);
          end
      end
      for (int unsigned n = 0; n < m; n++)
        for (int c = 0; c < 2; c++) begin
          t_leaf[map[n]][c] = tl[n][c];
          t_idx[map[n]][c]  = tl[n][c] ? ti[n][c] : map[ti[n][c]];
        end
      make_codes();
    endfunction

    // Codewords from the table by walking it from the root.
    function void make_codes();
      int unsigned     sn[$];
      longint unsigned sc[$];
      int unsigned     sl[$];
      int unsigned     n, l;
      longint unsigned c;
      sn.push_back(0); sc.push_back(0); sl.push_back(0);
      while (sn.size() > 0) begin
        n = sn.pop_back(); c = sc.pop_back(); l = sl.pop_back();
        for (int b = 0; b < 2; b++) begin
          if (t_leaf[n][b]) begin
            cw[t_idx[n][b]] = (c << 1) | longint'(b);
            cl[t_idx[n][b]] = l + 1;
          end else begin
            sn.push_back(t_idx[n][b]);
            sc.push_back((c << 1) | longint'(b));
            sl.push_back(l + 1);
          end
        end
      end
    endfunction

    // Serial bit stream for a symbol sequence.
    function void encode(input sym_t syms[$], output bit stream[$]);
      int unsigned s;
      stream = {};
      foreach (syms[i]) begin
        s = sym_index(syms[i], m);
        for (int k = int'(cl[s]) - 1; k >= 0; k--) stream.push_back(cw[s][k]);
      end
    endfunction
  endclass

endpackage
