// ids_compile_pkg: simulation-only rule compiler for the string matching
// pipeline. Given the search strings and the shape of the classifier tree it
// works out the contents of every table (TCAM entries, classifier group
// words, merge lookup entries, FSM transitions), and it provides a plain
// byte-by-byte reference search to check the hardware against.
//
// Symbols are byte patterns one word long; a byte is either fixed or a
// wildcard. Byte 0 is the first byte of the word on the wire (the most
// significant byte of the data bus). The word size WB is a package variable
// (default 4 bytes) that a testbench may change before compiling. For a string s of length L and a word of
// WB bytes:
//   primary symbols   every WB-byte window of s (exact, listed first), every
//                     tail of s of k < WB bytes followed by wildcards, and the
//                     all-wildcard symbol last;
//   secondary symbols every head of s of k < WB bytes preceded by
//                     wildcards, and the all-wildcard symbol last.
// A set is ordered by the number of fixed bytes, most first, so the first
// symbol a word matches is the longest. A symbol g of a wider set is mapped
// to the first symbol of a narrower set that contains every word g contains.
// The merge stage turns a (wildcard primary, secondary) pair into the
// intersection of the two patterns. The FSM transition for state q and
// merged symbol c is found by running the string search over s[0..q-1]
// followed by the bytes of c, a wildcard byte being a value that equals no
// character.
package ids_compile_pkg;

  // Word size in bytes. A testbench of another word size sets it before
  // compiling anything; patterns are stored for up to MAXWB bytes.
  localparam int MAXWB = 16;
  int WB = int'(ids_pkg::WORD_BYTES_DEF);

  typedef struct packed {
    logic [MAXWB-1:0]   fix;  // fix[i]: byte i is fixed
    logic [8*MAXWB-1:0] val;  // byte i at val[8*i +: 8]
  } pat_t;

  function automatic logic [7:0] pbyte(pat_t p, int i);
    return p.val[8*i +: 8];
  endfunction

  function automatic pat_t set_byte(pat_t p, int i, logic [7:0] b);
    pat_t r = p;
    r.fix[i] = 1'b1;
    r.val[8*i +: 8] = b;
    return r;
  endfunction

  // Value for a TCAM entry: byte 0 in the most significant byte of a WB-byte
  // word, right-aligned in the result.
  function automatic logic [8*MAXWB-1:0] tcam_value(pat_t p);
    logic [8*MAXWB-1:0] v = '0;
    for (int i = 0; i < WB; i++) v[8*(WB-1-i) +: 8] = pbyte(p, i);
    return v;
  endfunction

  function automatic int nfix(pat_t p);
    return $countones(p.fix);
  endfunction

  // Every word matching g also matches p.
  function automatic bit subsumes(pat_t g, pat_t p);
    for (int i = 0; i < WB; i++)
      if (p.fix[i] && (!g.fix[i] || pbyte(g, i) != pbyte(p, i))) return 0;
    return 1;
  endfunction

  function automatic bit compatible(pat_t a, pat_t b);
    for (int i = 0; i < WB; i++)
      if (a.fix[i] && b.fix[i] && pbyte(a, i) != pbyte(b, i)) return 0;
    return 1;
  endfunction

  function automatic pat_t pat_and(pat_t a, pat_t b);
    pat_t r = a;
    for (int i = 0; i < WB; i++)
      if (b.fix[i]) r = set_byte(r, i, pbyte(b, i));
    return r;
  endfunction

  // Mask for a TCAM entry: all eight bits of a fixed byte must match.
  function automatic logic [8*MAXWB-1:0] tcam_mask(pat_t p);
    logic [8*MAXWB-1:0] m = '0;
    for (int i = 0; i < WB; i++)
      if (p.fix[i]) m[8*(WB-1-i) +: 8] = 8'hFF;
    return m;
  endfunction

  function automatic string pat_str(pat_t p);
    string r = "";
    for (int i = 0; i < WB; i++)
      r = {r, p.fix[i] ? string'(pbyte(p, i)) : "*"};
    return r;
  endfunction

  class PatList;
    pat_t q[$];
    function int find(pat_t p);
      foreach (q[i]) if (q[i] == p) return i;
      return -1;
    endfunction
    function void add_unique(pat_t p);
      if (find(p) < 0) q.push_back(p);
    endfunction
    // Index of the first (highest-priority) entry containing every word of g.
    function int reduce(pat_t g);
      foreach (q[i]) if (subsumes(g, q[i])) return i;
      return q.size() - 1;
    endfunction
    function int size();
      return q.size();
    endfunction
  endclass

  // Union of several lists, ordered by number of fixed bytes (most first).
  function automatic PatList union_sorted(PatList lists[$]);
    PatList r = new();
    for (int nf = WB; nf >= 0; nf--)
      foreach (lists[l])
        foreach (lists[l].q[i])
          if (nfix(lists[l].q[i]) == nf) r.add_unique(lists[l].q[i]);
    return r;
  endfunction

  function automatic PatList primary_set(string s, output int n_exact);
    PatList r = new();
    int L = s.len();
    pat_t p;
    for (int st = 0; st + WB <= L; st++) begin
      p = '0;
      for (int i = 0; i < WB; i++) p = set_byte(p, i, s[st+i]);
      r.add_unique(p);
    end
    n_exact = r.size();
    for (int k = WB - 1; k >= 1; k--) begin
      p = '0;
      for (int i = 0; i < k; i++) p = set_byte(p, i, s[L-k+i]);
      r.q.push_back(p);
    end
    r.q.push_back('0);
    return r;
  endfunction

  function automatic PatList secondary_set(string s);
    PatList r = new();
    pat_t p;
    for (int k = WB - 1; k >= 1; k--) begin
      p = '0;
      for (int i = 0; i < k; i++) p = set_byte(p, WB - k + i, s[i]);
      r.q.push_back(p);
    end
    r.q.push_back('0);
    return r;
  endfunction

  // One FSM transition: state q, merged symbol c.
  function automatic void fsm_step(string s, int q, pat_t c,
                                   output int nxt, output bit hit);
    int st[$];
    int L = s.len();
    int n;
    bit ok;
    for (int i = 0; i < q; i++) st.push_back(int'(s[i]));
    for (int i = 0; i < WB; i++) st.push_back(c.fix[i] ? int'(pbyte(c, i)) : 256);
    n = st.size();
    hit = 0;
    for (int e = q; e < n; e++) begin
      if (e + 1 >= L) begin
        ok = 1;
        for (int j = 0; j < L; j++) if (st[e-L+1+j] != int'(s[j])) ok = 0;
        if (ok) hit = 1;
      end
    end
    nxt = 0;
    for (int m = (L - 1 < n ? L - 1 : n); m >= 1; m--) begin
      ok = 1;
      for (int j = 0; j < m; j++) if (st[n-m+j] != int'(s[j])) ok = 0;
      if (ok) begin
        nxt = m;
        break;
      end
    end
  endfunction

  // All the table contents for one rule set and one tree shape.
  class IdsProgram;
    int n_p_l1, fpp, n_s_l1, fps, n_fsm, s_w;
    string strs[$];
    PatList p_global, s_global;
    PatList p_l1[$], s_l1[$];
    PatList p_loc[$], s_loc[$], m_loc[$];
    int n_exact[$];
    int mlut[$][$];

    function new(string strings[$], int n_p_l1, int fpp, int n_s_l1, int fps,
                 int s_w);
      PatList tmp[$];
      int nx;
      this.strs = strings;
      this.n_p_l1 = n_p_l1; this.fpp = fpp;
      this.n_s_l1 = n_s_l1; this.fps = fps;
      this.n_fsm = n_p_l1 * fpp;
      this.s_w = s_w;
      foreach (strs[f]) begin
        p_loc.push_back(primary_set(strs[f], nx));
        n_exact.push_back(nx);
        s_loc.push_back(secondary_set(strs[f]));
      end
      for (int g = 0; g < n_p_l1; g++) begin
        tmp = {};
        for (int k = 0; k < fpp; k++) tmp.push_back(p_loc[g*fpp+k]);
        p_l1.push_back(union_sorted(tmp));
      end
      for (int g = 0; g < n_s_l1; g++) begin
        tmp = {};
        for (int k = 0; k < fps; k++) tmp.push_back(s_loc[g*fps+k]);
        s_l1.push_back(union_sorted(tmp));
      end
      p_global = union_sorted(p_l1);
      s_global = union_sorted(s_l1);
      build_merge();
    endfunction

    function void build_merge();
      PatList ml;
      pat_t a, b, c;
      int row[$];
      int id;
      foreach (strs[f]) begin
        ml = new();
        for (int i = 0; i < n_exact[f]; i++) ml.q.push_back(p_loc[f].q[i]);
        row = {};
        for (int wi = 0; wi < (1 << s_w); wi++)
          for (int si = 0; si < (1 << s_w); si++) begin
            id = 0;
            if (n_exact[f] + wi < p_loc[f].size() && si < s_loc[f].size()) begin
              a = p_loc[f].q[n_exact[f] + wi];
              b = s_loc[f].q[si];
              if (compatible(a, b)) begin
                c = pat_and(a, b);
                id = ml.find(c);
                if (id < 0) begin
                  ml.q.push_back(c);
                  id = ml.size() - 1;
                end
              end
            end
            row.push_back(id);
          end
        m_loc.push_back(ml);
        mlut.push_back(row);
      end
    endfunction

    // Table words ------------------------------------------------------
    function int p_l2_field(int addr, int g);
      return p_l1[g].reduce(p_global.q[addr]);
    endfunction
    function int s_l2_field(int addr, int g);
      return s_l1[g].reduce(s_global.q[addr]);
    endfunction
    function int p_l1_field(int g, int addr, int k);
      return p_loc[g*fpp+k].reduce(p_l1[g].q[addr]);
    endfunction
    function int s_l1_field(int g, int addr, int k);
      return s_loc[g*fps+k].reduce(s_l1[g].q[addr]);
    endfunction
    function void fsm_entry(int f, int q, int t, output int nxt, output bit hit);
      fsm_step(strs[f], q, m_loc[f].q[t], nxt, hit);
    endfunction
  endclass

  // Reference: byte positions (0-based, in the packet) at which an
  // occurrence of s ends.
  function automatic void find_ends(string s, byte unsigned pkt[$], ref int ends[$]);
    bit ok;
    ends = {};
    for (int e = s.len() - 1; e < pkt.size(); e++) begin
      ok = 1;
      for (int j = 0; j < s.len(); j++)
        if (pkt[e-s.len()+1+j] != s[j]) ok = 0;
      if (ok) ends.push_back(e);
    end
  endfunction

endpackage
