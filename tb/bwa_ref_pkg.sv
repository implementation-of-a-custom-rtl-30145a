// Software reference for the BWA accelerator testbenches.
//
// bwa_index builds, from a reference sequence X (bases coded A=0..T=3), the
// suffix array of X$, its BWT, the occurrence array O (one row of four base
// counts per suffix-array row), the same for the reversed reference (O'), and
// C(b) = number of bases of X smaller than b. map_read() then runs the BWA
// inexact search exactly as written in the algorithm: D(i) first, then the
// recursion, here unrolled onto an explicit work list. Each returned hit is a
// string "k:l:z" so that result sets can be compared as multisets.
package bwa_ref_pkg;
  import bwa_pkg::*;

  class bwa_index;
    int        n;        // bases in X (without '$')
    byte       x[];
    occ_row_t  occ[];    // O, n+1 rows
    occ_row_t  occr[];   // O' of the reversed reference
    logic [3:0][31:0] c;
    int        sa[];

    function new(byte seq[]);
      byte rev[];
      int  tmp[];
      n = seq.size();
      x = seq;
      rev = new[n];
      foreach (seq[j]) rev[n-1-j] = seq[j];
      for (int b = 0; b < 4; b++) begin
        c[b] = 0;
        foreach (seq[j]) if (seq[j] < b) c[b]++;
      end
      build(seq, occ, sa);
      build(rev, occr, tmp);
    endfunction

    // symbol at position p of s$ ('$' = -1)
    static function int sym(const ref byte s[], input int p);
      return (p >= s.size()) ? -1 : int'(s[p]);
    endfunction

    static function bit less(const ref byte s[], input int a, input int b);
      int j = 0;
      forever begin
        int ca = sym(s, a + j);
        int cb = sym(s, b + j);
        if (ca != cb) return ca < cb;
        j++;
      end
    endfunction

    static function void build(byte s[], output occ_row_t o[], output int sarr[]);
      int m = s.size() + 1;
      int a[], t[];
      a = new[m];
      t = new[m];
      for (int j = 0; j < m; j++) a[j] = j;
      // bottom-up merge sort of the suffixes
      for (int w = 1; w < m; w *= 2) begin
        for (int lo = 0; lo < m; lo += 2*w) begin
          int mid = (lo + w < m) ? lo + w : m;
          int hi  = (lo + 2*w < m) ? lo + 2*w : m;
          int p = lo, q = mid, r = lo;
          while (p < mid || q < hi) begin
            if (q >= hi || (p < mid && less(s, a[p], a[q]))) t[r++] = a[p++];
            else                                             t[r++] = a[q++];
          end
        end
        a = t;
        t = new[m];
      end
      sarr = a;
      o = new[m];
      for (int r = 0; r < m; r++) begin
        int bw = (a[r] == 0) ? -1 : int'(s[a[r]-1]);
        o[r] = (r == 0) ? '0 : o[r-1];
        if (bw >= 0) o[r][bw] = o[r][bw] + 1;
      end
    endfunction

    function int last_row();
      return n;
    endfunction

    // occurrence count with O(b,-1) = 0
    function int cnt(bit rev, int b, int row);
      if (row < 0) return 0;
      return rev ? int'(occr[row][b]) : int'(occ[row][b]);
    endfunction

    // D(i) by forward exact search over O'
    function void calc_d(byte w[], int len, output int d[]);
      int k = 0, l = n, z = 0;
      d = new[len];
      for (int i = 0; i < len; i++) begin
        int b = w[i];
        int kk = int'(c[b]) + cnt(1, b, k - 1) + 1;
        int ll = int'(c[b]) + cnt(1, b, l);
        if (kk > ll) begin
          k = 0; l = n; z++;
        end else begin
          k = kk; l = ll;
        end
        d[i] = z;
      end
    endfunction

    // All hits of InexRecur(W, len-1, zmax, 0, n) as "k:l:z" strings.
    function void map_read(byte w[], int len, int zmax, ref string hits[$]);
      int d[];
      int si[$], sz[$], sk[$], sl[$];
      calc_d(w, len, d);
      si.push_back(len - 1); sz.push_back(zmax); sk.push_back(0); sl.push_back(n);
      while (si.size() > 0) begin
        int i = si.pop_back();
        int z = sz.pop_back();
        int k = sk.pop_back();
        int l = sl.pop_back();
        int di = (i < 0) ? 0 : d[i];
        if (z < di) continue;
        if (i < 0) begin
          hits.push_back($sformatf("%0d:%0d:%0d", k, l, z));
          continue;
        end
        si.push_back(i - 1); sz.push_back(z - 1); sk.push_back(k); sl.push_back(l);
        for (int b = 0; b < 4; b++) begin
          int kb = int'(c[b]) + cnt(0, b, k - 1) + 1;
          int lb = int'(c[b]) + cnt(0, b, l);
          if (kb <= lb) begin
            si.push_back(i); sz.push_back(z - 1); sk.push_back(kb); sl.push_back(lb);
            si.push_back(i - 1); sz.push_back((b == w[i]) ? z : z - 1);
            sk.push_back(kb); sl.push_back(lb);
          end
        end
      end
    endfunction
  endclass

  // Random read: a substring of X with up to `edits` random SNPs/indels.
  function automatic void make_read(bwa_index ix, int len, int edits, output byte w[]);
    int start = $urandom_range(ix.n - len - edits - 1);
    byte q[$];
    for (int j = 0; j < len + edits; j++) q.push_back(ix.x[start + j]);
    for (int e = 0; e < edits; e++) begin
      int pos = $urandom_range(q.size() - 1);
      case ($urandom_range(2))
        0: q[pos] = byte'((q[pos] + $urandom_range(1, 3)) % 4);
        1: q.delete(pos);
        default: q.insert(pos, byte'($urandom_range(3)));
      endcase
    end
    w = new[len];
    foreach (w[j]) w[j] = q[j];
  endfunction

  function automatic read_t pack_read(int id, byte w[], int zmax);
    read_t r = '0;
    r.id   = id;
    r.len  = LEN_W'(w.size());
    r.zmax = ZW'(zmax);
    foreach (w[j]) r.bases[j] = base_t'(w[j]);
    return r;
  endfunction

  function automatic string hit_key(result_t r);
    return $sformatf("%0d:%0d:%0d", r.k, r.l, r.z);
  endfunction

endpackage
