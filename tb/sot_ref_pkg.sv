// sot_ref_pkg: reference models used by the testbenches.
//
// dwt53(): LEVELS-deep 2-D integer CDF 5/3 transform of an N x N image,
// written line by line on whole arrays with mirrored borders, returned in
// Morton order. encode(): the block-tree bit-plane coder written as a
// recursive depth-first walk, producing the packed byte stream (MSB first,
// last byte zero-padded) and counting how often each coding case occurs.
package sot_ref_pkg;

  typedef int          int_q[$];
  typedef bit          bit_q[$];
  typedef byte unsigned byte_q[$];

  function automatic int unsigned zorder(int unsigned r, int unsigned c);
    int unsigned a = 0;
    for (int i = 0; i < 16; i++) begin
      a |= ((c >> i) & 1) << (2 * i);
      a |= ((r >> i) & 1) << (2 * i + 1);
    end
    return a;
  endfunction

  // one 1-D 5/3 line: x[0..len-1] -> low half then high half
  function automatic int_q lift_line(int_q x);
    int   len = x.size();
    int   h = len / 2;
    int   d[], s[];
    int_q y;
    d = new[h];
    s = new[h];
    for (int j = 0; j < h; j++) begin
      int right = (2 * j + 2 < len) ? x[2 * j + 2] : x[len - 2];
      d[j] = x[2 * j + 1] - ((x[2 * j] + right) >>> 1);
    end
    for (int j = 0; j < h; j++) begin
      int dl = (j == 0) ? d[0] : d[j - 1];
      s[j] = x[2 * j] + ((dl + d[j] + 2) >>> 2);
    end
    for (int j = 0; j < h; j++) y.push_back(s[j]);
    for (int j = 0; j < h; j++) y.push_back(d[j]);
    return y;
  endfunction

  // img is row-major N*N; result is in Morton order
  function automatic int_q dwt53(int_q img, int n, int levels);
    int   a[];
    int_q res;
    a = new[n * n];
    for (int i = 0; i < n * n; i++) a[i] = img[i];
    for (int l = 0; l < levels; l++) begin
      int sz = n >> l;
      for (int r = 0; r < sz; r++) begin
        int_q line, o;
        for (int c = 0; c < sz; c++) line.push_back(a[r * n + c]);
        o = lift_line(line);
        for (int c = 0; c < sz; c++) a[r * n + c] = o[c];
      end
      for (int c = 0; c < sz; c++) begin
        int_q line, o;
        for (int r = 0; r < sz; r++) line.push_back(a[r * n + c]);
        o = lift_line(line);
        for (int r = 0; r < sz; r++) a[r * n + c] = o[r];
      end
    end
    res = {};
    for (int i = 0; i < n * n; i++) res.push_back(0);
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) res[zorder(r, c)] = a[r * n + c];
    return res;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // coding-case counters of the last encode() call
  int cnt_sp_skipped, cnt_sp_run, cnt_type_a, cnt_type_b, cnt_root_done, cnt_sig_d_set;
  int cnt_new_sig_rp, cnt_refine, cnt_leaf_coded, cnt_node_coded, cnt_tree_zero;
  int ref_max_all, ref_max_high, ref_n0;

  class coder;
    int   coef[$];
    int   nblk, npar, b0, n;
    bit   sig_b[], sig_d[];
    bit_q bits;
    int   parents[$];

    function void put(bit b);
      bits.push_back(b);
    endfunction

    function bit block_sig(int x);
      for (int p = 4 * x; p < 4 * x + 4; p++) if (iabs(coef[p]) >= (1 << n)) return 1;
      return 0;
    endfunction

    function bit desc_sig(int x);
      if (x >= npar) return 0;
      for (int ch = 4 * x; ch < 4 * x + 4; ch++)
        if (block_sig(ch) || desc_sig(ch)) return 1;
      return 0;
    endfunction

    function bit child_done(int r);
      if (r >= npar) return sig_b[r];
      return sig_d[r];
    endfunction

    function void visit(int x);
      bit leaf = (x >= npar);
      if (!sig_b[x]) begin
        bit   tmax = 0, dsig = 0;
        bit_q temp;
        for (int p = 4 * x; p < 4 * x + 4; p++) begin
          if (iabs(coef[p]) >= (1 << n)) begin
            temp.push_back(1);
            temp.push_back(coef[p] < 0);
            tmax = 1;
          end else temp.push_back(0);
        end
        if (!leaf) dsig = desc_sig(x);
        if (tmax || dsig) begin
          put(1);
          foreach (temp[i]) put(temp[i]);
          if (!leaf) put(dsig);
          sig_b[x] = 1;
          if (leaf) cnt_leaf_coded++; else cnt_node_coded++;
        end else put(0);
        if (dsig) begin
          parents.push_back(x);
          for (int ch = 4 * x; ch < 4 * x + 4; ch++) visit(ch);
        end
      end else if (!sig_b[4 * x] && !sig_b[4 * x + 1] && !sig_b[4 * x + 2] && !sig_b[4 * x + 3]) begin
        bit dsig = desc_sig(x);
        cnt_type_a++;
        put(dsig);
        if (!dsig) cnt_tree_zero++;
        if (dsig) begin
          parents.push_back(x);
          for (int ch = 4 * x; ch < 4 * x + 4; ch++) visit(ch);
        end
      end else begin
        bit need[4];
        cnt_type_b++;
        parents.push_back(x);
        for (int i = 0; i < 4; i++) need[i] = !child_done(4 * x + i);
        for (int i = 0; i < 4; i++) if (need[i]) visit(4 * x + i);
      end
    endfunction

    function void run(int_q c, int side, int levels);
      int ntop, n0, mx_all, mx_high, lls;
      coef = c;
      nblk = side * side / 4;
      npar = nblk / 4;
      lls  = side >> levels;
      b0   = lls * lls / 4;
      ntop = 4 * b0;
      sig_b = new[nblk];
      sig_d = new[npar];
      foreach (sig_b[i]) sig_b[i] = (i < ntop);
      foreach (sig_d[i]) sig_d[i] = 0;
      mx_all = 0;
      mx_high = 0;
      for (int p = 0; p < side * side; p++) begin
        if (iabs(c[p]) > mx_all) mx_all = iabs(c[p]);
        if (p >= lls * lls && iabs(c[p]) > mx_high) mx_high = iabs(c[p]);
      end
      n0 = 0;
      for (int i = 0; i < 31; i++) if (((mx_all >> i) & 1) != 0) n0 = i;
      ref_max_all = mx_all;
      ref_max_high = mx_high;
      ref_n0 = n0;
      bits = {};
      for (n = n0; n >= 0; n--) begin
        // refinement pass
        for (int b = 0; b < nblk; b++) if (sig_b[b])
          for (int p = 4 * b; p < 4 * b + 4; p++) begin
            int m = iabs(coef[p]);
            if (((m >> n) & 1) != 0) begin
              put(1);
              if ((m >> (n + 1)) == 0) begin
                put(coef[p] < 0);
                cnt_new_sig_rp++;
              end else cnt_refine++;
            end else put(0);
          end
        // sorting pass
        if (mx_high < (1 << n)) begin
          cnt_sp_skipped++;
          continue;
        end
        cnt_sp_run++;
        for (int i = 0; i < b0; i++)
          for (int j = 1; j <= 3; j++) begin
            int k = i + j * b0;
            if (sig_d[k]) begin
              cnt_root_done++;
              continue;
            end
            parents = {};
            visit(k);
            for (int q = parents.size() - 1; q >= 0; q--) begin
              int y = parents[q];
              bit all = 1;
              for (int ch = 4 * y; ch < 4 * y + 4; ch++) if (!child_done(ch)) all = 0;
              if (all) begin
                sig_d[y] = 1;
                cnt_sig_d_set++;
              end
            end
          end
      end
    endfunction
  endclass

  function automatic void clear_counters();
    cnt_sp_skipped = 0; cnt_sp_run = 0; cnt_type_a = 0; cnt_type_b = 0; cnt_root_done = 0;
    cnt_sig_d_set = 0; cnt_new_sig_rp = 0; cnt_refine = 0; cnt_leaf_coded = 0;
    cnt_node_coded = 0; cnt_tree_zero = 0;
  endfunction

  function automatic byte_q pack(bit_q b);
    byte_q o;
    for (int i = 0; i < b.size(); i += 8) begin
      byte unsigned v = 0;
      for (int k = 0; k < 8; k++) v = {v[6:0], (i + k < b.size()) ? b[i + k] : 1'b0};
      o.push_back(v);
    end
    return o;
  endfunction

  // Morton-ordered coefficients -> expected byte stream
  function automatic byte_q encode(int_q c, int side, int levels);
    coder e = new();
    e.run(c, side, levels);
    return pack(e.bits);
  endfunction

endpackage
