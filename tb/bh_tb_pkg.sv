// bh_tb_pkg: scene generation and reference results for the PE and array
// test benches.
//
// bh_scene draws N bodies from a Plummer sphere (scale radius PLUMMER_A,
// truncated at 30 units, equal masses of total 16), orders them along a
// Morton (Z-order) curve, which is the same order as the leaves of their
// octree, and builds the slim octree: the pre-order array of cells in which
// each inner cell is followed by its subtree and carries a skip index to the
// entry after it. The root cube is [-32, 32)^3, a cell at level L has edge
// 64 / 2^L, and cells holding one body become leaves. Bodies that share the
// finest (level 10) cell become sibling leaves of that cell.
// ref_force() walks the array for one body exactly as the compute kernel
// specifies (leaf: add and step; far: add and skip; near: step), with the
// opening test done in exact integer arithmetic and the force in double
// precision.
package bh_tb_pkg;
  import bh_pkg::*;

  localparam int    MAXL      = 10;
  localparam real   PLUMMER_A = 4.0;
  localparam real   TOTAL_M   = 16.0;
  localparam longint THETA2_Q = 64'h4000;   // 0.25 in Q16.16
  localparam real   EPS2      = 1.0 / 256.0;

  function automatic fix_t r2f(real v);
    return fix_t'($rtoi(v * 65536.0));
  endfunction

  function automatic real f2r(fix_t v);
    return real'(v) / 65536.0;
  endfunction

  class bh_scene;
    int         n;
    vec3_t      body [];
    fix_t       bmass;
    tree_node_t tree [$];
    int         rs [$];   // body range of each tree entry
    int         re [$];

    function new(int n_bodies, int seed);
      n = n_bodies;
      void'($urandom(seed));
      gen_plummer();
      build();
    endfunction

    function automatic real urand();
      return (real'($urandom_range(32'hFFFF_FFFE)) + 0.5) / 4294967296.0;
    endfunction

    function automatic void gen_plummer();
      longint code [];
      vec3_t  tmp;
      longint tc;
      body  = new[n];
      code  = new[n];
      bmass = r2f(TOTAL_M / real'(n));
      for (int i = 0; i < n; i++) begin
        real r, ct, st, ph, x, y, z;
        do begin
          r = PLUMMER_A / $sqrt($pow(urand(), -2.0 / 3.0) - 1.0);
        end while (r > 30.0);
        ct = 2.0 * urand() - 1.0;
        st = $sqrt(1.0 - ct * ct);
        ph = 6.283185307179586 * urand();
        x = r * st * $cos(ph);
        y = r * st * $sin(ph);
        z = r * ct;
        body[i] = '{x: r2f(x), y: r2f(y), z: r2f(z)};
        code[i] = morton(body[i]);
      end
      // insertion sort by Morton code
      for (int i = 1; i < n; i++) begin
        int j;
        tmp = body[i];
        tc  = code[i];
        j   = i - 1;
        while (j >= 0 && code[j] > tc) begin
          body[j+1] = body[j];
          code[j+1] = code[j];
          j--;
        end
        body[j+1] = tmp;
        code[j+1] = tc;
      end
    endfunction

    // cell coordinate of an axis at the finest level
    function automatic int q(fix_t v);
      int c;
      c = (int'(v) + 32 * 65536) >>> 12;     // 64 units over 1024 cells
      if (c < 0) c = 0;
      if (c > 1023) c = 1023;
      return c;
    endfunction

    function automatic longint morton(vec3_t p);
      longint m;
      int qx, qy, qz;
      qx = q(p.x); qy = q(p.y); qz = q(p.z);
      m = 0;
      for (int b = MAXL - 1; b >= 0; b--)
        m = (m << 3) | longint'(((qx >> b) & 1) << 2 | ((qy >> b) & 1) << 1 | ((qz >> b) & 1));
      return m;
    endfunction

    // octant digit of body i at level lvl (1..MAXL)
    function automatic int digit(int i, int lvl);
      return int'((morton(body[i]) >> (3 * (MAXL - lvl))) & 7);
    endfunction

    function automatic void add_leaf(int i);
      tree_node_t t;
      t = '0;
      t.is_leaf = 1'b1;
      t.mass    = bmass;
      t.com     = body[i];
      tree.push_back(t);
      rs.push_back(i);
      re.push_back(i + 1);
    endfunction

    function automatic void build();
      int st_s [$], st_e [$], st_l [$];
      tree.delete(); rs.delete(); re.delete();
      st_s.push_back(0); st_e.push_back(n); st_l.push_back(0);
      while (st_s.size() > 0) begin
        int s, e, l;
        s = st_s.pop_back(); e = st_e.pop_back(); l = st_l.pop_back();
        if (e - s == 1) begin
          add_leaf(s);
        end else begin
          tree_node_t t;
          real sx, sy, sz;
          t = '0;
          sx = 0; sy = 0; sz = 0;
          for (int i = s; i < e; i++) begin
            sx += f2r(body[i].x); sy += f2r(body[i].y); sz += f2r(body[i].z);
          end
          t.mass  = fix_t'(int'(bmass) * (e - s));
          t.com   = '{x: r2f(sx / (e - s)), y: r2f(sy / (e - s)), z: r2f(sz / (e - s))};
          t.size  = r2f(64.0 / real'(1 << l));
          tree.push_back(t);
          rs.push_back(s);
          re.push_back(e);
          if (l == MAXL) begin
            for (int i = e - 1; i >= s; i--) begin
              st_s.push_back(i); st_e.push_back(i + 1); st_l.push_back(l + 1);
            end
          end else begin
            // children in octant order: push the last one first
            int cut [9];
            int k;
            k = s;
            for (int d = 0; d < 8; d++) begin
              cut[d] = k;
              while (k < e && digit(k, l + 1) == d) k++;
            end
            cut[8] = e;
            for (int d = 7; d >= 0; d--)
              if (cut[d+1] > cut[d]) begin
                st_s.push_back(cut[d]); st_e.push_back(cut[d+1]); st_l.push_back(l + 1);
              end
          end
        end
      end
      // skip: first later entry that starts at or beyond this entry's range
      for (int i = 0; i < tree.size(); i++) begin
        int j;
        j = i + 1;
        while (j < tree.size() && rs[j] < re[i]) j++;
        tree[i].skip = idx_t'(j);
      end
    endfunction

    // reference gradient of body b; returns the number of force terms
    function automatic int ref_force(int b, output real g [3], output real mag);
      int nd, terms;
      g[0] = 0; g[1] = 0; g[2] = 0;
      mag = 0;
      terms = 0;
      nd = 0;
      while (nd < tree.size()) begin
        tree_node_t t;
        longint dxi, dyi, dzi, d2i, szi;
        logic far;
        t   = tree[nd];
        dxi = longint'(t.com.x) - longint'(body[b].x);
        dyi = longint'(t.com.y) - longint'(body[b].y);
        dzi = longint'(t.com.z) - longint'(body[b].z);
        d2i = dxi * dxi + dyi * dyi + dzi * dzi;
        szi = longint'(t.size);
        far = ((szi * szi) << 16) < THETA2_Q * d2i;
        if (t.is_leaf || far) begin
          real dx, dy, dz, r2, f;
          dx = real'(dxi) / 65536.0;
          dy = real'(dyi) / 65536.0;
          dz = real'(dzi) / 65536.0;
          r2 = dx * dx + dy * dy + dz * dz + EPS2;
          f  = f2r(t.mass) / (r2 * $sqrt(r2));
          g[0] += f * dx; g[1] += f * dy; g[2] += f * dz;
          mag  += f * $sqrt(r2);
          terms++;
        end
        nd = (!t.is_leaf && far) ? int'(t.skip) : nd + 1;
      end
      return terms;
    endfunction

    function automatic real absr(real v);
      return (v < 0.0) ? -v : v;
    endfunction

    // compare a hardware gradient with the reference; 1 if it agrees
    function automatic bit check(int b, vec3_t hw);
      real g [3];
      real mag, tol;
      int terms;
      terms = ref_force(b, g, mag);
      tol = real'(terms) * 3.0 / 65536.0 + 1e-4 * mag;
      return (absr(f2r(hw.x) - g[0]) <= tol) && (absr(f2r(hw.y) - g[1]) <= tol) &&
             (absr(f2r(hw.z) - g[2]) <= tol);
    endfunction
  endclass

endpackage
