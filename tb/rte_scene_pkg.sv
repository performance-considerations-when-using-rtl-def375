// rte_scene_pkg: test scenes and a reference ray caster for the testbenches.
//
// scene_c builds a two-level scene in the engine's memory format and keeps
// it as a sparse map of 32-bit words (byte address -> word):
//   * world triangles, axis aligned so that their unit-triangle transforms
//     are exact in Q16.16: a triangle in the plane p[k] = A[k] spans
//     A + u*s_i*e_i + v*s_j*e_j (i, j the other two axes, s in {+-1,+-2,+-4});
//     its rows are u = (p_i - A_i)/s_i, v = (p_j - A_j)/s_j, w = p_k - A_k;
//   * instances of one object-space bottom tree, placed by translation;
//     their leaf holds the object-from-world rows and the subtree root;
//   * a B-KD tree over the world primitives, built breadth first with median
//     splits on the axis depth mod 3. The two top levels lie in treelet 0,
//     each subtree below them in a treelet of its own; the bottom tree lies
//     in treelet BOTTOM_TL with bit 31 set on its node addresses.
// trace() is the reference: it tests every triangle (and every instance's
// triangles in object space) with the same fixed-point operations as the
// engine's datapath, without any tree, and returns the closest hit.
package rte_scene_pkg;
  import rte_pkg::*;

  localparam int unsigned TREELET_BYTES = 32768;
  localparam int unsigned BOTTOM_TL     = 12;
  localparam int unsigned GEOM_BASE     = 32'h0004_0000;  // geometry rows
  localparam int unsigned MARGIN        = 32'h0000_1000;  // 1/16 on bounds

  typedef struct {
    bit          is_inst;
    int          id;          // triangle ID
    logic [31:0] geom;        // address of the three rows
    logic [31:0] sub_root;    // instance: bottom tree root (bit 31 set)
    fx_t         lo [3];
    fx_t         hi [3];
    logic [127:0] row [3];
  } prim_t;

  typedef struct {
    logic [31:0] addr;
    int          first;
    int          last;        // exclusive
    int          depth;
    int          tl;
  } task_t;

  function automatic fx_t fx_div(input fx_t num, input fx_t den);
    longint unsigned an, ad, q;
    an = (num < 0) ? longint'(-num) : longint'(num);
    ad = (den < 0) ? longint'(-den) : longint'(den);
    if (ad == 0) q = 64'h7FFF_FFFF;
    else begin
      q = (an << 16) / ad;
      if (q > 64'h7FFF_FFFF) q = 64'h7FFF_FFFF;
    end
    return ((num < 0) != (den < 0)) ? fx_t'(-longint'(q)) : fx_t'(q);
  endfunction

  // Small integer hash used as the scenes' random source.
  function automatic int unsigned hsh(input int unsigned x);
    int unsigned h;
    h = x * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return h;
  endfunction

  function automatic fx_t fx_of_q(input int quarters);
    return fx_t'(quarters * 16384);
  endfunction

  class scene_c;
    logic [31:0] words [int unsigned];
    prim_t       world [$];
    prim_t       object [$];
    int unsigned next_node [16];
    int unsigned next_geom;
    int          next_tl;
    logic [31:0] root;
    logic [31:0] bottom_root;
    int          n_nodes;

    function new();
      foreach (next_node[i]) next_node[i] = 0;
      next_geom = GEOM_BASE;
      next_tl   = 1;
      n_nodes   = 0;
    endfunction

    function void wr(input int unsigned a, input logic [31:0] v);
      words[a] = v;
    endfunction

    function logic [31:0] alloc_node(input int tl);
      logic [31:0] a;
      a = tl * TREELET_BYTES + next_node[tl];
      next_node[tl] += 32;
      n_nodes++;
      return a;
    endfunction

    function logic [31:0] put_rows(input logic [127:0] r [3]);
      logic [31:0] a;
      a = next_geom;
      for (int k = 0; k < 3; k++)
        for (int w = 0; w < 4; w++) wr(a + 16*k + 4*w, r[k][32*w +: 32]);
      next_geom += 48;
      return a;
    endfunction

    // Axis-aligned triangle; coordinates in quarter units.
    function prim_t make_tri(input int id, input int k, input int aq [3], input int si, input int sj);
      prim_t p;
      int i, j;
      fx_t a [3];
      i = (k + 1) % 3;
      j = (k + 2) % 3;
      for (int c = 0; c < 3; c++) a[c] = fx_of_q(aq[c]);
      p.is_inst  = 0;
      p.id       = id;
      p.sub_root = '0;
      foreach (p.row[r]) p.row[r] = '0;
      p.row[0][32*i +: 32] = fx_div(FX_ONE, fx_t'(si * 65536));
      p.row[0][127:96]     = fx_t'(-fx_div(a[i], fx_t'(si * 65536)));
      p.row[1][32*j +: 32] = fx_div(FX_ONE, fx_t'(sj * 65536));
      p.row[1][127:96]     = fx_t'(-fx_div(a[j], fx_t'(sj * 65536)));
      p.row[2][32*k +: 32] = FX_ONE;
      p.row[2][127:96]     = fx_t'(-a[k]);
      for (int c = 0; c < 3; c++) begin
        p.lo[c] = a[c];
        p.hi[c] = a[c];
      end
      p.lo[i] = fx_min(a[i], a[i] + fx_t'(si * 65536));
      p.hi[i] = fx_max(a[i], a[i] + fx_t'(si * 65536));
      p.lo[j] = fx_min(a[j], a[j] + fx_t'(sj * 65536));
      p.hi[j] = fx_max(a[j], a[j] + fx_t'(sj * 65536));
      p.geom = put_rows(p.row);
      return p;
    endfunction

    // Builds a tree over the primitives in list; returns the root address.
    function logic [31:0] build(ref prim_t list [$], input bit bottom);
      task_t q [$];
      task_t t;
      logic [31:0] lvl, root_addr;
      int tl0;
      lvl = bottom ? 32'h8000_0000 : 32'h0;
      tl0 = bottom ? BOTTOM_TL : 0;
      t.addr = alloc_node(tl0);
      root_addr = t.addr | lvl;
      t.first = 0;
      t.last = list.size();
      t.depth = 0;
      t.tl = tl0;
      q.push_back(t);
      while (q.size() > 0) begin
        t = q.pop_front();
        if (t.last - t.first == 1) begin
          prim_t p;
          p = list[t.first];
          wr(t.addr,      {1'b1, p.is_inst, 30'b0});
          wr(t.addr + 4,  p.geom);
          wr(t.addr + 8,  p.is_inst ? p.sub_root : 32'(p.id));
          for (int w = 3; w < 8; w++) wr(t.addr + 4*w, '0);
        end else begin
          int axis, mid;
          task_t c [2];
          fx_t lo [2], hi [2];
          axis = t.depth % 3;
          // insertion sort of the range by centroid
          for (int a = t.first + 1; a < t.last; a++) begin
            for (int b = a; b > t.first; b--) begin
              if (list[b].lo[axis] + list[b].hi[axis] < list[b-1].lo[axis] + list[b-1].hi[axis]) begin
                prim_t tmp;
                tmp = list[b]; list[b] = list[b-1]; list[b-1] = tmp;
              end
            end
          end
          mid = (t.first + t.last) / 2;
          for (int s = 0; s < 2; s++) begin
            int f, l, ctl;
            f = (s == 0) ? t.first : mid;
            l = (s == 0) ? mid : t.last;
            lo[s] = FX_MAX;
            hi[s] = FX_MIN;
            for (int e = f; e < l; e++) begin
              lo[s] = fx_min(lo[s], list[e].lo[axis]);
              hi[s] = fx_max(hi[s], list[e].hi[axis]);
            end
            lo[s] = lo[s] - fx_t'(MARGIN);
            hi[s] = hi[s] + fx_t'(MARGIN);
            if (!bottom && t.depth + 1 == 2) begin
              ctl = next_tl;
              next_tl++;
            end else begin
              ctl = t.tl;
            end
            c[s].addr  = alloc_node(ctl);
            c[s].first = f;
            c[s].last  = l;
            c[s].depth = t.depth + 1;
            c[s].tl    = ctl;
            q.push_back(c[s]);
          end
          wr(t.addr,      {2'b00, 2'(axis), 28'b0});
          wr(t.addr + 4,  c[0].addr | lvl);
          wr(t.addr + 8,  c[1].addr | lvl);
          wr(t.addr + 12, lo[0]);
          wr(t.addr + 16, hi[0]);
          wr(t.addr + 20, lo[1]);
          wr(t.addr + 24, hi[1]);
          wr(t.addr + 28, '0);
        end
      end
      return root_addr;
    endfunction

    // Default scene: n_world random world triangles and n_inst instances of
    // a bottom tree of n_obj object-space triangles.
    function void make(input int n_world, input int n_inst, input int n_obj, input int seed);
      int unsigned s;
      int aq [3];
      s = seed;
      for (int n = 0; n < n_obj; n++) begin
        for (int c = 0; c < 3; c++) aq[c] = hsh(s + 17*n + c) % 12;
        object.push_back(make_tri(1000 + n, n % 3, aq, (n % 2) ? 2 : -2, (n % 3 == 0) ? 1 : 2));
      end
      bottom_root = '0;
      if (n_obj > 0) bottom_root = build(object, 1'b1);
      for (int n = 0; n < n_world; n++) begin
        int si, sj;
        for (int c = 0; c < 3; c++) aq[c] = 4 + (hsh(s + 1000 + 31*n + c) % 56);
        si = ((n % 2) ? 8 : 4) * (((n / 3) % 2) ? -1 : 1);
        sj = ((n % 3) == 1) ? 8 : 4;
        world.push_back(make_tri(n, n % 3, aq, si, sj));
      end
      for (int n = 0; n < n_inst; n++) begin
        prim_t p;
        fx_t tr [3];
        for (int c = 0; c < 3; c++) tr[c] = fx_of_q(8 + (hsh(s + 5000 + 7*n + c) % 40));
        p.is_inst  = 1;
        p.id       = -1;
        p.sub_root = bottom_root;
        for (int r = 0; r < 3; r++) begin
          p.row[r] = '0;
          p.row[r][32*r +: 32] = FX_ONE;
          p.row[r][127:96]     = -tr[r];
        end
        for (int c = 0; c < 3; c++) begin
          p.lo[c] = FX_MAX;
          p.hi[c] = FX_MIN;
          foreach (object[o]) begin
            p.lo[c] = fx_min(p.lo[c], object[o].lo[c] + tr[c]);
            p.hi[c] = fx_max(p.hi[c], object[o].hi[c] + tr[c]);
          end
        end
        p.geom = put_rows(p.row);
        world.push_back(p);
      end
      root = build(world, 1'b0);
    endfunction

    // Triangle test exactly as the geometry datapath computes it.
    static function bit tri_test(input logic [127:0] row [3], input vec3_t o, input vec3_t d,
                                 input fx_t tbest, output fx_t t, output fx_t u, output fx_t v);
      vec3_t oo, dd;
      oo.x = fx_dot4(row[0], o, 1'b1);
      oo.y = fx_dot4(row[1], o, 1'b1);
      oo.z = fx_dot4(row[2], o, 1'b1);
      dd.x = fx_dot4(row[0], d, 1'b0);
      dd.y = fx_dot4(row[1], d, 1'b0);
      dd.z = fx_dot4(row[2], d, 1'b0);
      t = fx_div(fx_t'(-oo.z), dd.z);
      u = fx_add(oo.x, fx_mul(t, dd.x));
      v = fx_add(oo.y, fx_mul(t, dd.y));
      return (dd.z != 0) && (t >= 0) && (t < tbest) && (u >= 0) && (v >= 0) &&
             (fx_add(u, v) <= FX_ONE);
    endfunction

    // Reference closest hit; tie is set when another triangle has the same t.
    function hit_t trace(input ray_t r, input fx_t tmax, output bit tie);
      hit_t h;
      fx_t t, u, v;
      h = '{t: tmax, tri_id: TRI_NONE, u: '0, v: '0};
      tie = 0;
      foreach (world[w]) begin
        if (!world[w].is_inst) begin
          if (tri_test(world[w].row, r.org, r.dir, h.t, t, u, v)) begin
            h = '{t: t, tri_id: 32'(world[w].id), u: u, v: v};
            tie = 0;
          end else if (h.tri_id != TRI_NONE &&
                       tri_test(world[w].row, r.org, r.dir, h.t + 1, t, u, v) && t == h.t) begin
            tie = 1;
          end
        end else begin
          vec3_t oo, dd;
          oo.x = fx_dot4(world[w].row[0], r.org, 1'b1);
          oo.y = fx_dot4(world[w].row[1], r.org, 1'b1);
          oo.z = fx_dot4(world[w].row[2], r.org, 1'b1);
          dd.x = fx_dot4(world[w].row[0], r.dir, 1'b0);
          dd.y = fx_dot4(world[w].row[1], r.dir, 1'b0);
          dd.z = fx_dot4(world[w].row[2], r.dir, 1'b0);
          foreach (object[o]) begin
            if (tri_test(object[o].row, oo, dd, h.t, t, u, v)) begin
              h = '{t: t, tri_id: 32'(object[o].id), u: u, v: v};
              tie = 0;
            end else if (h.tri_id != TRI_NONE &&
                         tri_test(object[o].row, oo, dd, h.t + 1, t, u, v) && t == h.t) begin
              tie = 1;
            end
          end
        end
      end
      return h;
    endfunction

    // A ray from a point in front of the scene towards a random target.
    function ray_t make_ray(input int unsigned seed);
      ray_t r;
      fx_t tg [3];
      r.org.x = fx_of_q(24 + (hsh(seed) % 16));
      r.org.y = fx_of_q(24 + (hsh(seed + 1) % 16));
      r.org.z = fx_of_q(-40);
      for (int c = 0; c < 3; c++) tg[c] = fx_of_q(4 + (hsh(seed + 2 + c) % 60));
      r.dir.x = (tg[0] - r.org.x) >>> 4;
      r.dir.y = (tg[1] - r.org.y) >>> 4;
      r.dir.z = (tg[2] + fx_of_q(40)) >>> 4;
      if (r.dir.x == 0) r.dir.x = 1;
      if (r.dir.y == 0) r.dir.y = 1;
      r.inv.x = fx_div(FX_ONE, r.dir.x);
      r.inv.y = fx_div(FX_ONE, r.dir.y);
      r.inv.z = fx_div(FX_ONE, r.dir.z);
      return r;
    endfunction
  endclass
endpackage
