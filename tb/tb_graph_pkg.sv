// tb_graph_pkg: test graphs, memory images and reference results for the testbenches.
//
// graph_gen builds a directed weighted graph, lays it out for the accelerator in compressed
// sparse row form (in-edges for gather, out-edges for scatter), writes the initial active lists (every
// vertex active) and computes the reference single-source shortest paths by Bellman-Ford, or,
// for PageRank, rewrites the edge and vertex values and computes reference ranks.
// The degree distribution is skewed on purpose: one hub vertex has hub_deg in-edges, the
// others a few each, so that edge slots are shared both ways.
package tb_graph_pkg;
  import gas_pkg::*;

  class graph_gen;
    int          n, m, num_au;
    int          eu[$], ev[$];
    int unsigned ew[$];
    int          ioff[], ooff[];
    int          icol[], ocol[];
    int unsigned iw[];
    int unsigned ref_dist[];
    int unsigned img_addr[$];
    int unsigned img_data[$];
    int unsigned vi_base, ei_base, ed_base, oi_base, vd_base, words;
    int unsigned al_bv[], al_q[], al_qf[], al_nseg[];
    app_t        app = APP_SSSP;
    int unsigned pr_w[];
    real         ref_pr[];

    function void add_edge(int u, int v, int unsigned w);
      eu.push_back(u); ev.push_back(v); ew.push_back(w);
    endfunction

    // Directed graph: a random tree from vertex 0 (so every vertex is reachable), deg-1 more
    // random out-edges per vertex, and a hub with hub_deg in-edges and hub_deg/2 out-edges.
    function void build(int nv, int deg, int hub, int hub_deg, int max_w);
      int icnt[], ocnt[], ifill[], ofill[];
      n = nv;
      for (int v = 1; v < n; v++) add_edge($urandom_range(v - 1), v, $urandom_range(max_w, 1));
      for (int v = 0; v < n; v++)
        for (int k = 1; k < deg; k++) begin
          int u = $urandom_range(n - 1);
          if (u != v) add_edge(v, u, $urandom_range(max_w, 1));
        end
      for (int k = 0; k < hub_deg; k++) begin
        int u = $urandom_range(n - 1);
        if (u != hub) add_edge(u, hub, $urandom_range(max_w, 1));
        if (u != hub && k % 2 == 0) add_edge(hub, u, $urandom_range(max_w, 1));
      end
      m = eu.size();
      icnt = new[n]; ocnt = new[n]; ifill = new[n]; ofill = new[n];
      ioff = new[n + 1]; ooff = new[n + 1]; icol = new[m]; iw = new[m]; ocol = new[m];
      foreach (eu[i]) begin ocnt[eu[i]]++; icnt[ev[i]]++; end
      ioff[0] = 0; ooff[0] = 0;
      for (int v = 0; v < n; v++) begin
        ioff[v + 1] = ioff[v] + icnt[v];
        ooff[v + 1] = ooff[v] + ocnt[v];
        ifill[v] = ioff[v];
        ofill[v] = ooff[v];
      end
      foreach (eu[i]) begin
        icol[ifill[ev[i]]] = eu[i];
        iw[ifill[ev[i]]]   = ew[i];
        ifill[ev[i]]++;
        ocol[ofill[eu[i]]] = ev[i];
        ofill[eu[i]]++;
      end
    endfunction

    function void reference(int src);
      bit changed;
      ref_dist = new[n];
      foreach (ref_dist[i]) ref_dist[i] = 32'hFFFF_FFFF;
      ref_dist[src] = 0;
      do begin
        changed = 0;
        foreach (eu[i])
          if (ref_dist[eu[i]] != 32'hFFFF_FFFF && ref_dist[eu[i]] + ew[i] < ref_dist[ev[i]]) begin
            ref_dist[ev[i]] = ref_dist[eu[i]] + ew[i];
            changed = 1;
          end
      end while (changed);
    endfunction

    function void put(int unsigned a, int unsigned d);
      img_addr.push_back(a); img_data.push_back(d);
    endfunction

    // Memory image: Vertex Info (in/out offset pairs), in-edge Edge Info and Edge Data,
    // out-edge Edge Info, Vertex Data, then one active list per AU (all vertices active).
    function void layout(int au, int src);
      int unsigned a;
      num_au = au;
      vi_base = 0; ei_base = 2 * (n + 1); ed_base = ei_base + m; oi_base = ed_base + m;
      vd_base = oi_base + m;
      for (int v = 0; v <= n; v++) begin put(vi_base + 2 * v, ioff[v]); put(vi_base + 2 * v + 1, ooff[v]); end
      for (int e = 0; e < m; e++) begin
        put(ei_base + e, icol[e]); put(ed_base + e, iw[e]); put(oi_base + e, ocol[e]);
      end
      for (int v = 0; v < n; v++) put(vd_base + v, (v == src) ? 0 : 32'hFFFF_FFFF);
      a = vd_base + n;
      al_bv = new[au]; al_q = new[au]; al_qf = new[au]; al_nseg = new[au];
      for (int i = 0; i < au; i++) begin
        int lcount = (n - i + au - 1) / au;
        int nseg   = (lcount + 255) / 256;
        al_nseg[i] = nseg;
        al_bv[i] = a;  a += nseg * 8;
        al_q[i]  = a;  a += nseg;
        al_qf[i] = a;  a += (nseg + 31) / 32;
        for (int w = 0; w < nseg * 8; w++) begin
          int unsigned word = 0;
          for (int b = 0; b < 32; b++) if (w * 32 + b < lcount) word |= (32'd1 << b);
          put(al_bv[i] + w, word);
        end
        for (int s = 0; s < nseg; s++) put(al_q[i] + s, s);
        for (int w = 0; w < (nseg + 31) / 32; w++) begin
          int unsigned word = 0;
          for (int b = 0; b < 32; b++) if (w * 32 + b < nseg) word |= (32'd1 << b);
          put(al_qf[i] + w, word);
        end
      end
      words = a;
    endfunction

    // PageRank on the same graph: after layout(), the Edge Data of each in-edge u->v is
    // replaced by 1/outdeg(u) in 0.16 fixed point and every rank starts at 1.0 (16.16). The
    // reference iterates r(v) = 0.15 + 0.85 * sum r(u) * w(u->v) in floating point with the
    // same quantised weights until no rank moves by more than 1e-9.
    function void pagerank();
      real nr[];
      real diff;
      app = APP_PAGERANK;
      pr_w = new[m];
      for (int e = 0; e < m; e++) begin
        pr_w[e] = 32'd65536 / (ooff[icol[e] + 1] - ooff[icol[e]]);
        put(ed_base + e, pr_w[e]);
      end
      for (int v = 0; v < n; v++) put(vd_base + v, 32'd65536);
      ref_pr = new[n]; nr = new[n];
      foreach (ref_pr[v]) ref_pr[v] = 1.0;
      do begin
        diff = 0.0;
        for (int v = 0; v < n; v++) begin
          real acc = 0.0;
          for (int e = ioff[v]; e < ioff[v + 1]; e++) acc += ref_pr[icol[e]] * pr_w[e] / 65536.0;
          nr[v] = 0.15 + 0.85 * acc;
          if (nr[v] - ref_pr[v] > diff) diff = nr[v] - ref_pr[v];
          if (ref_pr[v] - nr[v] > diff) diff = ref_pr[v] - nr[v];
        end
        ref_pr = nr;
      end while (diff > 1e-9);
    endfunction

    function graph_cfg_t gcfg();
      graph_cfg_t c;
      c.vinfo_base = vi_base; c.einfo_base = ei_base; c.edata_base = ed_base;
      c.oinfo_base = oi_base; c.vdata_base = vd_base; c.app = app;
      return c;
    endfunction

    function al_cfg_t acfg(int i);
      al_cfg_t c;
      c.bv_base = al_bv[i]; c.q_base = al_q[i]; c.qf_base = al_qf[i];
      c.q_size = al_nseg[i]; c.q_count = al_nseg[i];
      return c;
    endfunction
  endclass
endpackage
