// stift_tb_pkg: test-side mapper for the STIFT reduction network.
//
// The mapper plays the role of the offline mapping tool. Given which
// multiplier switch belongs to which cluster (clusters are contiguous runs of
// at least two MSs) it computes the spatial routing of every adder switch and
// the collapse point of every cluster. Routing rule: the psums of a cluster
// climb the tree; wherever two parts of one cluster meet, either in one node
// or across the augmented link between two neighbours of one level, they are
// added at once; a part that is complete collapses in that node. Each node
// sends at most one part upward and one part sideways, and the accumulator
// of a collapse point (c + 2^(l-1)) must stay free. A cluster layout this
// greedy rule cannot route is reported as not mappable and skipped by the
// tests; the network hardware does not depend on this rule. map_retry()
// repeats the attempt with random choices of which neighbour receives a
// lateral merge.
package stift_tb_pkg;
  import stift_pkg::*;

  typedef struct {
    int c;     // cluster id, -1 for none
    int lo;
    int hi;
    bit use_l;
    bit use_r;
  } piece_t;

  class mapper #(int unsigned N = 16);
    // input
    int clus [N];          // cluster of each MS, -1 = unused
    int iters[$];          // iterations of each cluster
    // cluster extents
    int lo_c[$], hi_c[$];
    // output
    as_cfg_t   as_cfg  [N];
    bit        collapse[N];
    int        it_node [N];
    int        col_node[$];   // collapse point of each cluster
    int        col_lvl [$];   // its level
    int        acc_node[$];   // its accumulator
    // statistics
    int n_lat, n_fwd, n_art_acc, n_fold_acc, n_root2_acc;
    string why;
    // When both neighbours could receive a lateral merge, pick one at random
    // (otherwise the side where the rest of the cluster lies, else the right).
    bit random_recv = 0;

    function automatic int pos(int l, int k);
      return k * (1 << l) + (1 << (l - 1)) - 1;
    endfunction

    function automatic bit complete(piece_t pc);
      return pc.c >= 0 && pc.lo == lo_c[pc.c] && pc.hi == hi_c[pc.c];
    endfunction

    // Returns 1 if the layout in clus[] is routable; fills the outputs.
    function automatic bit map();
      int lg;
      piece_t up[N];
      bit reserved[N], collapsed[N];
      int nclus;
      lg = $clog2(N);
      nclus = iters.size();
      lo_c.delete(); hi_c.delete(); col_node.delete(); col_lvl.delete(); acc_node.delete();
      for (int c = 0; c < nclus; c++) begin
        lo_c.push_back(N); hi_c.push_back(-1);
        col_node.push_back(-1); col_lvl.push_back(0); acc_node.push_back(-1);
      end
      for (int x = 0; x < N; x++) if (clus[x] >= 0) begin
        if (x < lo_c[clus[x]]) lo_c[clus[x]] = x;
        if (x > hi_c[clus[x]]) hi_c[clus[x]] = x;
      end
      for (int p = 0; p < N; p++) begin
        as_cfg[p] = '0; collapse[p] = 0; it_node[p] = 0;
        reserved[p] = 0; collapsed[p] = 0; up[p] = '{-1, 0, 0, 0, 0};
      end
      n_lat = 0; n_fwd = 0; n_art_acc = 0; n_fold_acc = 0; n_root2_acc = 0;
      why = "";

      for (int l = 1; l <= lg; l++) begin
        int cnt;
        piece_t lp[], rp[];   // left-side and right-side part of each node
        bit single[];         // both children form one part
        bit lat_done[];
        cnt = N >> l;
        lp = new[cnt]; rp = new[cnt]; single = new[cnt]; lat_done = new[cnt];
        // parts arriving from the children
        for (int k = 0; k < cnt; k++) begin
          int p;
          piece_t pl, pr;
          p = pos(l, k);
          if (l == 1) begin
            pl = '{clus[p], p, p, 1, 0};
            pr = '{clus[p + 1], p + 1, p + 1, 0, 1};
          end else begin
            int cl, cr;
            cl = p - (1 << (l - 2)); cr = p + (1 << (l - 2));
            pl = up[cl]; pr = up[cr];
            if (collapsed[cl] || reserved[cl]) pl.c = -1;
            if (collapsed[cr] || reserved[cr]) pr.c = -1;
            pl.use_l = 1; pl.use_r = 0; pr.use_l = 0; pr.use_r = 1;
          end
          if (reserved[p]) begin
            if (pl.c >= 0 || pr.c >= 0) begin
              why = $sformatf("accumulator node %0d is needed as adder", p);
              return 0;
            end
            pl.c = -1; pr.c = -1;
          end
          single[k] = 0;
          if (pl.c >= 0 && pl.c == pr.c) begin
            pl = '{pl.c, pl.lo, pr.hi, 1, 1};
            pr = pl;
            single[k] = 1;
          end
          lp[k] = pl; rp[k] = pr;
          lat_done[k] = 0;
        end
        // merges over the augmented links
        for (int k = 1; k + 1 < cnt; k += 2) begin
          piece_t a, b, m;
          bit a_other, b_other, recv_b;
          int pa, pb;
          a = rp[k]; b = lp[k + 1];
          if (a.c < 0 || a.c != b.c) continue;
          pa = pos(l, k); pb = pos(l, k + 1);
          a_other = !single[k] && lp[k].c >= 0;
          b_other = !single[k + 1] && rp[k + 1].c >= 0;
          if (!a_other && !b_other && random_recv) recv_b = 1'($urandom);
          else if (!a_other && !b_other) recv_b = !(lo_c[a.c] < a.lo);  // toward the rest
          else if (!b_other) recv_b = 1;
          else if (!a_other) recv_b = 0;
          else begin
            why = $sformatf("lateral merge at level %0d nodes %0d/%0d blocked", l, pa, pb);
            return 0;
          end
          m = '{a.c, a.lo, b.hi, 0, 0};
          n_lat++;
          if (recv_b) begin
            // A sends sideways, B adds
            as_cfg[pa].en = 1;
            if (single[k]) begin
              as_cfg[pa].add_l = 1; as_cfg[pa].add_r = 1; as_cfg[pa].sum_to_lat = 1;
              lp[k].c = -1;
            end else begin
              as_cfg[pa].fwd = FWD_R; n_fwd++;
            end
            rp[k].c = -1;
            m.use_l = b.use_l; m.use_r = b.use_r;
            as_cfg[pb].add_lat = 1;
            lp[k + 1] = m;
            if (single[k + 1]) rp[k + 1] = m;
            lat_done[k + 1] = 1;
          end else begin
            // B sends sideways, A adds
            as_cfg[pb].en = 1;
            if (single[k + 1]) begin
              as_cfg[pb].add_l = 1; as_cfg[pb].add_r = 1; as_cfg[pb].sum_to_lat = 1;
              rp[k + 1].c = -1;
            end else begin
              as_cfg[pb].fwd = FWD_L; n_fwd++;
            end
            lp[k + 1].c = -1;
            m.use_l = a.use_l; m.use_r = a.use_r;
            as_cfg[pa].add_lat = 1;
            rp[k] = m;
            if (single[k]) lp[k] = m;
            lat_done[k] = 1;
          end
        end
        // what each node sends upward
        for (int k = 0; k < cnt; k++) begin
          int p, np;
          piece_t o;
          p = pos(l, k);
          np = 0;
          o.c = -1;
          if (lp[k].c >= 0) begin o = lp[k]; np++; end
          if (rp[k].c >= 0 && !(lp[k].c >= 0 && (single[k] || lat_done[k]) &&
                                lp[k].c == rp[k].c && lp[k].lo == rp[k].lo)) begin
            o = rp[k]; np++;
          end
          if (np > 1) begin
            why = $sformatf("node %0d must send two parts upward", p);
            return 0;
          end
          up[p] = o;
          if (o.c < 0) continue;
          as_cfg[p].en = 1;
          if (o.use_l) as_cfg[p].add_l = 1;
          if (o.use_r) as_cfg[p].add_r = 1;
          if (complete(o)) begin
            int a;
            a = p + (1 << (l - 1));
            if (reserved[a]) begin
              why = $sformatf("accumulator %0d wanted twice", a);
              return 0;
            end
            reserved[a] = 1;
            collapsed[p] = 1;
            collapse[p] = 1;
            it_node[p] = iters[o.c];
            col_node[o.c] = p; col_lvl[o.c] = l; acc_node[o.c] = a;
            if (a == N - 1) n_root2_acc++;
            else if (k % 2 == 0) n_art_acc++;
            else n_fold_acc++;
          end else if (l == lg) begin
            why = "part left incomplete at the root";
            return 0;
          end
        end
      end
      for (int c = 0; c < nclus; c++)
        if (col_node[c] < 0) begin
          why = $sformatf("cluster %0d never collapses", c);
          return 0;
        end
      return 1;
    endfunction

    // Tries the deterministic rule first, then up to tries-1 random choices.
    function automatic bit map_retry(int tries);
      random_recv = 0;
      if (map()) return 1;
      random_recv = 1;
      for (int i = 1; i < tries; i++) if (map()) begin
        random_recv = 0;
        return 1;
      end
      random_recv = 0;
      return 0;
    endfunction

    // Contiguous clusters of the given sizes, packed from MS 0.
    function automatic void set_sizes(int sizes[$], int its[$]);
      int x;
      for (int i = 0; i < N; i++) clus[i] = -1;
      iters = its;
      x = 0;
      foreach (sizes[c]) begin
        for (int j = 0; j < sizes[c]; j++) clus[x + j] = c;
        x += sizes[c];
      end
    endfunction
  endclass

endpackage
