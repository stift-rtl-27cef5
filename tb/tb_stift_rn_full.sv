// tb_stift_rn_full: the STIFT reduction network at its default size (256
// MSs, INT16), running the synthetic reduction workloads used to evaluate
// the design, each cluster folded 512 times: single clusters of 2 to 128
// MSs; 128 MSs split into 64x2, 32x4, 16x8, 8x16, 4x32, 2x64 and 1x128
// clusters; and irregular layouts of 128 MSs. The checks are those of the
// 16-wide test (value, accumulating node, latency, one iteration per cycle),
// followed by one cluster spanning all 256 MSs with idle cycles, and the
// dot-product lengths of BERT layers (768 and 64).
//
// Structure and checks of the 16-wide test, summarised there:
// Runs the five mappings of a 16-wide network discussed for the design (one
// 16-MS cluster; two of 8; four of 4; eight of 2; four irregular clusters of
// 3, 5, 2 and 6 MSs), then random layouts of contiguous clusters with
// unused MSs in between, random iteration counts, several dot products per
// cluster streamed back to back and random idle cycles in the psum stream.
// Expected results are plain sums of the psums each cluster received.
// For every result the test checks the value, the accumulating node
// (c + 2^(l-1) for collapse point c at level l) and the latency: the
// result must appear exactly l clock edges after the edge that took in the
// cluster's last psum. It also loads a mapping in which two clusters want
// the same accumulator and expects cfg_error. Each mechanism (lateral merge,
// pass-through, tree-link, folding-link and second-root accumulation,
// multi-iteration folding, back-to-back dot products, idle cycles,
// reconfiguration, error flag) must occur at least once.
module tb_stift_rn_full;
  import stift_pkg::*;
  import stift_tb_pkg::*;

  localparam int unsigned N      = 256;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ITER_W = 16;
  localparam int unsigned LG     = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic                     cfg_load;
  as_cfg_t [N-1:0]          cfg_as;
  logic [N-1:0]             cfg_collapse;
  logic [N-1:0][ITER_W-1:0] cfg_iters;
  logic                     cfg_error;
  logic [N-1:0]             ms_valid;
  logic [N-1:0][DATA_W-1:0] ms_data;
  logic [N-1:0]             gb_valid;
  logic [N-1:0][DATA_W-1:0] gb_data;

  stift_rn dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // mechanism counters
  int n_lat = 0, n_fwd = 0, n_art = 0, n_fold = 0, n_root2 = 0;
  int n_multi = 0, n_b2b = 0, n_stall = 0, n_reconf = 0, n_err = 0;

  mapper #(N) m = new();

  // expected results per cluster
  typedef struct { logic [DATA_W-1:0] sum; int edge_in; } exp_t;
  exp_t exp_q[$][$];
  int   acc_of[$];
  int   lvl_of[$];
  int   pending;
  int   last_result_edge;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // result monitor
  always @(negedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N; p++) begin
        if (gb_valid[p]) begin
          int c;
          c = -1;
          foreach (acc_of[i]) if (acc_of[i] == p) c = i;
          if (c < 0 || exp_q[c].size() == 0) begin
            check(0, $sformatf("unexpected result on node %0d", p));
          end else begin
            exp_t e;
            e = exp_q[c].pop_front();
            check(gb_data[p] == e.sum,
                  $sformatf("cluster %0d node %0d: got %0d exp %0d", c, p, gb_data[p], e.sum));
            check(edge_no - e.edge_in == lvl_of[c],
                  $sformatf("cluster %0d latency %0d exp %0d", c, edge_no - e.edge_in, lvl_of[c]));
            pending--;
            last_result_edge = edge_no;
          end
        end
      end
    end
  end

  task automatic load_cfg();
    @(negedge clk);
    for (int p = 0; p < N; p++) begin
      cfg_as[p]       = m.as_cfg[p];
      cfg_collapse[p] = m.collapse[p];
      cfg_iters[p]    = ITER_W'(m.it_node[p]);
    end
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    n_reconf++;
  endtask

  // Stream ndots dot products through every cluster of the current mapping.
  task automatic run(int ndots, int stall_pct);
    int nclus, tmax, first_edge;
    int t[$];
    logic [DATA_W-1:0] part[$];
    nclus = m.iters.size();
    exp_q.delete(); acc_of.delete(); lvl_of.delete(); t.delete(); part.delete();
    tmax = 0;
    for (int c = 0; c < nclus; c++) begin
      exp_t q[$];
      if (ndots * m.iters[c] - 1 + m.col_lvl[c] > tmax) tmax = ndots * m.iters[c] - 1 + m.col_lvl[c];
      exp_q.push_back(q);
      acc_of.push_back(m.acc_node[c]);
      lvl_of.push_back(m.col_lvl[c]);
      t.push_back(0);
      part.push_back('0);
      if (m.iters[c] > 1) n_multi++;
    end
    if (ndots > 1) n_b2b++;
    pending = nclus * ndots;
    n_lat += m.n_lat; n_fwd += m.n_fwd; n_art += m.n_art_acc;
    n_fold += m.n_fold_acc; n_root2 += m.n_root2_acc;
    load_cfg();
    check(cfg_error == 1'b0, "cfg_error on a valid mapping");
    first_edge = edge_no + 1;
    forever begin
      bit busy;
      busy = 0;
      for (int c = 0; c < nclus; c++) if (t[c] < ndots * m.iters[c]) busy = 1;
      if (!busy) break;
      ms_valid = '0;
      for (int x = 0; x < N; x++) ms_data[x] = DATA_W'($urandom);
      if ($urandom_range(99) < stall_pct) begin
        n_stall++;
      end else begin
        for (int c = 0; c < nclus; c++) begin
          if (t[c] < ndots * m.iters[c]) begin
            for (int x = 0; x < N; x++) if (m.clus[x] == c) begin
              ms_valid[x] = 1'b1;
              part[c] += ms_data[x];
            end
            t[c]++;
            if (t[c] % m.iters[c] == 0) begin
              exp_t e;
              e.sum = part[c];
              e.edge_in = edge_no + 1;
              exp_q[c].push_back(e);
              part[c] = '0;
            end
          end
        end
      end
      @(negedge clk);
    end
    ms_valid = '0;
    repeat (LG + 4) @(negedge clk);
    check(pending == 0, $sformatf("%0d results missing", pending));
    // Without idle cycles every cluster takes one iteration per cycle: the
    // last result comes iterations-1+level edges after the first psum.
    if (stall_pct == 0)
      check(last_result_edge - first_edge == tmax,
            $sformatf("run took %0d cycles, expected %0d", last_result_edge - first_edge, tmax));
  endtask

  initial begin
    cfg_load = 0; cfg_as = '0; cfg_collapse = '0; cfg_iters = '0;
    ms_valid = '0; ms_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Single cluster, 2..128 MSs, 512 folding iterations.
    for (int sz = 2; sz <= 128; sz *= 2) begin
      m.set_sizes('{sz}, '{512});
      check(m.map(), $sformatf("single cluster %0d not routable: %s", sz, m.why));
      run(1, 0);
    end
    // One cluster over all 256 MSs: two dot products back to back with idle
    // cycles, accumulated in the second root.
    m.set_sizes('{N}, '{5});
    check(m.map(), "whole-array cluster not routable");
    run(2, 20);
    // Dot-product shapes of BERT layers: 768-long products on one 256-MS
    // cluster (3 folding iterations) and 64-long attention products on four
    // 64-MS clusters (no folding), several products back to back.
    m.set_sizes('{N}, '{768 / N});
    check(m.map(), "768-long dot products not routable");
    run(4, 0);
    m.set_sizes('{64, 64, 64, 64}, '{1, 1, 1, 1});
    check(m.map(), "64-long dot products not routable");
    run(8, 0);
    // Same-size clusters over 128 MSs: 64C-S2 .. 1C-S128.
    for (int sz = 2; sz <= 128; sz *= 2) begin
      int sizes[$], its[$];
      sizes.delete(); its.delete();
      for (int c = 0; c < 128 / sz; c++) begin sizes.push_back(sz); its.push_back(512); end
      m.set_sizes(sizes, its);
      check(m.map(), $sformatf("%0dC-S%0d not routable: %s", 128 / sz, sz, m.why));
      run(1, 0);
    end
    // Irregular clusters over 128 MSs.
    begin
      int routed, tries;
      routed = 0; tries = 0;
      while (routed < 4 && tries < 500) begin
        int sizes[$], its[$], left;
        sizes.delete(); its.delete();
        left = 128;
        while (left > 0) begin
          int sz;
          sz = (left <= 3) ? left : $urandom_range(left > 40 ? 40 : left, 2);
          if (left - sz == 1) sz++;
          sizes.push_back(sz); its.push_back(512);
          left -= sz;
        end
        tries++;
        m.set_sizes(sizes, its);
        if (sizes[sizes.size() - 1] < 2) continue;
        if (!m.map_retry(20)) continue;
        routed++;
        $display("irregular layout: %0d clusters, largest %0d MSs", sizes.size(), sizes.max()[0]);
        run(1, 0);
      end
      check(routed == 4, "irregular layouts not routed");
    end

    // Two clusters claiming the same accumulator (node 3) must be refused.
    @(negedge clk);
    cfg_as = '0; cfg_collapse = '0; cfg_iters = '0;
    cfg_as[1].en = 1; cfg_as[2].en = 1;
    cfg_collapse[1] = 1; cfg_collapse[2] = 1;
    cfg_iters[1] = 2; cfg_iters[2] = 2;
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    check(cfg_error == 1'b1, "conflicting accumulators not flagged");
    if (cfg_error) n_err++;

    $display("mechanisms: lateral=%0d passthrough=%0d tree_acc=%0d fold_acc=%0d root2_acc=%0d",
             n_lat, n_fwd, n_art, n_fold, n_root2);
    $display("            multi_iter=%0d back_to_back=%0d idle_cycles=%0d reconfig=%0d cfg_error=%0d",
             n_multi, n_b2b, n_stall, n_reconf, n_err);
    check(n_lat > 0, "no lateral merge");
    check(n_fwd > 0, "no pass-through");
    check(n_art > 0, "no tree-link accumulation");
    check(n_fold > 0, "no folding-link accumulation");
    check(n_root2 > 0, "no second-root accumulation");
    check(n_multi > 0, "no multi-iteration cluster");
    check(n_b2b > 0, "no back-to-back dot products");
    check(n_stall > 0, "no idle cycle");
    check(n_reconf > 1, "no reconfiguration");
    check(n_err > 0, "no configuration error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
