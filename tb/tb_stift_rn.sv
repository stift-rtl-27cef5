// tb_stift_rn: end-to-end test of the STIFT reduction network, 16 MSs wide.
//
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
module tb_stift_rn;
  import stift_pkg::*;
  import stift_tb_pkg::*;

  localparam int unsigned N      = 16;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ITER_W = 16;
  localparam int unsigned LG     = $clog2(N);
  localparam int unsigned NRAND  = 300;

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

  stift_rn #(.NUM_MS(N), .DATA_W(DATA_W), .ITER_W(ITER_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  // mechanism counters
  int n_lat = 0, n_fwd = 0, n_art = 0, n_fold = 0, n_root2 = 0;
  int n_multi = 0, n_b2b = 0, n_stall = 0, n_reconf = 0, n_err = 0;
  int n_mapped = 0, n_unmappable = 0;

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

    // The five mappings of the 16-wide example.
    begin
      int sz[$][$];
      int it[$][$];
      sz = '{'{16}, '{8, 8}, '{4, 4, 4, 4}, '{2, 2, 2, 2, 2, 2, 2, 2}, '{3, 5, 2, 6}};
      it = '{'{1}, '{2, 2}, '{4, 4, 4, 4}, '{8, 8, 8, 8, 8, 8, 8, 8}, '{6, 4, 8, 3}};
      foreach (sz[i]) begin
        m.set_sizes(sz[i], it[i]);
        check(m.map(), $sformatf("example mapping %0d not routable: %s", i + 1, m.why));
        if (i == 0) check(m.acc_node[0] == N - 1, "mapping 1 must accumulate in the second root");
        if (i == 1) check(m.acc_node[0] == N / 2 - 1 && m.acc_node[1] == N - 1,
                          "mapping 2 accumulators must be the two roots");
        run(2, 0);
      end
    end

    // Random layouts.
    for (int r = 0; r < NRAND; r++) begin
      int x, c;
      int its[$];
      its.delete();
      for (int i = 0; i < N; i++) m.clus[i] = -1;
      x = 0; c = 0;
      while (x < N - 1) begin
        int gap, sz;
        gap = ($urandom_range(3) == 0) ? $urandom_range(2) : 0;
        x += gap;
        if (x >= N - 1) break;
        sz = $urandom_range(N - x, 2);
        if ($urandom_range(1) != 0) sz = $urandom_range((N - x < 6) ? N - x : 6, 2);
        for (int j = 0; j < sz; j++) m.clus[x + j] = c;
        its.push_back($urandom_range(6, 1));
        c++;
        x += sz;
      end
      m.iters = its;
      if (c == 0) continue;
      if (!m.map_retry(20)) begin
        if (n_unmappable < 5) $display("not routable: %s", m.why);
        n_unmappable++;
        continue;
      end
      n_mapped++;
      run($urandom_range(3, 1), 15);
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
    $display("random layouts: routed=%0d not routable by the mapper=%0d", n_mapped, n_unmappable);
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
    check(n_mapped > 0, "no random layout routed");
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
