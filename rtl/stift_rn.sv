// stift_rn: STIFT, a spatio-temporal integrated folding tree, the reduction
// network (RN) of a flexible DNN accelerator.
//
// NUM_MS multiplier switches (MSs) deliver one psum each per cycle. The RN
// reduces every cluster (a contiguous group of MSs working on one dot
// product) spatially over a binary tree of extended adder switches (eASs)
// and, when a dot product needs several folding iterations, accumulates the
// per-iteration results temporally inside a free eAS of the same tree, so no
// separate accumulator bank is needed. Its links are:
//
//  * the ordinary tree links of an adder tree (left child / right child);
//  * augmented (lateral) links between neighbouring nodes of one level that
//    do not share a parent, so clusters of any size and place can reduce
//    side by side without conflicts;
//  * a second root next to the first one;
//  * folding links: node p of level L receives from p - 2^(lvl-1) for
//    lvl = 1..L-1, and the second root from the right spine of the tree and
//    the first root. A cluster that collapses at node c of level l is
//    accumulated by node c + 2^(l-1) (see stift_fold_cfg).
//
// Nodes are numbered in in-order position (see stift_pkg): tree nodes
// 0..NUM_MS-2, second root NUM_MS-1. Node p of level 1 takes MSs p and p+1.
//
// Interface. cfg_load latches a mapping: per node its adder-switch settings
// (cfg_as), whether a cluster collapses there (cfg_collapse) and that
// cluster's iteration count (cfg_iters). The accumulator settings are
// derived from it at load time; cfg_error reports a mapping the folding
// links cannot serve. Load a configuration while no psum is in flight.
// Each result leaves on gb_valid/gb_data of the accumulating node, for the
// global buffer.
//
// Timing. One register per tree level and one in the accumulator: for a
// cluster that collapses at level l, the result is on gb_* l clock edges
// after the edge that took in the cluster's last psums (l-1 tree registers
// above level 1 plus the accumulator). Every cluster accepts one iteration
// per cycle, so I iterations take I-1+l cycles. Level-1 nodes can never
// accumulate, so their gb_* ports stay zero.
//
// The topology, the eAS modes and the accumulator choice follow the design;
// the spatial routing itself (which adder switch adds what) is left to the
// mapper that fills cfg_as, as in the design. The configuration registers
// and the per-node result ports are this implementation's choice.
module stift_rn
  import stift_pkg::*;
#(
  parameter int unsigned NUM_MS = 256,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ITER_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration from the mapper
  input  logic                          cfg_load,
  input  as_cfg_t [NUM_MS-1:0]          cfg_as,
  input  logic [NUM_MS-1:0]             cfg_collapse,
  input  logic [NUM_MS-1:0][ITER_W-1:0] cfg_iters,
  output logic                          cfg_error,
  // psums from the multiplier switches
  input  logic [NUM_MS-1:0]             ms_valid,
  input  logic [NUM_MS-1:0][DATA_W-1:0] ms_data,
  // results to the global buffer, one port per eAS
  output logic [NUM_MS-1:0]             gb_valid,
  output logic [NUM_MS-1:0][DATA_W-1:0] gb_data
);

  localparam int unsigned LOG_N = $clog2(NUM_MS);

  // ---------------- configuration registers ----------------
  logic [NUM_MS-1:0]             busy;
  logic [NUM_MS-1:0]             acc_en_d;
  logic [NUM_MS-1:0][SEL_W-1:0]  acc_sel_d;
  logic [NUM_MS-1:0][ITER_W-1:0] acc_iters_d;
  logic                          err_d;

  as_cfg_t [NUM_MS-1:0]          as_q;
  logic [NUM_MS-1:0]             acc_en_q;
  logic [NUM_MS-1:0][SEL_W-1:0]  acc_sel_q;
  logic [NUM_MS-1:0][ITER_W-1:0] acc_iters_q;

  always_comb begin
    for (int unsigned p = 0; p < NUM_MS; p++) busy[p] = cfg_as[p].en;
  end

  stift_fold_cfg #(.NUM_MS(NUM_MS), .ITER_W(ITER_W)) u_fold_cfg (
    .collapse  (cfg_collapse),
    .iters     (cfg_iters),
    .as_busy   (busy),
    .acc_en    (acc_en_d),
    .acc_sel   (acc_sel_d),
    .acc_iters (acc_iters_d),
    .cfg_error (err_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_q        <= '0;
      acc_en_q    <= '0;
      acc_sel_q   <= '0;
      acc_iters_q <= '0;
      cfg_error   <= 1'b0;
    end else if (cfg_load) begin
      as_q        <= cfg_as;
      acc_en_q    <= acc_en_d;
      acc_sel_q   <= acc_sel_d;
      acc_iters_q <= acc_iters_d;
      cfg_error   <= err_d;
    end
  end

  // ---------------- nodes and links ----------------
  for (genvar p = 0; p < NUM_MS; p++) begin : g_node
    localparam int unsigned L      = rn_level(p, NUM_MS);
    localparam bit          IS_R2  = (p == NUM_MS - 1);
    localparam int unsigned K      = IS_R2 ? 0 : (p >> L);
    localparam int unsigned CNT    = IS_R2 ? 1 : (NUM_MS >> L);
    localparam bit          LAT_R  = !IS_R2 && (K % 2 == 1) && (K + 1 < CNT);
    localparam bit          LAT_L  = !IS_R2 && (K % 2 == 0) && (K >= 1);
    localparam int unsigned NSRC   = (L > 1) ? L - 1 : 1;
    localparam int unsigned HALF   = (L >= 2) ? (1 << (L - 2)) : 0;

    logic                          l_v, r_v, li_v, lo_v, up_v;
    logic [DATA_W-1:0]             l_d, r_d, li_d, lo_d, up_d;
    logic [NSRC-1:0]               s_v;
    logic [NSRC-1:0][DATA_W-1:0]   s_d;

    // children
    if (IS_R2) begin : g_nochild
      assign l_v = 1'b0;  assign l_d = '0;
      assign r_v = 1'b0;  assign r_d = '0;
    end else if (L == 1) begin : g_leaves
      assign l_v = ms_valid[p];      assign l_d = ms_data[p];
      assign r_v = ms_valid[p + 1];  assign r_d = ms_data[p + 1];
    end else begin : g_children
      assign l_v = g_node[p - HALF].up_v;  assign l_d = g_node[p - HALF].up_d;
      assign r_v = g_node[p + HALF].up_v;  assign r_d = g_node[p + HALF].up_d;
    end

    // augmented link to the neighbour with a different parent
    if (LAT_R) begin : g_lat_r
      assign li_v = g_node[p + (1 << L)].lo_v;
      assign li_d = g_node[p + (1 << L)].lo_d;
    end else if (LAT_L) begin : g_lat_l
      assign li_v = g_node[p - (1 << L)].lo_v;
      assign li_d = g_node[p - (1 << L)].lo_d;
    end else begin : g_no_lat
      assign li_v = 1'b0;
      assign li_d = '0;
    end

    // left-input multiplexer sources: left child and folding links
    if (L > 1) begin : g_src
      for (genvar s = 1; s < L; s++) begin : g_s
        assign s_v[s - 1] = g_node[p - (1 << (s - 1))].up_v;
        assign s_d[s - 1] = g_node[p - (1 << (s - 1))].up_d;
      end
    end else begin : g_no_src
      assign s_v = '0;
      assign s_d = '0;
    end

    stift_eas #(.DATA_W(DATA_W), .ITER_W(ITER_W), .NSRC(NSRC)) u_eas (
      .clk           (clk),
      .rst_n         (rst_n),
      .as_cfg        (as_q[p]),
      .acc_en        (acc_en_q[p] && (L > 1)),
      .acc_sel       (acc_sel_q[p]),
      .acc_iters     (acc_iters_q[p]),
      .l_valid       (l_v),
      .l_data        (l_d),
      .r_valid       (r_v),
      .r_data        (r_d),
      .lat_in_valid  (li_v),
      .lat_in_data   (li_d),
      .lat_out_valid (lo_v),
      .lat_out_data  (lo_d),
      .src_valid     (s_v),
      .src_data      (s_d),
      .up_valid      (up_v),
      .up_data       (up_d),
      .gb_valid      (gb_valid[p]),
      .gb_data       (gb_data[p])
    );
  end

  initial begin
    assert (NUM_MS >= 4 && (1 << LOG_N) == NUM_MS)
      else $error("NUM_MS must be a power of two, at least 4");
    assert (LOG_N <= (1 << SEL_W))
      else $error("SEL_W too narrow for NUM_MS");
  end

endmodule
