// stift_fold_cfg: folding configuration of a STIFT reduction network.
//
// Once the spatial (adder-switch) routing of a mapping is known, each
// cluster ends at one eAS, its collapse point. This unit turns the list of
// collapse points into the accumulator settings of the network: a cluster
// that collapses at node c of level l is accumulated by node c + 2^(l-1).
// When c has an even index in its level that node is the parent, reached by
// the ordinary tree link; when the index is odd it is a higher node reached
// over a folding link (for the first root, the second root). The
// accumulator's left-input multiplexer is set to the source c, whose select
// value is l-1, and the cluster's iteration count is copied to it.
//
// The unit also flags a mapping it cannot honour: two clusters that need the
// same accumulator, or an accumulator that is already busy as an adder
// switch.
//
// Purely combinational; the network registers its configuration.
// Following the design: the accumulator choice and the link-building rule.
// This implementation's own choice: the error flag and the per-node
// iteration-count encoding.
module stift_fold_cfg
  import stift_pkg::*;
#(
  parameter int unsigned NUM_MS = 256,
  parameter int unsigned ITER_W = 16
) (
  input  logic [NUM_MS-1:0]             collapse,   // node is a collapse point
  input  logic [NUM_MS-1:0][ITER_W-1:0] iters,      // iterations of that cluster
  input  logic [NUM_MS-1:0]             as_busy,    // node is an adder switch
  output logic [NUM_MS-1:0]             acc_en,
  output logic [NUM_MS-1:0][SEL_W-1:0]  acc_sel,
  output logic [NUM_MS-1:0][ITER_W-1:0] acc_iters,
  output logic                          cfg_error
);

  logic [NUM_MS-1:0] node_err;

  for (genvar a = 0; a < NUM_MS; a++) begin : g_node
    localparam int unsigned LA = rn_level(a, NUM_MS);

    always_comb begin
      int unsigned hits;
      hits         = 0;
      acc_en[a]    = 1'b0;
      acc_sel[a]   = '0;
      acc_iters[a] = '0;
      for (int unsigned s = 1; s < LA; s++) begin
        if (collapse[a - (1 << (s - 1))]) begin
          hits++;
          acc_en[a]    = 1'b1;
          acc_sel[a]   = SEL_W'(s - 1);
          acc_iters[a] = iters[a - (1 << (s - 1))];
        end
      end
      node_err[a] = (hits > 1) || (acc_en[a] && as_busy[a]) ||
                    (collapse[a] && !as_busy[a]);
    end
  end

  assign cfg_error = |node_err;

endmodule
