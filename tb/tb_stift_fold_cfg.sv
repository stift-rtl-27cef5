// tb_stift_fold_cfg: unit test of the folding configuration unit, 32 MSs.
//
// Random sets of collapse points, iteration counts and adder-switch busy
// flags. The expected accumulator of a collapse point at level l, index k is
// computed here from the tree geometry: the parent for even k, the node at
// in-order position (k+1)*2^l - 1 reached by a folding link for odd k (both
// are the same position), with multiplexer select l-1. The error flag must
// rise exactly when two collapse points share an accumulator, an
// accumulator is busy as an adder switch, or a collapse point is not one.
module tb_stift_fold_cfg;
  import stift_pkg::*;

  localparam int unsigned N      = 32;
  localparam int unsigned ITER_W = 16;

  logic [N-1:0]             collapse, as_busy, acc_en;
  logic [N-1:0][ITER_W-1:0] iters, acc_iters;
  logic [N-1:0][SEL_W-1:0]  acc_sel;
  logic                     cfg_error;

  stift_fold_cfg #(.NUM_MS(N), .ITER_W(ITER_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int n_err_cases = 0;
    for (int t = 0; t < 3000; t++) begin
      int hits[N], tgt_sel[N], tgt_it[N];
      bit exp_err;
      collapse = '0; as_busy = '0; iters = '0;
      for (int p = 0; p < N - 1; p++) begin
        if ($urandom_range(5) == 0) collapse[p] = 1'b1;
        iters[p] = ITER_W'($urandom);
      end
      as_busy = collapse;
      if ($urandom_range(3) == 0) as_busy[$urandom_range(N - 1)] ^= 1'b1;
      for (int p = 0; p < N; p++) begin hits[p] = 0; tgt_sel[p] = 0; tgt_it[p] = 0; end
      exp_err = 0;
      for (int p = 0; p < N - 1; p++) begin
        if (collapse[p]) begin
          int l, k, tgt;
          l = 1;
          while (p & (1 << (l - 1))) l++;
          k = p >> l;
          tgt = ((k + 1) << l) - 1;
          hits[tgt]++;
          tgt_sel[tgt] = l - 1;
          tgt_it[tgt] = iters[p];
          if (!as_busy[p]) exp_err = 1;
        end
      end
      for (int p = 0; p < N; p++) if (hits[p] > 1 || (hits[p] > 0 && as_busy[p])) exp_err = 1;
      #1;
      if (exp_err) n_err_cases++;
      check(cfg_error == exp_err, $sformatf("trial %0d error flag %0d exp %0d", t, cfg_error, exp_err));
      if (!exp_err) begin
        for (int p = 0; p < N; p++) begin
          check(acc_en[p] == (hits[p] == 1), $sformatf("trial %0d acc_en[%0d]", t, p));
          if (hits[p] == 1) begin
            check(acc_sel[p] == SEL_W'(tgt_sel[p]), $sformatf("trial %0d acc_sel[%0d]", t, p));
            check(acc_iters[p] == ITER_W'(tgt_it[p]), $sformatf("trial %0d acc_iters[%0d]", t, p));
          end
        end
      end
    end
    check(n_err_cases > 0 && n_err_cases < 3000, "error cases not mixed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
