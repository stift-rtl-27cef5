// tb_stift_eas: unit test of the extended adder switch, as a level-4 node
// (three left-input sources).
//
// Adder-switch mode: random settings and operands; the lateral output is
// checked in the same cycle and the upward register one clock later, against
// sums computed here. Accumulator mode: a random source and iteration count,
// a stream of psums with random gaps on the selected source and noise on the
// others; every total must appear on gb_* one clock after its last psum, and
// the accumulator must restart cleanly for the next dot product.
module tb_stift_eas;
  import stift_pkg::*;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ITER_W = 16;
  localparam int unsigned NSRC   = 3;

  logic clk = 0, rst_n = 0;
  as_cfg_t                     as_cfg;
  logic                        acc_en;
  logic [SEL_W-1:0]            acc_sel;
  logic [ITER_W-1:0]           acc_iters;
  logic                        l_valid, r_valid, lat_in_valid;
  logic [DATA_W-1:0]           l_data, r_data, lat_in_data;
  logic                        lat_out_valid, up_valid, gb_valid;
  logic [DATA_W-1:0]           lat_out_data, up_data, gb_data;
  logic [NSRC-1:0]             src_valid;
  logic [NSRC-1:0][DATA_W-1:0] src_data;

  stift_eas #(.DATA_W(DATA_W), .ITER_W(ITER_W), .NSRC(NSRC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    as_cfg = '0; acc_en = 0; acc_sel = '0; acc_iters = '0;
    l_valid = 0; r_valid = 0; lat_in_valid = 0;
    l_data = '0; r_data = '0; lat_in_data = '0;
    src_valid = '0; src_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- adder-switch mode ----------------
    for (int i = 0; i < 400; i++) begin
      logic [DATA_W-1:0] exp_lat, exp_up, s_lr;
      bit v, exp_lat_v, exp_up_v;
      @(negedge clk);
      as_cfg.en         = 1;
      as_cfg.add_l      = 1'($urandom);
      as_cfg.add_r      = 1'($urandom);
      as_cfg.add_lat    = 1'($urandom);
      as_cfg.sum_to_lat = 1'($urandom);
      as_cfg.fwd        = fwd_sel_e'($urandom_range(2));
      v = ($urandom_range(3) != 0);
      l_valid = v; r_valid = v; lat_in_valid = v;
      l_data = DATA_W'($urandom); r_data = DATA_W'($urandom);
      lat_in_data = DATA_W'($urandom);
      s_lr = (as_cfg.add_l ? l_data : 0) + (as_cfg.add_r ? r_data : 0);
      if (as_cfg.sum_to_lat) begin
        exp_lat   = s_lr;
        exp_lat_v = v && (as_cfg.add_l || as_cfg.add_r);
        exp_up    = (as_cfg.fwd == FWD_L) ? l_data : (as_cfg.fwd == FWD_R) ? r_data : 0;
        exp_up_v  = v && (as_cfg.fwd != FWD_NONE);
      end else begin
        exp_up    = s_lr + (as_cfg.add_lat ? lat_in_data : 0);
        exp_up_v  = v && (as_cfg.add_l || as_cfg.add_r || as_cfg.add_lat);
        exp_lat   = (as_cfg.fwd == FWD_L) ? l_data : (as_cfg.fwd == FWD_R) ? r_data : 0;
        exp_lat_v = v && (as_cfg.fwd != FWD_NONE);
      end
      #1;
      check(lat_out_valid == exp_lat_v, $sformatf("lat valid %0d", i));
      if (exp_lat_v) check(lat_out_data == exp_lat, $sformatf("lat data %0d", i));
      @(posedge clk); #1;
      check(up_valid == exp_up_v, $sformatf("up valid %0d", i));
      if (exp_up_v) check(up_data == exp_up, $sformatf("up data %0d: %0h vs %0h", i, up_data, exp_up));
      check(gb_valid == 1'b0, "gb output in adder-switch mode");
    end

    // idle node sends nothing upward
    @(negedge clk);
    as_cfg = '0; l_valid = 1; r_valid = 1;
    @(posedge clk); #1;
    check(up_valid == 1'b0, "idle node drives up");

    // ---------------- accumulator mode ----------------
    @(negedge clk);
    l_valid = 0; r_valid = 0; lat_in_valid = 0;
    for (int trial = 0; trial < 40; trial++) begin
      int sel, its, ndots;
      @(negedge clk);
      sel = $urandom_range(NSRC - 1);
      its = $urandom_range(9, 1);
      ndots = $urandom_range(3, 1);
      as_cfg = '0; acc_en = 1; acc_sel = SEL_W'(sel); acc_iters = ITER_W'(its);
      for (int d = 0; d < ndots; d++) begin
        logic [DATA_W-1:0] tot;
        tot = '0;
        for (int j = 0; j < its; j++) begin
          // optional gap
          while ($urandom_range(3) == 0) begin
            src_valid = NSRC'($urandom) & ~(NSRC'(1) << sel);
            src_data  = {NSRC{DATA_W'($urandom)}};
            @(posedge clk); #1;
            check(gb_valid == 1'b0, "result during gap");
            @(negedge clk);
          end
          src_valid = NSRC'($urandom);
          src_valid[sel] = 1'b1;
          for (int s = 0; s < NSRC; s++) src_data[s] = DATA_W'($urandom);
          tot += src_data[sel];
          @(posedge clk); #1;
          if (j == its - 1) begin
            check(gb_valid == 1'b1, $sformatf("no result trial %0d dot %0d", trial, d));
            check(gb_data == tot, $sformatf("acc trial %0d: %0h vs %0h", trial, gb_data, tot));
          end else begin
            check(gb_valid == 1'b0, $sformatf("early result trial %0d", trial));
          end
          check(up_valid == 1'b0, "accumulator drives up");
          @(negedge clk);
        end
      end
      src_valid = '0;
      acc_en = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
