// stift_eas: extended adder switch (eAS), the single node type of the STIFT
// reduction network.
//
// An eAS works in one of two modes, chosen per node by the configuration:
//
//  * Adder switch (as_cfg.en): a spatial psum generator. Up to three psums
//    meet in the adder: the left child, the right child and the lateral
//    (augmented) link from the neighbouring node of the same level. The
//    result goes either up to the parent (registered) or across the lateral
//    link (combinational, so the neighbour adds it in the same cycle). A
//    second child psum of a different cluster can be passed on unchanged on
//    the output the sum does not use (as_cfg.fwd). The lateral output never
//    depends on the lateral input, so two neighbours cannot form a loop.
//
//  * Accumulator (acc_en): a temporal psum reducer. The left operand comes
//    from a multiplexer over the NSRC lower nodes linked to this one (left
//    child and folding links), selected by acc_sel; the right operand is the
//    internal accumulation register. After acc_iters psums the total is sent
//    to the global buffer on gb_* and the register restarts from zero, so
//    consecutive folding iterations and consecutive dot products stream at
//    one psum per cycle with no bubble.
//
// The same two-input adder serves both modes, as in the design; the lateral
// psum is added by a second adder stage.
//
// Timing: up_* and gb_* are registered (one cycle per tree level, one more
// cycle in the accumulator); lat_out_* is combinational from the child
// inputs. A psum in flight is marked by its valid bit; there is no
// back-pressure, matching the stall-free pipeline of the design.
//
// Choices of this implementation: the valid bits, the iteration counter and
// the reset behaviour (asynchronous, active low, clearing valid bits and the
// accumulator) are not specified by the design. Arithmetic wraps modulo
// 2^DATA_W (INT16 by default).
module stift_eas
  import stift_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ITER_W = 16,
  parameter int unsigned NSRC   = 1   // left-input sources for accumulation
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration (held stable while psums flow)
  input  as_cfg_t           as_cfg,
  input  logic              acc_en,
  input  logic [SEL_W-1:0]  acc_sel,
  input  logic [ITER_W-1:0] acc_iters,
  // children
  input  logic              l_valid,
  input  logic [DATA_W-1:0] l_data,
  input  logic              r_valid,
  input  logic [DATA_W-1:0] r_data,
  // lateral (augmented) link
  input  logic              lat_in_valid,
  input  logic [DATA_W-1:0] lat_in_data,
  output logic              lat_out_valid,
  output logic [DATA_W-1:0] lat_out_data,
  // accumulation sources: left child and folding links
  input  logic [NSRC-1:0]             src_valid,
  input  logic [NSRC-1:0][DATA_W-1:0] src_data,
  // to the parent
  output logic              up_valid,
  output logic [DATA_W-1:0] up_data,
  // to the global buffer
  output logic              gb_valid,
  output logic [DATA_W-1:0] gb_data
);

  logic              acc_mode;
  logic              sel_valid;
  logic [DATA_W-1:0] sel_data;
  logic [DATA_W-1:0] acc_q;
  logic [ITER_W-1:0] cnt_q;

  logic [DATA_W-1:0] op_a, op_b, sum_ab, sum_all;
  logic              v_ab, v_all;
  logic              fwd_valid;
  logic [DATA_W-1:0] fwd_data;

  assign acc_mode = acc_en && !as_cfg.en;

  // Left-input multiplexer (L-1:1 at level L).
  always_comb begin
    sel_valid = 1'b0;
    sel_data  = '0;
    for (int unsigned s = 0; s < NSRC; s++) begin
      if (acc_sel == SEL_W'(s)) begin
        sel_valid = src_valid[s];
        sel_data  = src_data[s];
      end
    end
  end

  // Shared adder: children in adder-switch mode, selected psum plus the
  // accumulation register in accumulator mode.
  always_comb begin
    if (acc_mode) begin
      op_a = sel_data;
      op_b = acc_q;
      v_ab = sel_valid;
    end else begin
      op_a = as_cfg.add_l ? l_data : '0;
      op_b = as_cfg.add_r ? r_data : '0;
      v_ab = (as_cfg.add_l && l_valid) || (as_cfg.add_r && r_valid);
    end
    sum_ab  = op_a + op_b;
    sum_all = sum_ab + (as_cfg.add_lat ? lat_in_data : '0);
    v_all   = v_ab || (as_cfg.add_lat && lat_in_valid);
  end

  // Pass-through of a psum that belongs to another cluster.
  always_comb begin
    unique case (as_cfg.fwd)
      FWD_L:   begin fwd_valid = l_valid; fwd_data = l_data; end
      FWD_R:   begin fwd_valid = r_valid; fwd_data = r_data; end
      default: begin fwd_valid = 1'b0;    fwd_data = '0;     end
    endcase
  end

  // Lateral output: adder result of the children, or a forwarded child.
  always_comb begin
    lat_out_valid = 1'b0;
    lat_out_data  = '0;
    if (as_cfg.en) begin
      if (as_cfg.sum_to_lat) begin
        lat_out_valid = v_ab;
        lat_out_data  = sum_ab;
      end else begin
        lat_out_valid = fwd_valid;
        lat_out_data  = fwd_data;
      end
    end
  end

  // Upward output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_valid <= 1'b0;
      up_data  <= '0;
    end else if (as_cfg.en && !as_cfg.sum_to_lat) begin
      up_valid <= v_all;
      up_data  <= sum_all;
    end else if (as_cfg.en) begin
      up_valid <= fwd_valid;
      up_data  <= fwd_data;
    end else begin
      up_valid <= 1'b0;
    end
  end

  // Temporal accumulation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      cnt_q    <= '0;
      gb_valid <= 1'b0;
      gb_data  <= '0;
    end else begin
      gb_valid <= 1'b0;
      if (!acc_mode) begin
        acc_q <= '0;
        cnt_q <= '0;
      end else if (sel_valid) begin
        if (cnt_q + 1'b1 >= acc_iters) begin
          gb_valid <= 1'b1;
          gb_data  <= sum_ab;
          acc_q    <= '0;
          cnt_q    <= '0;
        end else begin
          acc_q <= sum_ab;
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  // Psums that meet in the adder belong to the same iteration of one
  // cluster and must arrive together.
  property p_aligned(logic a_used, logic a_v, logic b_used, logic b_v);
    @(posedge clk) disable iff (!rst_n)
      (as_cfg.en && a_used && b_used) |-> (a_v == b_v);
  endproperty
  a_lr_aligned:  assert property (p_aligned(as_cfg.add_l, l_valid, as_cfg.add_r, r_valid));
  a_lat_aligned: assert property (p_aligned(as_cfg.add_l || as_cfg.add_r, v_ab,
                                            as_cfg.add_lat, lat_in_valid));

endmodule
