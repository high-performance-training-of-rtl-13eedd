// neuron: one trainable neuron with its own ALU and memories.
//
// The neuron obeys four commands, given with a one-clock start pulse and
// acknowledged with a one-clock done pulse:
//   CMD_FWD      forward trace, act = sigmoid(w_0 + sum_j w_j x_j)
//   CMD_BWD_OUT  output-layer error, delta = act - y, then Delta_j += x_j delta
//   CMD_BWD_HID  hidden-layer error from the layer above (bk_w, bk_d), then
//                Delta_j += x_j delta
//   CMD_GRAD     w_j -= alpha * Delta_j / m, Delta_j cleared
// Each command is carried out by its own unit (forward_unit,
// backprop_unit, gradient_unit); only one is active at a time and they
// share one pipelined multiply-add ALU, whose tagged results are written
// back to the weight or Delta memory. Both memories hold N_IN+1 words,
// word 0 belonging to the bias input. Weights are loaded from outside
// through wl_* while the neuron is idle, and the whole weight vector is
// visible on w_row for the layer below. The composition of a neuron from
// forward, backpropagation and gradient units sharing one ALU and a local
// memory follows the source design; command encoding, the load port and
// the write-back scheme are this design's choices.
//
// Clocks from start to done (ALU latency 3): FWD N_IN+6, BWD_OUT N_IN+9,
// BWD_HID N_NEXT+N_IN+20, GRAD 2*N_IN+9.
module neuron
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_NEXT = 3
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  neuron_cmd_e       cmd,
  output logic              done,
  output logic              busy,
  input  fp32_t             x    [N_IN],
  input  fp32_t             y,
  input  fp32_t             bk_w [N_NEXT],
  input  fp32_t             bk_d [N_NEXT],
  input  fp32_t             inv_m,
  input  fp32_t             neg_lr,
  input  logic              wl_we,
  input  logic [ADDR_W-1:0] wl_addr,
  input  fp32_t             wl_data,
  output fp32_t             act,
  output fp32_t             delta,
  output fp32_t             w_row [N_IN+1]
);

  localparam int unsigned DEPTH = N_IN + 1;

  neuron_cmd_e cur_cmd;

  // unit <-> ALU
  logic     f_v, b_v, g_v, alu_v, res_valid;
  alu_op_t  f_op, b_op, g_op, alu_op;
  fp32_t    res;
  alu_tag_t res_tag;
  logic     f_done, b_done, g_done;

  // memories
  logic [ADDR_W-1:0] f_wa, g_wa, b_da, g_da, g_clr_a, w_ra, d_ra, w_wa, d_wa;
  fp32_t             w_rd, d_rd, w_wd, d_wd;
  logic              g_clr, w_we, d_we;
  fp32_t             d_row [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_cmd <= CMD_FWD;
      busy    <= 1'b0;
    end else begin
      if (start) begin
        cur_cmd <= cmd;
        busy    <= 1'b1;
      end else if (done) begin
        busy    <= 1'b0;
      end
    end
  end

  forward_unit #(.N_IN(N_IN)) u_fwd (
    .clk, .rst,
    .start   (start && cmd == CMD_FWD),
    .x,
    .w_raddr (f_wa),
    .w_rdata (w_rd),
    .op_valid(f_v),
    .op      (f_op),
    .res_valid,
    .res,
    .res_tag,
    .act,
    .done    (f_done)
  );

  backprop_unit #(.N_IN(N_IN), .N_NEXT(N_NEXT)) u_bp (
    .clk, .rst,
    .start   (start && (cmd == CMD_BWD_OUT || cmd == CMD_BWD_HID)),
    .hidden  (cmd == CMD_BWD_HID),
    .act, .y, .x, .bk_w, .bk_d,
    .d_raddr (b_da),
    .d_rdata (d_rd),
    .op_valid(b_v),
    .op      (b_op),
    .res_valid,
    .res,
    .res_tag,
    .delta,
    .done    (b_done)
  );

  gradient_unit #(.N_IN(N_IN)) u_gd (
    .clk, .rst,
    .start     (start && cmd == CMD_GRAD),
    .inv_m, .neg_lr,
    .d_raddr   (g_da),
    .d_rdata   (d_rd),
    .w_raddr   (g_wa),
    .w_rdata   (w_rd),
    .d_clr     (g_clr),
    .d_clr_addr(g_clr_a),
    .op_valid  (g_v),
    .op        (g_op),
    .res_valid,
    .res_tag,
    .done      (g_done)
  );

  assign done   = f_done | b_done | g_done;
  assign alu_v  = f_v | b_v | g_v;
  assign alu_op = f_v ? f_op : (b_v ? b_op : g_op);
  assign w_ra   = (cur_cmd == CMD_GRAD) ? g_wa : f_wa;
  assign d_ra   = (cur_cmd == CMD_GRAD) ? g_da : b_da;

  neuron_alu u_alu (
    .clk, .rst,
    .in_valid (alu_v),
    .op       (alu_op),
    .out_valid(res_valid),
    .result   (res),
    .out_tag  (res_tag)
  );

  // write-back from the ALU has priority over the external load port and
  // the Delta clear; the control flow never makes them meet
  always_comb begin
    w_we = 1'b0; w_wa = wl_addr; w_wd = wl_data;
    d_we = 1'b0; d_wa = g_clr_a; d_wd = FP_ZERO;
    if (res_valid && res_tag.dest == DST_W) begin
      w_we = 1'b1; w_wa = res_tag.addr; w_wd = res;
    end else if (wl_we && !busy) begin
      w_we = 1'b1;
    end
    if (res_valid && res_tag.dest == DST_D) begin
      d_we = 1'b1; d_wa = res_tag.addr; d_wd = res;
    end else if (g_clr) begin
      d_we = 1'b1;
    end
  end

  neuron_mem #(.DEPTH(DEPTH)) u_wmem (
    .clk, .rst,
    .we(w_we), .waddr(w_wa), .wdata(w_wd),
    .raddr(w_ra), .rdata(w_rd),
    .row(w_row)
  );

  neuron_mem #(.DEPTH(DEPTH)) u_dmem (
    .clk, .rst,
    .we(d_we), .waddr(d_wa), .wdata(d_wd),
    .raddr(d_ra), .rdata(d_rd),
    .row(d_row)
  );

  // at most one unit drives the ALU in any clock; start only when idle
  assert property (@(posedge clk) disable iff (rst) $onehot0({f_v, b_v, g_v}));
  assert property (@(posedge clk) disable iff (rst) start |-> !busy);

endmodule
