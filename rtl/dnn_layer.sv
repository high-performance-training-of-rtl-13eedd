// dnn_layer: a fully connected layer of S neurons working in parallel.
//
// A command (start + cmd) is broadcast to all neurons of the layer; each
// neuron sees the same input vector x, and during backpropagation the
// error terms of the layer above (nxt_d) together with the column of that
// layer's weights that belongs to it: neuron j takes nxt_w[k][j+1], the
// weight from neuron j to neuron k above (index 0 is the bias weight of
// the neuron above and is not used). The layer acknowledges with a done
// pulse once every neuron has acknowledged. Weights are loaded one word at
// a time through wl_* addressed by neuron and word; all weights are
// visible on w_rows. For the output layer, y carries the targets and
// N_NEXT is a placeholder whose inputs are unused. Parallel neurons
// under one control unit, with acknowledgements passed between layers,
// follow the source design.
module dnn_layer
  import dnn_pkg::*;
#(
  parameter int unsigned S      = 3,
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_NEXT = 3
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  neuron_cmd_e       cmd,
  output logic              done,
  input  fp32_t             x     [N_IN],
  input  fp32_t             y     [S],
  input  fp32_t             nxt_w [N_NEXT][S+1],
  input  fp32_t             nxt_d [N_NEXT],
  input  fp32_t             inv_m,
  input  fp32_t             neg_lr,
  input  logic              wl_we,
  input  logic [7:0]        wl_neuron,
  input  logic [ADDR_W-1:0] wl_addr,
  input  fp32_t             wl_data,
  output fp32_t             act    [S],
  output fp32_t             delta  [S],
  output fp32_t             w_rows [S][N_IN+1]
);

  logic [S-1:0] n_done, n_busy, seen;

  for (genvar j = 0; j < S; j++) begin : g_neuron
    fp32_t bk_w [N_NEXT];
    for (genvar k = 0; k < N_NEXT; k++) begin : g_col
      assign bk_w[k] = nxt_w[k][j+1];
    end
    neuron #(.N_IN(N_IN), .N_NEXT(N_NEXT)) u_neuron (
      .clk, .rst, .start, .cmd,
      .done   (n_done[j]),
      .busy   (n_busy[j]),
      .x,
      .y      (y[j]),
      .bk_w,
      .bk_d   (nxt_d),
      .inv_m, .neg_lr,
      .wl_we  (wl_we && wl_neuron == 8'(j)),
      .wl_addr, .wl_data,
      .act    (act[j]),
      .delta  (delta[j]),
      .w_row  (w_rows[j])
    );
  end

  // acknowledgement: every neuron has reported done since the start
  logic [S-1:0] seen_next;
  assign seen_next = seen | n_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        seen <= '0;
      end else if (seen_next == '1 && seen != '1) begin
        seen <= '0;
        done <= 1'b1;
      end else begin
        seen <= seen_next;
      end
    end
  end

endmodule
