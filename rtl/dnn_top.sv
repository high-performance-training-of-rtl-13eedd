// dnn_top: on-chip training accelerator for a small fully connected network.
//
// The default network has N_IN inputs, two hidden layers of N_H1 and N_H2
// sigmoid neurons and N_OUT output neurons (3-3-3-1). Every neuron
// computes in IEEE-754 single precision with its own pipelined
// multiply-add ALU and its own weight and gradient memories; all neurons
// of a layer work in parallel. The control unit (train_ctrl) runs, per
// training vector, a forward trace layer by layer, backpropagation from the
// output layer down, and after every batch a gradient descent step in all
// layers at once. Training vectors sit in an external SDRAM; a 256-vector
// on-chip buffer (vec_buffer) is kept filled by refill_ctrl, which swaps
// in 64 new vectors as soon as the network has finished with a quarter,
// overlapping the refill with training.
//
// Interface: configuration (train, num_examples, batch, inv_batch = 1/batch
// and neg_lr = -learning rate as fp32, num_vectors in SDRAM starting at
// word address vec_base) is sampled at go and must stay stable during a
// run; done pulses at the end of the run. Initial weights are written
// through wl_* (layer 0..2, neuron, word; word 0 is the bias weight) while
// the network is idle, and any weight can be read back through rb_*. The
// SDRAM read port is a valid/ready address channel with in-order read data.
// hyp_valid marks each new hypothesis (output-layer activations) with the
// stream position hyp_idx; correct counts test-mode hits; stall_cycles,
// swap_count and grad_steps report waits for data, quarter refills and
// weight updates.
module dnn_top
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN      = 3,
  parameter int unsigned N_H1      = 3,
  parameter int unsigned N_H2      = 3,
  parameter int unsigned N_OUT     = 1,
  parameter int unsigned BUF_VECS  = 256,
  parameter int unsigned SWAP_VECS = 64
)(
  input  logic              clk,
  input  logic              rst,
  // run control
  input  logic              go,
  input  logic              train,
  input  logic [31:0]       num_examples,
  input  logic [15:0]       batch,
  input  fp32_t             inv_batch,
  input  fp32_t             neg_lr,
  input  logic [31:0]       num_vectors,
  input  logic [31:0]       vec_base,
  output logic              busy,
  output logic              done,
  // weight load and read-back
  input  logic              wl_we,
  input  logic [1:0]        wl_layer,
  input  logic [7:0]        wl_neuron,
  input  logic [ADDR_W-1:0] wl_addr,
  input  fp32_t             wl_data,
  input  logic [1:0]        rb_layer,
  input  logic [7:0]        rb_neuron,
  input  logic [ADDR_W-1:0] rb_addr,
  output fp32_t             rb_data,
  // SDRAM read port
  output logic              sd_req_valid,
  input  logic              sd_req_ready,
  output logic [31:0]       sd_req_addr,
  input  logic              sd_rvalid,
  input  fp32_t             sd_rdata,
  // results
  output logic              hyp_valid,
  output logic [31:0]       hyp_idx,
  output fp32_t             hyp [N_OUT],
  output logic [31:0]       correct,
  output logic [31:0]       stall_cycles,
  output logic [31:0]       swap_count,
  output logic [31:0]       grad_steps
);

  localparam int unsigned VEC_W = N_IN + N_OUT;
  localparam int unsigned NL    = 3;

  // ---------------- training-vector memory ----------------
  logic [31:0]                 loaded;
  logic                        rel, rd_en, buf_we;
  logic [$clog2(BUF_VECS)-1:0] rd_slot, buf_slot;
  logic [$clog2(VEC_W+1)-1:0]  buf_word;
  fp32_t                       buf_wdata;
  fp32_t                       rd_vec [VEC_W];

  refill_ctrl #(.BUF_VECS(BUF_VECS), .SWAP_VECS(SWAP_VECS), .VEC_W(VEC_W)) u_refill (
    .clk, .rst,
    .go         (go && !busy),
    .num_vectors,
    .vec_base,
    .rel,
    .loaded,
    .sd_req_valid, .sd_req_ready, .sd_req_addr, .sd_rvalid, .sd_rdata,
    .buf_we, .buf_slot, .buf_word, .buf_wdata,
    .swap_count
  );

  vec_buffer #(.BUF_VECS(BUF_VECS), .VEC_W(VEC_W)) u_buf (
    .clk, .rst,
    .we(buf_we), .wslot(buf_slot), .wword(buf_word), .wdata(buf_wdata),
    .rd_en, .rd_slot, .rd_vec
  );

  // ---------------- control unit ----------------
  logic [NL-1:0] l_start, l_done;
  neuron_cmd_e   l_cmd [NL];
  fp32_t         x_in [N_IN];
  fp32_t         y_t  [N_OUT];

  train_ctrl #(.N_IN(N_IN), .N_OUT(N_OUT), .BUF_VECS(BUF_VECS), .NL(NL)) u_ctrl (
    .clk, .rst, .go, .train, .num_examples, .batch,
    .loaded, .rd_en, .rd_slot, .rd_vec, .rel,
    .l_start, .l_cmd, .l_done,
    .x_in, .y_t, .hyp,
    .busy, .done, .hyp_valid, .hyp_idx, .correct, .stall_cycles, .grad_steps
  );

  // ---------------- layers ----------------
  fp32_t a1 [N_H1];
  fp32_t a2 [N_H2];
  fp32_t d1 [N_H1];
  fp32_t d2 [N_H2];
  fp32_t d3 [N_OUT];
  fp32_t w1 [N_H1][N_IN+1];
  fp32_t w2 [N_H2][N_H1+1];
  fp32_t w3 [N_OUT][N_H2+1];
  fp32_t y0_1 [N_H1];
  fp32_t y0_2 [N_H2];
  fp32_t nw3 [1][N_OUT+1];
  fp32_t nd3 [1];

  always_comb begin
    for (int i = 0; i < int'(N_H1); i++) y0_1[i] = FP_ZERO;
    for (int i = 0; i < int'(N_H2); i++) y0_2[i] = FP_ZERO;
    for (int i = 0; i <= int'(N_OUT); i++) nw3[0][i] = FP_ZERO;
    nd3[0] = FP_ZERO;
  end

  logic wl_ok;
  assign wl_ok = wl_we && !busy;

  dnn_layer #(.S(N_H1), .N_IN(N_IN), .N_NEXT(N_H2)) u_l1 (
    .clk, .rst, .start(l_start[0]), .cmd(l_cmd[0]), .done(l_done[0]),
    .x(x_in), .y(y0_1), .nxt_w(w2), .nxt_d(d2), .inv_m(inv_batch), .neg_lr,
    .wl_we(wl_ok && wl_layer == 2'd0), .wl_neuron, .wl_addr, .wl_data,
    .act(a1), .delta(d1), .w_rows(w1)
  );

  dnn_layer #(.S(N_H2), .N_IN(N_H1), .N_NEXT(N_OUT)) u_l2 (
    .clk, .rst, .start(l_start[1]), .cmd(l_cmd[1]), .done(l_done[1]),
    .x(a1), .y(y0_2), .nxt_w(w3), .nxt_d(d3), .inv_m(inv_batch), .neg_lr,
    .wl_we(wl_ok && wl_layer == 2'd1), .wl_neuron, .wl_addr, .wl_data,
    .act(a2), .delta(d2), .w_rows(w2)
  );

  dnn_layer #(.S(N_OUT), .N_IN(N_H2), .N_NEXT(1)) u_l3 (
    .clk, .rst, .start(l_start[2]), .cmd(l_cmd[2]), .done(l_done[2]),
    .x(a2), .y(y_t), .nxt_w(nw3), .nxt_d(nd3), .inv_m(inv_batch), .neg_lr,
    .wl_we(wl_ok && wl_layer == 2'd2), .wl_neuron, .wl_addr, .wl_data,
    .act(hyp), .delta(d3), .w_rows(w3)
  );

  // ---------------- weight read-back ----------------
  always_comb begin
    rb_data = FP_ZERO;
    case (rb_layer)
      2'd0: for (int j = 0; j < int'(N_H1); j++)
              for (int i = 0; i <= int'(N_IN); i++)
                if (rb_neuron == 8'(j) && rb_addr == ADDR_W'(i)) rb_data = w1[j][i];
      2'd1: for (int j = 0; j < int'(N_H2); j++)
              for (int i = 0; i <= int'(N_H1); i++)
                if (rb_neuron == 8'(j) && rb_addr == ADDR_W'(i)) rb_data = w2[j][i];
      2'd2: for (int j = 0; j < int'(N_OUT); j++)
              for (int i = 0; i <= int'(N_H2); i++)
                if (rb_neuron == 8'(j) && rb_addr == ADDR_W'(i)) rb_data = w3[j][i];
      default: ;
    endcase
  end

endmodule
