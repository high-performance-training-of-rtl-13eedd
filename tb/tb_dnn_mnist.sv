// tb_dnn_mnist: the accelerator configured as the 784-100-100-10 network
// used for handwritten digits (28 x 28 pixel inputs, ten outputs). The
// data are synthetic: random pixel intensities in [0, 1] and a random
// one-hot digit label, which is enough to exercise every neuron, the
// 794-word training vectors and the refill path at this size. A short
// training run (4 examples, batch 2) is followed by a test run of 2
// examples. The test run starts while the buffer is still being filled
// for the training run, so stale SDRAM reads are in flight at its go.
// A reference model that rounds like the neuron ALU checks every
// hypothesis, every hidden activation and, after training, all 89,610
// weights. The clocks per example are printed. The network size is the
// one the large-scale evaluation uses; the data and run lengths are
// this testbench's own, kept short for simulation time.
module tb_dnn_mnist;
  import dnn_pkg::*;
  import tb_fp_pkg::*;

  localparam int NI = 784, H1 = 100, H2 = 100, NO = 10, VW = NI + NO;
  localparam int NV = 6, NTR = 4, NTE = 2, B = 2;

  logic clk = 0, rst = 1;
  logic go = 0, train = 0, busy, done;
  logic [31:0] num_examples = 0, num_vectors = 0, vec_base = 0;
  logic [15:0] batch = 1;
  fp32_t inv_batch = 0, neg_lr = 0;
  logic wl_we = 0;
  logic [1:0] wl_layer = 0, rb_layer = 0;
  logic [7:0] wl_neuron = 0, rb_neuron = 0;
  logic [ADDR_W-1:0] wl_addr = 0, rb_addr = 0;
  fp32_t wl_data = 0, rb_data;
  logic sd_req_valid, sd_req_ready, sd_rvalid;
  logic [31:0] sd_req_addr;
  fp32_t sd_rdata;
  logic hyp_valid;
  logic [31:0] hyp_idx, correct, stall_cycles, swap_count, grad_steps;
  fp32_t hyp [NO];

  dnn_top #(.N_IN(NI), .N_H1(H1), .N_H2(H2), .N_OUT(NO)) dut (.*);

  sdram_model #(.DEPTH(NV * VW), .LAT(6)) u_sd (
    .clk, .rst, .pause(1'b0), .req_valid(sd_req_valid), .req_ready(sd_req_ready),
    .req_addr(sd_req_addr), .rvalid(sd_rvalid), .rdata(sd_rdata),
    .wr_en(1'b0), .wr_addr(32'd0), .wr_data(32'd0));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t W1 [H1][NI+1], W2 [H2][H1+1], W3 [NO][H2+1];
  fp32_t D1 [H1][NI+1], D2 [H2][H1+1], D3 [NO][H2+1];
  fp32_t data [NV*VW];

  function automatic fp32_t hidden_delta(fp32_t a, fp32_t s);
    fp32_t oma, t;
    oma = madd(a, FP_NEG_ONE, FP_ONE);
    t   = madd(a, oma, FP_ZERO);
    return madd(s, t, FP_ZERO);
  endfunction

  fp32_t ra1 [H1], ra2 [H2], ra3 [NO];

  function automatic void ref_example(int va, logic tr);
    fp32_t z, s;
    fp32_t d3 [NO];
    fp32_t d2 [H2];
    fp32_t d1 [H1];
    for (int j = 0; j < H1; j++) begin
      z = madd(W1[j][0], FP_ONE, FP_ZERO);
      for (int i = 0; i < NI; i++) z = madd(W1[j][i+1], data[va + i], z);
      ra1[j] = sig_fp(z);
    end
    for (int j = 0; j < H2; j++) begin
      z = madd(W2[j][0], FP_ONE, FP_ZERO);
      for (int i = 0; i < H1; i++) z = madd(W2[j][i+1], ra1[i], z);
      ra2[j] = sig_fp(z);
    end
    for (int j = 0; j < NO; j++) begin
      z = madd(W3[j][0], FP_ONE, FP_ZERO);
      for (int i = 0; i < H2; i++) z = madd(W3[j][i+1], ra2[i], z);
      ra3[j] = sig_fp(z);
    end
    if (!tr) return;
    for (int j = 0; j < NO; j++) begin
      fp32_t y;
      y = data[va + NI + j];
      d3[j] = madd(ra3[j], FP_ONE, {~y[31], y[30:0]});
      D3[j][0] = madd(FP_ONE, d3[j], D3[j][0]);
      for (int i = 0; i < H2; i++) D3[j][i+1] = madd(ra2[i], d3[j], D3[j][i+1]);
    end
    for (int j = 0; j < H2; j++) begin
      s = madd(W3[0][j+1], d3[0], FP_ZERO);
      for (int k = 1; k < NO; k++) s = madd(W3[k][j+1], d3[k], s);
      d2[j] = hidden_delta(ra2[j], s);
      D2[j][0] = madd(FP_ONE, d2[j], D2[j][0]);
      for (int i = 0; i < H1; i++) D2[j][i+1] = madd(ra1[i], d2[j], D2[j][i+1]);
    end
    for (int j = 0; j < H1; j++) begin
      s = madd(W2[0][j+1], d2[0], FP_ZERO);
      for (int k = 1; k < H2; k++) s = madd(W2[k][j+1], d2[k], s);
      d1[j] = hidden_delta(ra1[j], s);
      D1[j][0] = madd(FP_ONE, d1[j], D1[j][0]);
      for (int i = 0; i < NI; i++) D1[j][i+1] = madd(data[va + i], d1[j], D1[j][i+1]);
    end
  endfunction

  function automatic void ref_grad(fp32_t im, fp32_t nl);
    for (int j = 0; j < H1; j++) for (int i = 0; i <= NI; i++) begin
      W1[j][i] = madd(madd(D1[j][i], im, FP_ZERO), nl, W1[j][i]); D1[j][i] = 0;
    end
    for (int j = 0; j < H2; j++) for (int i = 0; i <= H1; i++) begin
      W2[j][i] = madd(madd(D2[j][i], im, FP_ZERO), nl, W2[j][i]); D2[j][i] = 0;
    end
    for (int j = 0; j < NO; j++) for (int i = 0; i <= H2; i++) begin
      W3[j][i] = madd(madd(D3[j][i], im, FP_ZERO), nl, W3[j][i]); D3[j][i] = 0;
    end
  endfunction

  logic run_train;
  int run_base;
  longint last_cyc;
  always @(posedge clk) begin
    if (!rst && hyp_valid) begin
      ref_example(run_base + int'(hyp_idx % NV) * VW, run_train);
      for (int j = 0; j < NO; j++) begin
        checks++;
        if (hyp[j] !== ra3[j]) begin failures++; $display("hyp %0d[%0d] %h exp %h", hyp_idx, j, hyp[j], ra3[j]); end
      end
      if (run_train && ((hyp_idx + 1) % B == 0)) ref_grad(inv_batch, neg_lr);
      $display("example %0d done at clock %0d (%0d clocks since the previous one)", hyp_idx, cyc, cyc - last_cyc);
      last_cyc = cyc;
    end
  end

  task automatic load(int l, int j, int i, fp32_t w);
    wl_we = 1; wl_layer = 2'(l); wl_neuron = 8'(j); wl_addr = ADDR_W'(i); wl_data = w;
    @(posedge clk); #1;
  endtask

  task automatic check(int l, int j, int i, fp32_t e);
    rb_layer = 2'(l); rb_neuron = 8'(j); rb_addr = ADDR_W'(i); #1;
    checks++;
    if (rb_data !== e) begin failures++; if (failures < 20) $display("w L%0d n%0d [%0d] %h exp %h", l, j, i, rb_data, e); end
  endtask

  task automatic do_run(logic tr, int nex);
    train = tr; run_train = tr; num_examples = 32'(nex); num_vectors = NV; vec_base = 0;
    batch = B; inv_batch = r2fp(1.0 / real'(B)); neg_lr = r2fp(-0.1); run_base = 0;
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    while (!done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin
      int lbl;
      lbl = $urandom_range(0, 9);
      for (int i = 0; i < NI; i++) data[v*VW + i] = r2fp(real'($urandom_range(0, 255)) / 255.0);
      for (int j = 0; j < NO; j++) data[v*VW + NI + j] = (j == lbl) ? FP_ONE : FP_ZERO;
      for (int w = 0; w < VW; w++) u_sd.mem[v*VW + w] = data[v*VW + w];
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int j = 0; j < H1; j++) for (int i = 0; i <= NI; i++) begin
      W1[j][i] = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 30000.0); D1[j][i] = 0;
      load(0, j, i, W1[j][i]);
    end
    for (int j = 0; j < H2; j++) for (int i = 0; i <= H1; i++) begin
      W2[j][i] = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 10000.0); D2[j][i] = 0;
      load(1, j, i, W2[j][i]);
    end
    for (int j = 0; j < NO; j++) for (int i = 0; i <= H2; i++) begin
      W3[j][i] = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 10000.0); D3[j][i] = 0;
      load(2, j, i, W3[j][i]);
    end
    wl_we = 0;
    last_cyc = cyc;
    do_run(1'b1, NTR);
    checks++;
    if (grad_steps != NTR / B) failures++;
    for (int j = 0; j < H1; j++) for (int i = 0; i <= NI; i++) check(0, j, i, W1[j][i]);
    for (int j = 0; j < H2; j++) for (int i = 0; i <= H1; i++) check(1, j, i, W2[j][i]);
    for (int j = 0; j < NO; j++) for (int i = 0; i <= H2; i++) check(2, j, i, W3[j][i]);
    do_run(1'b0, NTE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hidden activations, compared one step after each hypothesis
  for (genvar j = 0; j < H1; j++) begin : g_chk1
    always @(posedge clk) if (!rst && hyp_valid) begin
      #1 checks++;
      if (dut.u_l1.g_neuron[j].u_neuron.act !== ra1[j]) begin
        failures++; $display("layer 1 neuron %0d act %h exp %h", j, dut.u_l1.g_neuron[j].u_neuron.act, ra1[j]);
      end
    end
  end
  for (genvar j = 0; j < H2; j++) begin : g_chk2
    always @(posedge clk) if (!rst && hyp_valid) begin
      #1 checks++;
      if (dut.u_l2.g_neuron[j].u_neuron.act !== ra2[j]) begin
        failures++; $display("layer 2 neuron %0d act %h exp %h", j, dut.u_l2.g_neuron[j].u_neuron.act, ra2[j]);
      end
    end
  end
endmodule
