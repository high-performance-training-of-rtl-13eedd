// tb_dnn_top: end-to-end run of the 3-3-3-1 training accelerator at its
// default parameters, on a red / not-red colour task: each training
// vector is an (R, G, B) pixel in [0, 1] with target 1 when R exceeds
// the average of G and B. The SDRAM model holds 6000 training and 1000 test vectors.
//  run 1: train on 6000 examples, batch 1, learning rate 0.1
//  run 2: test on the 1000 separate test vectors (forward only)
//  run 3: train 700 examples over only 300 vectors (stream wraps), batch 7
// A reference model in the testbench, rounding like the neuron ALU, runs
// the same network; every hypothesis, the final weights, the number of
// gradient steps, the test-mode score and the number of quarter refills
// are compared with it. The SDRAM is paused at random to force the
// network to stall for data. Each mechanism (stall, quarter swap, stream
// wrap, forward/backward/gradient commands, test scoring) is counted and
// must occur. Clocks per training example must stay within 250.
module tb_dnn_top;
  import dnn_pkg::*;
  import tb_fp_pkg::*;

  localparam int NTR = 6000, NTE = 1000, NWR = 300, NWR_EX = 700;
  localparam int VW  = 4;
  localparam int TR_BATCH = 1;

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
  logic sd_req_valid, sd_req_ready, sd_rvalid, pause = 0;
  logic [31:0] sd_req_addr;
  fp32_t sd_rdata;
  logic hyp_valid;
  logic [31:0] hyp_idx, correct, stall_cycles, swap_count, grad_steps;
  fp32_t hyp [1];

  dnn_top dut (.*);

  sdram_model #(.DEPTH(32768), .LAT(6)) u_sd (
    .clk, .rst, .pause, .req_valid(sd_req_valid), .req_ready(sd_req_ready),
    .req_addr(sd_req_addr), .rvalid(sd_rvalid), .rdata(sd_rdata),
    .wr_en(1'b0), .wr_addr(32'd0), .wr_data(32'd0));

  always #2 clk = ~clk;   // 4 ns clock

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference network ----------------
  fp32_t W1 [3][4], W2 [3][4], W3 [1][4];
  fp32_t D1 [3][4], D2 [3][4], D3 [1][4];
  fp32_t data [(NTR+NTE)*VW];

  function automatic fp32_t fwd_n(fp32_t w [4], fp32_t x [3]);
    fp32_t z;
    z = madd(w[0], FP_ONE, FP_ZERO);
    for (int i = 0; i < 3; i++) z = madd(w[i+1], x[i], z);
    return sig_fp(z);
  endfunction

  function automatic fp32_t hid_delta(fp32_t a, fp32_t bw [3], fp32_t bd [3], int k_n);
    fp32_t s, oma, t;
    s = madd(bw[0], bd[0], FP_ZERO);
    for (int k = 1; k < k_n; k++) s = madd(bw[k], bd[k], s);
    oma = madd(a, FP_NEG_ONE, FP_ONE);
    t   = madd(a, oma, FP_ZERO);
    return madd(s, t, FP_ZERO);
  endfunction

  // forward (and backward when training) for one example; returns hypothesis
  function automatic fp32_t ref_example(int vaddr, logic tr);
    fp32_t x [3], a1 [3], a2 [3], a3, y, d3, d2 [3], d1 [3], bw [3], bd [3];
    for (int i = 0; i < 3; i++) x[i] = data[vaddr + i];
    y = data[vaddr + 3];
    for (int j = 0; j < 3; j++) a1[j] = fwd_n(W1[j], x);
    for (int j = 0; j < 3; j++) a2[j] = fwd_n(W2[j], a1);
    a3 = fwd_n(W3[0], a2);
    if (tr) begin
      d3 = madd(a3, FP_ONE, {~y[31], y[30:0]});
      D3[0][0] = madd(FP_ONE, d3, D3[0][0]);
      for (int i = 0; i < 3; i++) D3[0][i+1] = madd(a2[i], d3, D3[0][i+1]);
      for (int j = 0; j < 3; j++) begin
        bw[0] = W3[0][j+1]; bd[0] = d3; bw[1] = 0; bd[1] = 0; bw[2] = 0; bd[2] = 0;
        d2[j] = hid_delta(a2[j], bw, bd, 1);
        D2[j][0] = madd(FP_ONE, d2[j], D2[j][0]);
        for (int i = 0; i < 3; i++) D2[j][i+1] = madd(a1[i], d2[j], D2[j][i+1]);
      end
      for (int j = 0; j < 3; j++) begin
        for (int k = 0; k < 3; k++) begin bw[k] = W2[k][j+1]; bd[k] = d2[k]; end
        d1[j] = hid_delta(a1[j], bw, bd, 3);
        D1[j][0] = madd(FP_ONE, d1[j], D1[j][0]);
        for (int i = 0; i < 3; i++) D1[j][i+1] = madd(x[i], d1[j], D1[j][i+1]);
      end
    end
    return a3;
  endfunction

  function automatic void ref_grad(fp32_t im, fp32_t nl);
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 3; j++) begin
        W1[j][i] = madd(madd(D1[j][i], im, FP_ZERO), nl, W1[j][i]); D1[j][i] = 0;
        W2[j][i] = madd(madd(D2[j][i], im, FP_ZERO), nl, W2[j][i]); D2[j][i] = 0;
      end
      W3[0][i] = madd(madd(D3[0][i], im, FP_ZERO), nl, W3[0][i]); D3[0][i] = 0;
    end
  endfunction

  // ---------------- checking of hypotheses ----------------
  int run_base, run_nv, run_batch, ref_correct, hyps, nonpos;
  logic run_train;
  longint last_hyp_cyc;
  int max_gap;
  int cnt_fwd = 0, cnt_bout = 0, cnt_bhid = 0, cnt_grad = 0, cnt_stall = 0, cnt_wrap = 0;

  always @(posedge clk) begin
    if (!rst && hyp_valid) begin
      fp32_t e, y;
      int va;
      va = run_base + int'(hyp_idx % run_nv) * VW;
      if (hyp_idx >= run_nv) cnt_wrap++;
      y = data[va + 3];
      e = ref_example(va, run_train);
      checks++;
      if (hyp[0] !== e) begin
        failures++;
        if (failures < 10) $display("hyp %0d: %h exp %h", hyp_idx, hyp[0], e);
      end
      if (!run_train && ((fp2r(e) >= 0.5) == (fp2r(y) >= 0.5))) ref_correct++;
      if (run_train && ((hyp_idx + 1) % run_batch == 0)) ref_grad(inv_batch, neg_lr);
      if (hyps > 0 && int'(cyc - last_hyp_cyc) > max_gap) max_gap = int'(cyc - last_hyp_cyc);
      last_hyp_cyc = cyc;
      hyps++;
    end
    if (!rst) begin
      for (int l = 0; l < 3; l++) if (dut.l_start[l]) begin
        case (dut.l_cmd[l])
          CMD_FWD:     cnt_fwd++;
          CMD_BWD_OUT: cnt_bout++;
          CMD_BWD_HID: cnt_bhid++;
          CMD_GRAD:    cnt_grad++;
        endcase
      end
      if (dut.u_ctrl.state == dut.u_ctrl.S_WAITV && !(dut.u_ctrl.pos < dut.loaded)) cnt_stall++;
    end
  end

  // random SDRAM pauses
  always @(posedge clk) begin
    if ($urandom_range(0, 999) == 0) pause <= 1'b1;
    else if ($urandom_range(0, 99) == 0) pause <= 1'b0;
  end

  task automatic do_run(logic tr, int base_vec, int nv, int nex, int b, real lr);
    train = tr; vec_base = 32'(base_vec * VW); num_vectors = 32'(nv);
    num_examples = 32'(nex); batch = 16'(b);
    inv_batch = r2fp(1.0 / real'(b)); neg_lr = r2fp(-lr);
    run_base = base_vec * VW; run_nv = nv; run_batch = b; run_train = tr;
    ref_correct = 0; hyps = 0; max_gap = 0;
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    while (!done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    checks++;
    if (hyps != nex) begin failures++; $display("hyps %0d of %0d", hyps, nex); end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("no stall"); end
    if (tr) begin
      checks++;
      if (grad_steps != 32'(nex / b)) begin failures++; $display("grad steps %0d", grad_steps); end
      checks++;
      if (max_gap > 250) begin failures++; $display("clocks per example %0d > 250", max_gap); end
    end else begin
      checks++;
      if (correct != 32'(ref_correct)) begin failures++; $display("correct %0d exp %0d", correct, ref_correct); end
    end
    // let the refill controller reach its limit, then count quarter swaps
    repeat (4000) @(posedge clk);
    #1;
    checks++;
    if (swap_count != 32'(((nex / 64) * 64 + 256 - 256) / 64)) begin
      failures++; $display("swaps %0d", swap_count);
    end
    $display("run train=%0d: %0d examples, stall clocks %0d, swaps %0d, grad steps %0d, correct %0d, max clocks/example %0d, cycle %0d",
             tr, nex, stall_cycles, swap_count, grad_steps, correct, max_gap, cyc);
  endtask

  task automatic check_weights();
    for (int l = 0; l < 3; l++)
      for (int j = 0; j < (l == 2 ? 1 : 3); j++)
        for (int i = 0; i < 4; i++) begin
          fp32_t e;
          rb_layer = 2'(l); rb_neuron = 8'(j); rb_addr = ADDR_W'(i);
          #1;
          e = (l == 0) ? W1[j][i] : (l == 1) ? W2[j][i] : W3[j][i];
          checks++;
          if (rb_data !== e) begin failures++; $display("w L%0d n%0d [%0d] %h exp %h", l, j, i, rb_data, e); end
        end
  endtask

  initial begin
    // training and test data
    for (int v = 0; v < NTR + NTE; v++) begin
      real r, g, b;
      r = real'($urandom_range(0, 1000)) / 1000.0;
      g = real'($urandom_range(0, 1000)) / 1000.0;
      b = real'($urandom_range(0, 1000)) / 1000.0;
      data[v*VW + 0] = r2fp(r);
      data[v*VW + 1] = r2fp(g);
      data[v*VW + 2] = r2fp(b);
      data[v*VW + 3] = (r > (g + b) / 2.0) ? FP_ONE : FP_ZERO;
      for (int w = 0; w < VW; w++) u_sd.mem[v*VW + w] = data[v*VW + w];
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // initial weights
    for (int l = 0; l < 3; l++)
      for (int j = 0; j < (l == 2 ? 1 : 3); j++)
        for (int i = 0; i < 4; i++) begin
          fp32_t w;
          w = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
          if (l == 0) W1[j][i] = w; else if (l == 1) W2[j][i] = w; else W3[j][i] = w;
          if (l == 0) D1[j][i] = 0; else if (l == 1) D2[j][i] = 0; else D3[j][i] = 0;
          wl_we = 1; wl_layer = 2'(l); wl_neuron = 8'(j); wl_addr = ADDR_W'(i); wl_data = w;
          @(posedge clk); #1;
        end
    wl_we = 0;
    check_weights();

    do_run(1'b1, 0, NTR, NTR, TR_BATCH, 0.1);
    check_weights();
    do_run(1'b0, NTR, NTE, NTE, 1, 0.1);
    $display("test accuracy %0d / %0d", correct, NTE);
    checks++;
    if (correct < 32'(NTE * 8 / 10)) begin failures++; $display("network did not learn"); end
    do_run(1'b1, NTR, NWR, NWR_EX, 7, 0.1);
    check_weights();

    checks += 7;
    if (cnt_stall == 0) begin failures++; $display("no stall seen"); end
    if (cnt_wrap == 0)  begin failures++; $display("no wrap seen"); end
    if (cnt_fwd == 0 || cnt_bout == 0 || cnt_bhid == 0 || cnt_grad == 0) begin
      failures++; $display("command missing");
    end
    if (cnt_bhid != 2 * cnt_bout) begin failures++; $display("bwd count"); end
    if (cnt_fwd != 3 * (NTR + NTE + NWR_EX)) begin failures++; $display("fwd count"); end
    if (cnt_grad != 3 * (NTR / TR_BATCH + NWR_EX / 7)) begin failures++; $display("grad count"); end
    $display("mechanisms: fwd %0d bwd_out %0d bwd_hid %0d grad %0d stall clocks %0d wrapped examples %0d",
             cnt_fwd, cnt_bout, cnt_bhid, cnt_grad, cnt_stall, cnt_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
