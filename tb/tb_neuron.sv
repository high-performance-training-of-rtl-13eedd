// tb_neuron: one complete neuron trained on random data. Weights are
// loaded through the load port; then, for several batches, each example
// runs a forward trace and a backpropagation (alternating output-layer and
// hidden-layer mode), and each batch ends with a gradient step. The
// activation, delta and, after every gradient step, the whole weight row
// are compared with a reference model that rounds like the ALU. The
// clock counts of the four commands are checked too.
module tb_neuron;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 3, K = 3;
  logic clk = 0, rst = 1, start = 0, done, busy, wl_we = 0;
  neuron_cmd_e cmd;
  fp32_t x [N];
  fp32_t bk_w [K];
  fp32_t bk_d [K];
  fp32_t w_row [N+1];
  fp32_t y, inv_m, neg_lr, wl_data, act, delta;
  logic [ADDR_W-1:0] wl_addr;
  fp32_t wr [N+1];
  fp32_t dr [N+1];
  int checks = 0, failures = 0;

  neuron #(.N_IN(N), .N_NEXT(K)) dut(.clk, .rst, .start, .cmd, .done, .busy, .x, .y,
    .bk_w, .bk_d, .inv_m, .neg_lr, .wl_we, .wl_addr, .wl_data, .act, .delta, .w_row);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(neuron_cmd_e c, int expect_clks);
    int n;
    @(posedge clk); #1 start = 1; cmd = c;
    @(posedge clk); #1 start = 0;
    n = 1;
    while (!done) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != expect_clks) begin failures++; $display("cmd %0d took %0d", c, n); end
  endtask

  initial begin
    cmd = CMD_FWD; y = 0; wl_addr = 0; wl_data = 0;
    inv_m = r2fp(1.0 / 4.0); neg_lr = r2fp(-0.1);
    for (int i = 0; i < N; i++) x[i] = 0;
    for (int i = 0; i < K; i++) begin bk_w[i] = 0; bk_d[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i <= N; i++) begin
      wr[i] = rnd_small(); dr[i] = 0;
      wl_we = 1; wl_addr = ADDR_W'(i); wl_data = wr[i];
      @(posedge clk); #1;
    end
    wl_we = 0;
    for (int i = 0; i <= N; i++) begin
      checks++; if (w_row[i] !== wr[i]) failures++;
    end
    for (int b = 0; b < 10; b++) begin
      for (int e = 0; e < 4; e++) begin
        fp32_t z, a, d, s, oma, tt;
        logic hid;
        hid = 1'(e % 2);
        for (int i = 0; i < N; i++) x[i] = r2fp(real'($urandom_range(0, 10000)) / 10000.0);
        y = $urandom_range(0, 1) ? FP_ONE : FP_ZERO;
        for (int i = 0; i < K; i++) begin bk_w[i] = rnd_small(); bk_d[i] = rnd_small(); end
        z = madd(wr[0], FP_ONE, FP_ZERO);
        for (int i = 0; i < N; i++) z = madd(wr[i+1], x[i], z);
        a = sig_fp(z);
        run(CMD_FWD, N + 6);
        checks++;
        if (act !== a) begin failures++; $display("act %h exp %h", act, a); end
        if (!hid) d = madd(a, FP_ONE, {~y[31], y[30:0]});
        else begin
          s = madd(bk_w[0], bk_d[0], FP_ZERO);
          for (int k = 1; k < K; k++) s = madd(bk_w[k], bk_d[k], s);
          oma = madd(a, FP_NEG_ONE, FP_ONE);
          tt  = madd(a, oma, FP_ZERO);
          d   = madd(s, tt, FP_ZERO);
        end
        dr[0] = madd(FP_ONE, d, dr[0]);
        for (int i = 0; i < N; i++) dr[i+1] = madd(x[i], d, dr[i+1]);
        run(hid ? CMD_BWD_HID : CMD_BWD_OUT, hid ? N + K + 20 : N + 9);
        checks++;
        if (delta !== d) begin failures++; $display("delta %h exp %h", delta, d); end
      end
      for (int i = 0; i <= N; i++) begin
        wr[i] = madd(madd(dr[i], inv_m, FP_ZERO), neg_lr, wr[i]);
        dr[i] = 0;
      end
      run(CMD_GRAD, 2 * N + 9);
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (w_row[i] !== wr[i]) begin failures++; $display("w[%0d] %h exp %h", i, w_row[i], wr[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
