// tb_dnn_layer: a layer of S = 2 neurons with 3 inputs below a layer of
// 2 neurons. Weights are loaded per neuron; then forward traces, hidden-
// and output-layer backpropagation and gradient steps are run and the
// activations, deltas and weight rows of both neurons are compared with a
// reference that rounds like the ALU. The hidden-layer check makes sure
// each neuron uses its own column (nxt_w[k][j+1]) of the weights above.
// The layer must acknowledge once per command, as fast as one neuron.
module tb_dnn_layer;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int S = 2, N = 3, K = 2;
  logic clk = 0, rst = 1, start = 0, done, wl_we = 0;
  neuron_cmd_e cmd;
  fp32_t x [N];
  fp32_t y [S];
  fp32_t nxt_w [K][S+1];
  fp32_t nxt_d [K];
  fp32_t inv_m, neg_lr, wl_data;
  logic [7:0] wl_neuron;
  logic [ADDR_W-1:0] wl_addr;
  fp32_t act [S];
  fp32_t delta [S];
  fp32_t w_rows [S][N+1];
  fp32_t wr [S][N+1];
  fp32_t dr [S][N+1];
  int checks = 0, failures = 0;

  dnn_layer #(.S(S), .N_IN(N), .N_NEXT(K)) dut(.clk, .rst, .start, .cmd, .done, .x, .y,
    .nxt_w, .nxt_d, .inv_m, .neg_lr, .wl_we, .wl_neuron, .wl_addr, .wl_data,
    .act, .delta, .w_rows);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(neuron_cmd_e c, int expect_clks);
    int n, dones;
    @(posedge clk); #1 start = 1; cmd = c;
    @(posedge clk); #1 start = 0;
    n = 1;
    while (!done) begin @(posedge clk); #1; n++; end
    dones = 1;
    repeat (30) begin @(posedge clk); #1; if (done) dones++; end
    checks += 2;
    if (n != expect_clks) begin failures++; $display("cmd %0d took %0d", c, n); end
    if (dones != 1) begin failures++; $display("%0d acknowledgements", dones); end
  endtask

  initial begin
    cmd = CMD_FWD; wl_neuron = 0; wl_addr = 0; wl_data = 0;
    inv_m = r2fp(0.5); neg_lr = r2fp(-0.1);
    for (int i = 0; i < N; i++) x[i] = 0;
    for (int j = 0; j < S; j++) y[j] = 0;
    for (int k = 0; k < K; k++) begin nxt_d[k] = 0; for (int j = 0; j <= S; j++) nxt_w[k][j] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int j = 0; j < S; j++)
      for (int i = 0; i <= N; i++) begin
        wr[j][i] = rnd_small(); dr[j][i] = 0;
        wl_we = 1; wl_neuron = 8'(j); wl_addr = ADDR_W'(i); wl_data = wr[j][i];
        @(posedge clk); #1;
      end
    wl_we = 0;
    for (int b = 0; b < 6; b++) begin
      for (int e = 0; e < 2; e++) begin
        fp32_t a [S];
        fp32_t d [S];
        logic hid;
        hid = 1'(e);
        for (int i = 0; i < N; i++) x[i] = r2fp(real'($urandom_range(0, 10000)) / 10000.0);
        for (int j = 0; j < S; j++) y[j] = $urandom_range(0, 1) ? FP_ONE : FP_ZERO;
        for (int k = 0; k < K; k++) begin
          nxt_d[k] = rnd_small();
          for (int j = 0; j <= S; j++) nxt_w[k][j] = rnd_small();
        end
        for (int j = 0; j < S; j++) begin
          fp32_t z, s, oma, tt;
          z = madd(wr[j][0], FP_ONE, FP_ZERO);
          for (int i = 0; i < N; i++) z = madd(wr[j][i+1], x[i], z);
          a[j] = sig_fp(z);
          if (!hid) d[j] = madd(a[j], FP_ONE, {~y[j][31], y[j][30:0]});
          else begin
            s = madd(nxt_w[0][j+1], nxt_d[0], FP_ZERO);
            for (int k = 1; k < K; k++) s = madd(nxt_w[k][j+1], nxt_d[k], s);
            oma = madd(a[j], FP_NEG_ONE, FP_ONE);
            tt  = madd(a[j], oma, FP_ZERO);
            d[j] = madd(s, tt, FP_ZERO);
          end
          dr[j][0] = madd(FP_ONE, d[j], dr[j][0]);
          for (int i = 0; i < N; i++) dr[j][i+1] = madd(x[i], d[j], dr[j][i+1]);
        end
        run(CMD_FWD, N + 7);
        for (int j = 0; j < S; j++) begin
          checks++;
          if (act[j] !== a[j]) begin failures++; $display("act[%0d] %h exp %h", j, act[j], a[j]); end
        end
        run(hid ? CMD_BWD_HID : CMD_BWD_OUT, hid ? N + K + 21 : N + 10);
        for (int j = 0; j < S; j++) begin
          checks++;
          if (delta[j] !== d[j]) begin failures++; $display("delta[%0d] %h exp %h", j, delta[j], d[j]); end
        end
      end
      for (int j = 0; j < S; j++)
        for (int i = 0; i <= N; i++) begin
          wr[j][i] = madd(madd(dr[j][i], inv_m, FP_ZERO), neg_lr, wr[j][i]);
          dr[j][i] = 0;
        end
      run(CMD_GRAD, 2 * N + 10);
      for (int j = 0; j < S; j++)
        for (int i = 0; i <= N; i++) begin
          checks++;
          if (w_rows[j][i] !== wr[j][i]) begin failures++; $display("w[%0d][%0d]", j, i); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
