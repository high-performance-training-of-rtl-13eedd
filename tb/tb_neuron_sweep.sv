// tb_neuron_sweep: the single-neuron experiment. Neurons with 2, 4, 8,
// 16, 32, 64 and 128 inputs each run full training iterations (forward
// trace, output-layer backpropagation, gradient step with m = 1) on random
// data. Every activation, delta and updated weight is compared with a
// reference that rounds like the ALU, and the clocks per iteration must be
// 4*N_IN + 24. The published clock counts of the original neuron for the
// same input counts are printed alongside for comparison.
module tb_neuron_sweep;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int NS = 7;
  localparam int SIZES [NS] = '{2, 4, 8, 16, 32, 64, 128};
  localparam int PUBLISHED [NS] = '{152, 225, 368, 661, 1192, 2325, 4647};
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int finished = 0;
  int clocks [NS];

  always #2 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : g_n
    localparam int N = SIZES[g];
    logic start = 0, done, busy, wl_we = 0;
    neuron_cmd_e cmd = CMD_FWD;
    fp32_t x [N];
    fp32_t bk [1];
    fp32_t w_row [N+1];
    fp32_t y = 0, act, delta, wl_data = 0;
    logic [ADDR_W-1:0] wl_addr = 0;
    fp32_t wr [N+1];

    assign bk[0] = FP_ZERO;

    neuron #(.N_IN(N), .N_NEXT(1)) u_n (.clk, .rst, .start, .cmd, .done, .busy, .x, .y,
      .bk_w(bk), .bk_d(bk), .inv_m(FP_ONE), .neg_lr(32'hBDCC_CCCD), .wl_we, .wl_addr, .wl_data,
      .act, .delta, .w_row);

    task automatic run(neuron_cmd_e c, output int n);
      @(posedge clk); #1 start = 1; cmd = c;
      @(posedge clk); #1 start = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
    endtask

    initial begin
      int n1, n2, n3;
      for (int i = 0; i < N; i++) x[i] = 0;
      @(negedge rst);
      #1;
      for (int i = 0; i <= N; i++) begin
        wr[i] = r2fp((real'($urandom_range(0, 2000)) - 1000.0) / 10000.0);
        wl_we = 1; wl_addr = ADDR_W'(i); wl_data = wr[i];
        @(posedge clk); #1;
      end
      wl_we = 0;
      for (int it = 0; it < 5; it++) begin
        fp32_t z, a, d;
        for (int i = 0; i < N; i++) x[i] = r2fp(real'($urandom_range(0, 1000)) / 1000.0);
        y = $urandom_range(0, 1) ? FP_ONE : FP_ZERO;
        z = madd(wr[0], FP_ONE, FP_ZERO);
        for (int i = 0; i < N; i++) z = madd(wr[i+1], x[i], z);
        a = sig_fp(z);
        d = madd(a, FP_ONE, {~y[31], y[30:0]});
        run(CMD_FWD, n1);
        run(CMD_BWD_OUT, n2);
        run(CMD_GRAD, n3);
        checks += 3;
        if (act !== a) begin failures++; $display("N=%0d act %h exp %h", N, act, a); end
        if (delta !== d) begin failures++; $display("N=%0d delta", N); end
        if (n1 + n2 + n3 != 4 * N + 24) begin failures++; $display("N=%0d clocks %0d", N, n1 + n2 + n3); end
        clocks[g] = n1 + n2 + n3;
        wr[0] = madd(madd(madd(FP_ONE, d, FP_ZERO), FP_ONE, FP_ZERO), 32'hBDCC_CCCD, wr[0]);
        for (int i = 0; i < N; i++)
          wr[i+1] = madd(madd(madd(x[i], d, FP_ZERO), FP_ONE, FP_ZERO), 32'hBDCC_CCCD, wr[i+1]);
        for (int i = 0; i <= N; i++) begin
          checks++;
          if (w_row[i] !== wr[i]) begin failures++; $display("N=%0d w[%0d]", N, i); end
        end
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (finished == NS);
    for (int g = 0; g < NS; g++)
      $display("inputs %4d: %5d clocks per iteration (%0.2f us at 4 ns); published neuron %5d",
               SIZES[g], clocks[g], real'(clocks[g]) * 0.004, PUBLISHED[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
