// tb_backprop_unit: drives the backpropagation unit with a neuron ALU and
// a Delta array in the testbench that takes the ALU's write-backs. In
// both modes (output layer: delta = a - y; hidden layer: delta =
// (sum_k w_k d_k) a (1-a)) it checks delta and every accumulated Delta_j
// over several consecutive examples against a reference that rounds like
// the ALU, and checks the start-to-done clock count.
module tb_backprop_unit;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, K = 3;
  logic clk = 0, rst = 1, start = 0, hidden = 0, done;
  fp32_t act, y, delta, res, d_rdata;
  fp32_t x [N];
  fp32_t bk_w [K];
  fp32_t bk_d [K];
  fp32_t dm [N+1];
  fp32_t dref [N+1];
  logic [ADDR_W-1:0] d_raddr;
  logic op_valid, res_valid;
  alu_op_t op;
  alu_tag_t res_tag;
  int checks = 0, failures = 0;

  assign d_rdata = (d_raddr <= N) ? dm[d_raddr] : '0;
  always @(posedge clk)
    if (res_valid && res_tag.dest == DST_D) dm[res_tag.addr] <= res;

  backprop_unit #(.N_IN(N), .N_NEXT(K)) dut(.clk, .rst, .start, .hidden, .act, .y, .x,
    .bk_w, .bk_d, .d_raddr, .d_rdata, .op_valid, .op, .res_valid, .res, .res_tag,
    .delta, .done);
  neuron_alu u_alu(.clk, .rst, .in_valid(op_valid), .op, .out_valid(res_valid),
    .result(res), .out_tag(res_tag));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act = 0; y = 0;
    for (int i = 0; i < N; i++) x[i] = 0;
    for (int i = 0; i < K; i++) begin bk_w[i] = 0; bk_d[i] = 0; end
    for (int i = 0; i <= N; i++) begin dm[i] = 0; dref[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      fp32_t e, s, oma, tt;
      int n;
      hidden = 1'(t % 2);
      act = r2fp(real'($urandom_range(1, 9999)) / 10000.0);
      y = $urandom_range(0, 1) ? FP_ONE : FP_ZERO;
      for (int i = 0; i < N; i++) x[i] = r2fp(real'($urandom_range(0, 10000)) / 10000.0);
      for (int i = 0; i < K; i++) begin bk_w[i] = rnd_small(); bk_d[i] = rnd_small(); end
      if (!hidden) e = madd(act, FP_ONE, {~y[31], y[30:0]});
      else begin
        s = madd(bk_w[0], bk_d[0], FP_ZERO);
        for (int k = 1; k < K; k++) s = madd(bk_w[k], bk_d[k], s);
        oma = madd(act, FP_NEG_ONE, FP_ONE);
        tt  = madd(act, oma, FP_ZERO);
        e   = madd(s, tt, FP_ZERO);
      end
      dref[0] = madd(FP_ONE, e, dref[0]);
      for (int i = 0; i < N; i++) dref[i+1] = madd(x[i], e, dref[i+1]);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      checks++;
      if (delta !== e) begin failures++; $display("delta %h exp %h hid %0d", delta, e, hidden); end
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (dm[i] !== dref[i]) begin failures++; $display("Delta[%0d] %h exp %h", i, dm[i], dref[i]); end
      end
      checks++;
      if (n != (hidden ? K + N + 20 : N + 9)) begin failures++; $display("latency %0d hid %0d", n, hidden); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
