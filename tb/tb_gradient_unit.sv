// tb_gradient_unit: drives the gradient unit with a neuron ALU and weight
// and Delta arrays in the testbench that take the write-backs and the
// Delta clear. For random weights, Delta sums, batch sizes and learning
// rates it checks every new weight against w + (Delta/m)(-alpha) rounded
// like the ALU, that every Delta is cleared, and the clock count.
module tb_gradient_unit;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst = 1, start = 0, done;
  fp32_t inv_m, neg_lr, d_rdata, w_rdata, res;
  fp32_t wm [N+1];
  fp32_t dm [N+1];
  fp32_t wref [N+1];
  logic [ADDR_W-1:0] d_raddr, w_raddr, d_clr_addr;
  logic d_clr, op_valid, res_valid;
  alu_op_t op;
  alu_tag_t res_tag;
  int checks = 0, failures = 0;

  assign d_rdata = (d_raddr <= N) ? dm[d_raddr] : '0;
  assign w_rdata = (w_raddr <= N) ? wm[w_raddr] : '0;
  always @(posedge clk) begin
    if (res_valid && res_tag.dest == DST_D) dm[res_tag.addr] <= res;
    else if (d_clr) dm[d_clr_addr] <= '0;
    if (res_valid && res_tag.dest == DST_W) wm[res_tag.addr] <= res;
  end

  gradient_unit #(.N_IN(N)) dut(.clk, .rst, .start, .inv_m, .neg_lr, .d_raddr, .d_rdata,
    .w_raddr, .w_rdata, .d_clr, .d_clr_addr, .op_valid, .op, .res_valid, .res_tag, .done);
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
    inv_m = 0; neg_lr = 0;
    for (int i = 0; i <= N; i++) begin wm[i] = 0; dm[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      int n, m;
      m = $urandom_range(1, 64);
      inv_m  = r2fp(1.0 / real'(m));
      neg_lr = r2fp(-real'($urandom_range(1, 1000)) / 10000.0);
      for (int i = 0; i <= N; i++) begin
        wm[i] = rnd_small();
        dm[i] = r2fp((real'($urandom_range(0, 40000)) - 20000.0) / 1000.0);
        wref[i] = madd(madd(dm[i], inv_m, FP_ZERO), neg_lr, wm[i]);
      end
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      for (int i = 0; i <= N; i++) begin
        checks += 2;
        if (wm[i] !== wref[i]) begin failures++; $display("w[%0d] %h exp %h", i, wm[i], wref[i]); end
        if (dm[i] !== 0) begin failures++; $display("Delta[%0d] not cleared", i); end
      end
      checks++;
      if (n != 2 * N + 9) begin failures++; $display("latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
