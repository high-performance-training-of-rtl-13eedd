// tb_forward_unit: drives the forward unit together with a neuron ALU and
// a weight array kept in the testbench. For random weights and inputs it
// checks the activation against sigmoid-table(w0 + sum w_j x_j), computed
// with the ALU's rounding, and that done follows start by N_IN+6 clocks.
module tb_forward_unit;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst = 1, start = 0, done;
  fp32_t x [N];
  fp32_t w [N+1];
  logic [ADDR_W-1:0] w_raddr;
  fp32_t w_rdata, res, act;
  logic op_valid, res_valid;
  alu_op_t op;
  alu_tag_t res_tag;
  int checks = 0, failures = 0;

  assign w_rdata = (w_raddr <= N) ? w[w_raddr] : '0;

  forward_unit #(.N_IN(N)) dut(.clk, .rst, .start, .x, .w_raddr, .w_rdata,
    .op_valid, .op, .res_valid, .res, .res_tag, .act, .done);
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
    for (int i = 0; i < N; i++) x[i] = 0;
    for (int i = 0; i <= N; i++) w[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      fp32_t z, e;
      int n;
      for (int i = 0; i < N; i++) x[i] = rnd_small();
      for (int i = 0; i <= N; i++) w[i] = rnd_small();
      z = madd(w[0], FP_ONE, FP_ZERO);
      for (int i = 0; i < N; i++) z = madd(w[i+1], x[i], z);
      e = sig_fp(z);
      @(posedge clk); #1 start = 1;
      @(posedge clk); #1 start = 0;
      n = 1;
      while (!done) begin @(posedge clk); #1; n++; end
      checks += 2;
      if (ulp_diff(act, e) > 1) begin failures++; $display("act %h exp %h", act, e); end
      if (n != N + 6) begin failures++; $display("latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
