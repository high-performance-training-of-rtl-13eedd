// tb_neuron_alu: checks the neuron ALU in both of its modes. Independent
// multiply-adds are streamed one per clock and each result is compared
// with a*b+c rounded twice to fp32 (once after the product, once after the
// sum) with the tag and the 3-clock latency; then dot products of random
// length are accumulated with use_acc and compared with a reference that
// rounds the same way.
module tb_neuron_alu;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  alu_op_t op;
  fp32_t result;
  alu_tag_t out_tag;
  int checks = 0, failures = 0, cyc = 0;
  fp32_t exp_q[$];
  alu_tag_t tag_q[$];
  int cyc_q[$];

  neuron_alu dut(.clk, .rst, .in_valid, .op, .out_valid, .result, .out_tag);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      fp32_t e;
      alu_tag_t t;
      int c0;
      e = exp_q.pop_front(); t = tag_q.pop_front(); c0 = cyc_q.pop_front();
      checks += 3;
      if (result !== e) begin failures++; $display("RES got %h exp %h", result, e); end
      if (out_tag !== t) begin failures++; $display("TAG"); end
      if (cyc - c0 != 3) begin failures++; $display("LAT %0d", cyc - c0); end
    end
  end

  function automatic fp32_t rnd_fp();
    fp32_t v;
    v = $urandom;
    v[30:23] = 8'(127 + $signed($urandom_range(0, 10)) - 5);
    return v;
  endfunction

  fp32_t acc;

  task automatic issue(fp32_t a, fp32_t b, fp32_t c, logic use_acc);
    fp32_t pr, r;
    op.a = a; op.b = b; op.c = c; op.use_acc = use_acc;
    op.tag.dest = dest_e'($urandom_range(0, 2));
    op.tag.addr = ADDR_W'($urandom);
    op.tag.last = 1'($urandom);
    in_valid = 1;
    pr = r2fp(fp2r(a) * fp2r(b));
    r  = r2fp(fp2r(pr) + fp2r(use_acc ? acc : c));
    acc = r;
    exp_q.push_back(r); tag_q.push_back(op.tag); cyc_q.push_back(cyc);
    @(posedge clk); #1;
  endtask

  initial begin
    op = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 500; i++) issue(rnd_fp(), rnd_fp(), rnd_fp(), 1'b0);
    for (int n = 0; n < 50; n++) begin
      int len;
      len = $urandom_range(1, 20);
      issue(rnd_fp(), rnd_fp(), rnd_fp(), 1'b0);
      for (int k = 1; k < len; k++) issue(rnd_fp(), rnd_fp(), 32'h0, 1'b1);
      // a bubble inside a chain must not disturb the accumulator
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      issue(rnd_fp(), rnd_fp(), 32'h0, 1'b1);
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
