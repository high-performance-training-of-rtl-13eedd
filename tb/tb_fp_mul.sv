// tb_fp_mul: random and directed checks of the pipelined fp32 multiplier.
// A new operand pair enters every clock; each product must appear exactly
// two clocks later and equal the correctly rounded product computed in
// double precision and rounded to single, including exact ties that
// must round to even.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [31:0] a, b, p;
  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];
  int cyc = 0;

  fp_mul dut(.clk, .rst, .in_valid, .a, .b, .out_valid, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_fp();
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(127 + $signed($urandom_range(0, 40)) - 20);
    return v;
  endfunction

  // Track the latency: remember the cycle when each operation went in.
  int in_cyc_q[$];
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] e;
      int c0;
      e  = exp_q.pop_front();
      c0 = in_cyc_q.pop_front();
      checks++;
      if (p !== e) begin
        failures++;
        $display("MISMATCH got %h exp %h", p, e);
      end
      checks++;
      if (cyc - c0 != 2) begin
        failures++;
        $display("LATENCY %0d", cyc - c0);
      end
    end
  end

  task automatic push(logic [31:0] x, logic [31:0] y);
    a = x; b = y; in_valid = 1;
    if (x[30:23] == 0 || y[30:23] == 0) exp_q.push_back({x[31]^y[31], 31'd0});
    else exp_q.push_back(r2fp(fp2r(x) * fp2r(y)));
    in_cyc_q.push_back(cyc);
    @(posedge clk);
    #1;
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    push(32'h3F80_0000, 32'h4000_0000);   // 1*2
    push(32'h3FC0_0000, 32'hBFC0_0000);   // 1.5*-1.5
    push(32'h0000_0000, 32'h4000_0000);   // 0
    push(32'h3F7F_FFFF, 32'h3F7F_FFFF);   // rounding
    for (int i = 0; i < 2000; i++) push(rnd_fp(), rnd_fp());
    // short significands: products land exactly on rounding ties
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] x, y;
      x = rnd_fp(); y = rnd_fp();
      x[10:0] = '0; y[10:0] = '0;
      push(x, y);
    end
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
