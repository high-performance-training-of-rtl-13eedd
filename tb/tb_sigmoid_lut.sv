// tb_sigmoid_lut: sweeps the sigmoid table over [-10, 10] including both
// saturation regions and exact bucket edges, and compares every output
// with sigmoid() of the bucket centre computed in double precision
// (within one fp32 ulp) and with the true sigmoid (within the table's
// error bound of 1/64). The output must follow the input by one clock.
module tb_sigmoid_lut;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  fp32_t x, y;
  int checks = 0, failures = 0;

  sigmoid_lut dut(.clk, .rst, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(real z);
    real e;
    x = r2fp(z); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("no valid"); end
    e = sig_lut_ref(fp2r(x));
    checks++;
    if (ulp_diff(y, r2fp(e)) > 1) begin
      failures++; $display("z=%f got %f exp %f", z, fp2r(y), e);
    end
    checks++;
    if (rabs(fp2r(y) - sigm(fp2r(x))) > 1.0/64.0) begin
      failures++; $display("approx z=%f got %f", z, fp2r(y));
    end
  endtask

  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(0.0);
    check(-0.0);
    for (int i = -160; i <= 160; i++) check(real'(i) / 16.0);       // bucket edges
    for (int i = 0; i < 2000; i++) check((real'($urandom_range(0, 200000)) - 100000.0) / 10000.0);
    check(1.0e-3); check(-1.0e-3); check(1.0e6); check(-1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
