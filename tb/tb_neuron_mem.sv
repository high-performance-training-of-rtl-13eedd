// tb_neuron_mem: writes random words to random addresses of the neuron
// memory and checks the same-clock read port and the row port against a
// shadow array, including that reset clears every word and that writes
// beyond DEPTH are ignored.
module tb_neuron_mem;
  import dnn_pkg::*;
  localparam int D = 7;
  logic clk = 0, rst = 1, we = 0;
  logic [ADDR_W-1:0] waddr, raddr;
  fp32_t wdata, rdata;
  fp32_t row [D];
  fp32_t shadow [D];
  int checks = 0, failures = 0;

  neuron_mem #(.DEPTH(D)) dut(.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata, .row);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < D; i++) shadow[i] = 0;
    for (int i = 0; i < D; i++) begin
      raddr = ADDR_W'(i); #1;
      checks++; if (rdata !== 0) failures++;
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); waddr = ADDR_W'($urandom_range(0, D + 2)); wdata = $urandom;
      @(posedge clk); #1;
      if (we && waddr < D) shadow[waddr] = wdata;
      we = 0;
      raddr = ADDR_W'($urandom_range(0, D - 1)); #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("rd %0d", raddr); end
      for (int i = 0; i < D; i++) begin
        checks++; if (row[i] !== shadow[i]) failures++;
      end
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < D; i++) begin checks++; if (row[i] !== 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
