// tb_vec_buffer: fills the training-vector buffer word by word at random
// slots, reading whole vectors in between, and compares every read (one
// clock after rd_en, held while rd_en is low) with a shadow copy.
module tb_vec_buffer;
  import dnn_pkg::*;
  localparam int BV = 16, VW = 5;
  logic clk = 0, rst = 1, we = 0, rd_en = 0;
  logic [$clog2(BV)-1:0] wslot = 0, rd_slot = 0;
  logic [$clog2(VW+1)-1:0] wword = 0;
  fp32_t wdata = 0;
  fp32_t rd_vec [VW];
  fp32_t shadow [BV][VW];
  fp32_t held [VW];
  int checks = 0, failures = 0;

  vec_buffer #(.BUF_VECS(BV), .VEC_W(VW)) dut(.clk, .rst, .we, .wslot, .wword, .wdata,
    .rd_en, .rd_slot, .rd_vec);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < VW; w++) held[w] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < BV; s++)
      for (int w = 0; w < VW; w++) begin
        we = 1; wslot = s[$clog2(BV)-1:0]; wword = w[$clog2(VW+1)-1:0]; wdata = $urandom;
        shadow[s][w] = wdata;
        @(posedge clk); #1;
      end
    for (int n = 0; n < 3000; n++) begin
      // a write and a read in the same clock, to different or equal slots
      we = 1'($urandom); wslot = $urandom; wword = $clog2(VW+1)'($urandom_range(0, VW - 1));
      wdata = $urandom;
      rd_en = 1'($urandom); rd_slot = $urandom;
      for (int w = 0; w < VW; w++) held[w] = rd_en ? shadow[rd_slot][w] : held[w];
      @(posedge clk); #1;
      if (we) shadow[wslot][wword] = wdata;
      for (int w = 0; w < VW; w++) begin
        checks++;
        if (rd_vec[w] !== held[w]) begin failures++; $display("slot %0d word %0d", rd_slot, w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
