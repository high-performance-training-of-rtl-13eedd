// tb_refill_ctrl: the refill controller between the SDRAM model and a
// buffer array kept in the testbench, with a small buffer (16 vectors in
// quarters of 4) and 37 vectors in SDRAM so the stream wraps. A consumer
// takes positions in order at random speed, only when position < loaded,
// and compares every vector it reads with the SDRAM contents; a slot
// refilled too early would show up as a mismatch. It also checks that no
// request runs past floor(released/4)*4 + 16, that the first fill and
// each quarter refill happen, the number of swaps, and that a second go
// with another base address restarts the stream. A third stream is
// restarted while its reads are still in flight; the stale responses must not
// reach the new stream.
module tb_refill_ctrl;
  import dnn_pkg::*;
  localparam int BV = 16, SV = 4, VW = 3, NV = 37;
  logic clk = 0, rst = 1, go = 0, rel = 0, pause = 0;
  logic [31:0] num_vectors = NV, vec_base = 0, loaded, swap_count, sd_req_addr;
  logic sd_req_valid, sd_req_ready, sd_rvalid, buf_we;
  fp32_t sd_rdata, buf_wdata;
  logic [$clog2(BV)-1:0] buf_slot;
  logic [$clog2(VW+1)-1:0] buf_word;
  fp32_t bufm [BV][VW];
  int checks = 0, failures = 0;
  int released = 0;

  refill_ctrl #(.BUF_VECS(BV), .SWAP_VECS(SV), .VEC_W(VW)) dut(.clk, .rst, .go, .num_vectors,
    .vec_base, .rel, .loaded, .sd_req_valid, .sd_req_ready, .sd_req_addr, .sd_rvalid, .sd_rdata,
    .buf_we, .buf_slot, .buf_word, .buf_wdata, .swap_count);

  sdram_model #(.DEPTH(1024), .LAT(5)) u_sd(.clk, .rst, .pause, .req_valid(sd_req_valid),
    .req_ready(sd_req_ready), .req_addr(sd_req_addr), .rvalid(sd_rvalid), .rdata(sd_rdata),
    .wr_en(1'b0), .wr_addr(32'd0), .wr_data(32'd0));

  always @(posedge clk) if (buf_we) bufm[buf_slot][buf_word] <= buf_wdata;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue must stay inside the window the released vectors allow
  int issued_words = 0;
  int inflight = 0;
  always @(posedge clk)
    if (!rst) inflight <= inflight + int'(sd_req_valid && sd_req_ready) - int'(sd_rvalid);
  always @(posedge clk) begin
    if (!rst && !go && sd_req_valid && sd_req_ready) begin
      checks++;
      if (issued_words / VW >= (released / SV) * SV + BV) begin
        failures++; $display("request beyond window");
      end
      issued_words++;
    end
    if (go) issued_words = 0;
    if (!rst && (rst == 0) && $urandom_range(0, 300) == 0) pause <= ~pause;
  end

  task automatic consume(int nex, int base);
    for (int p = 0; p < nex; p++) begin
      while (!(p < loaded)) begin @(posedge clk); #1; end
      repeat ($urandom_range(0, 40)) @(posedge clk);
      #1;
      for (int w = 0; w < VW; w++) begin
        checks++;
        if (bufm[p % BV][w] !== u_sd.mem[base + (p % NV) * VW + w]) begin
          failures++; $display("pos %0d word %0d", p, w);
        end
      end
      rel = 1; released++;
      @(posedge clk); #1 rel = 0;
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) u_sd.mem[i] = $urandom;
    for (int s = 0; s < BV; s++) for (int w = 0; w < VW; w++) bufm[s][w] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (sd_req_valid) failures++;           // idle before go
    go = 1; @(posedge clk); #1 go = 0;
    consume(100, 0);
    repeat (500) @(posedge clk);
    #1;
    checks += 2;
    if (loaded != 32'((100 / SV) * SV + BV)) begin failures++; $display("loaded %0d", loaded); end
    if (swap_count != 32'((100 / SV) * SV / SV)) begin failures++; $display("swaps %0d", swap_count); end
    // restart at another base
    vec_base = 200; released = 0;
    go = 1; @(posedge clk); #1 go = 0;
    checks++;
    if (loaded != 0 || swap_count != 0) failures++;
    consume(50, 200);
    // start a stream at 400 and restart it at 600 while its first reads
    // are still in flight
    vec_base = 400; released = 0;
    go = 1; @(posedge clk); #1 go = 0;
    repeat ($urandom_range(3, 12)) @(posedge clk);
    while (inflight == 0) begin @(posedge clk); #1; end
    vec_base = 600;
    go = 1; @(posedge clk); #1 go = 0;
    consume(30, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
