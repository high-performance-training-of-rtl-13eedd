// tb_train_ctrl: the control unit with the layers, the buffer and the
// refill side emulated by the testbench. Layers acknowledge each command
// after a random number of clocks; the number of loaded vectors grows
// slowly so that the controller must stall. The testbench records every
// (layer, command) issued and compares the sequence with the expected
// one: per example FWD on layers 0, 1, 2, then BWD_OUT on 2, BWD_HID on 1
// and 0 in training mode, GRAD on all layers after each batch, and no
// backward commands in test mode. It also checks the latched inputs and
// targets, the released slots, stall counting, the hypothesis index, the
// test-mode score and the number of gradient steps.
module tb_train_ctrl;
  import dnn_pkg::*;
  import tb_fp_pkg::*;
  localparam int NI = 3, NO = 1, BV = 8, NL = 3;
  logic clk = 0, rst = 1, go = 0, train = 0;
  logic [31:0] num_examples = 0, loaded = 0;
  logic [15:0] batch = 1;
  logic rd_en, rel, busy, done, hyp_valid;
  logic [$clog2(BV)-1:0] rd_slot;
  fp32_t rd_vec [NI+NO];
  logic [NL-1:0] l_start, l_done;
  neuron_cmd_e l_cmd [NL];
  fp32_t x_in [NI];
  fp32_t y_t [NO];
  fp32_t hyp [NO];
  logic [31:0] hyp_idx, correct, stall_cycles, grad_steps;
  fp32_t vecs [1000][NI+NO];
  int checks = 0, failures = 0;

  train_ctrl #(.N_IN(NI), .N_OUT(NO), .BUF_VECS(BV), .NL(NL)) dut(.clk, .rst, .go, .train,
    .num_examples, .batch, .loaded, .rd_en, .rd_slot, .rd_vec, .rel, .l_start, .l_cmd, .l_done,
    .x_in, .y_t, .hyp, .busy, .done, .hyp_valid, .hyp_idx, .correct, .stall_cycles, .grad_steps);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer: slot s holds the vector at the current position (the
  // testbench supplies vecs[pos] for whichever slot is read)
  int rel_count = 0;
  always @(posedge clk) begin
    if (rd_en) for (int w = 0; w < NI + NO; w++) rd_vec[w] <= vecs[dut.pos][w];
    if (rel) rel_count++;
  end

  // layers: acknowledge after a random delay
  int pend [NL];
  typedef struct packed { logic [1:0] layer; logic [1:0] cmd; } ev_t;
  ev_t seq[$];
  always @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      l_done[l] <= 1'b0;
      if (!rst && l_start[l]) begin
        pend[l] = $urandom_range(1, 8);
        seq.push_back({2'(l), 2'(l_cmd[l])});
      end else if (pend[l] > 0) begin
        pend[l]--;
        if (pend[l] == 0) l_done[l] <= 1'b1;
      end
    end
  end

  // hypothesis: a random value per example
  int ref_correct = 0, n_hyp = 0;
  always @(posedge clk) begin
    if (!rst && hyp_valid) begin
      checks++;
      if (hyp_idx != 32'(n_hyp)) begin failures++; $display("hyp_idx %0d", hyp_idx); end
      if (!train && ((fp2r(hyp[0]) >= 0.5) == (fp2r(y_t[0]) >= 0.5))) ref_correct++;
      n_hyp++;
      hyp[0] <= r2fp(real'($urandom_range(0, 1000)) / 1000.0);
    end
  end

  // x_in / y_t must hold the vector of the example in progress
  always @(posedge clk) begin
    if (!rst && l_start[0] && l_cmd[0] == CMD_FWD) begin
      for (int w = 0; w < NI; w++) begin
        checks++; if (x_in[w] !== vecs[dut.pos][w]) begin failures++; $display("x_in"); end
      end
      checks++; if (y_t[0] !== vecs[dut.pos][NI]) failures++;
    end
  end

  task automatic run(logic tr, int nex, int b);
    ev_t exp_seq[$];
    int st;
    train = tr; num_examples = 32'(nex); batch = 16'(b);
    n_hyp = 0; ref_correct = 0; rel_count = 0; seq = {}; loaded = 0;
    @(posedge clk); #1 go = 1;
    @(posedge clk); #1 go = 0;
    while (!done) begin
      @(posedge clk); #1;
      if ($urandom_range(0, 40) == 0 && loaded < 32'(nex)) loaded = loaded + 1;
    end
    @(posedge clk); #1;
    for (int e = 0; e < nex; e++) begin
      for (int l = 0; l < NL; l++) exp_seq.push_back({2'(l), 2'(CMD_FWD)});
      if (tr) begin
        exp_seq.push_back({2'(NL - 1), 2'(CMD_BWD_OUT)});
        for (int l = NL - 2; l >= 0; l--) exp_seq.push_back({2'(l), 2'(CMD_BWD_HID)});
        if ((e + 1) % b == 0) for (int l = 0; l < NL; l++) exp_seq.push_back({2'(l), 2'(CMD_GRAD)});
      end
    end
    checks++;
    if (seq.size() != exp_seq.size()) begin
      failures++; $display("sequence length %0d exp %0d", seq.size(), exp_seq.size());
    end else begin
      for (int i = 0; i < seq.size(); i++) begin
        checks++;
        if (seq[i] != exp_seq[i]) begin failures++; $display("event %0d: %h exp %h", i, seq[i], exp_seq[i]); end
      end
    end
    checks += 4;
    if (n_hyp != nex) begin failures++; $display("hyps"); end
    if (rel_count != nex) begin failures++; $display("releases"); end
    if (stall_cycles == 0) begin failures++; $display("no stalls"); end
    if (tr ? (grad_steps != 32'(nex / b)) : (correct != 32'(ref_correct))) begin
      failures++; $display("grad %0d correct %0d/%0d", grad_steps, correct, ref_correct);
    end
    checks++;
    if (busy) failures++;
  endtask

  initial begin
    hyp[0] = 0;
    for (int l = 0; l < NL; l++) begin pend[l] = 0; l_done[l] = 0; end
    for (int i = 0; i < 1000; i++)
      for (int w = 0; w <= NI; w++) vecs[i][w] = r2fp(real'($urandom_range(0, 1000)) / 1000.0);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run(1'b1, 40, 4);
    run(1'b0, 60, 1);
    run(1'b1, 23, 5);       // last batch incomplete: not applied
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
