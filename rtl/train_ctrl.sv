// train_ctrl: the control unit of the three-layer network.
//
// After go it processes num_examples training vectors in stream order.
// For each one it waits until the vector is in the on-chip buffer
// (position < loaded; the clocks spent waiting are counted as stalls),
// reads it, latches inputs and targets and releases the buffer slot.
// Forward trace: layer 0 is started with CMD_FWD and each layer's
// acknowledgement starts the next, until the output layer has produced
// the hypothesis (hyp_valid pulses). In test mode (train = 0) the
// hypothesis is only scored: an example counts as correct when every
// output is on the same side of 0.5 as its target. In training mode the
// error is then propagated back, output layer first (CMD_BWD_OUT), then
// each hidden layer (CMD_BWD_HID), each accumulating its Delta sums; after
// every batch examples all layers run CMD_GRAD together. An incomplete
// last batch is not applied. done pulses at the end and busy is high
// throughout. The acknowledgement chain in the forward trace and the
// backward order follow the source design; the batch handling at the end
// and the scoring rule are this design's choices.
module train_ctrl
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN     = 3,
  parameter int unsigned N_OUT    = 1,
  parameter int unsigned BUF_VECS = 256,
  parameter int unsigned NL       = 3     // number of neuron layers
)(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        go,
  input  logic                        train,
  input  logic [31:0]                 num_examples,
  input  logic [15:0]                 batch,
  // vector buffer
  input  logic [31:0]                 loaded,
  output logic                        rd_en,
  output logic [$clog2(BUF_VECS)-1:0] rd_slot,
  input  fp32_t                       rd_vec [N_IN+N_OUT],
  output logic                        rel,
  // layers
  output logic [NL-1:0]               l_start,
  output neuron_cmd_e                 l_cmd [NL],
  input  logic [NL-1:0]               l_done,
  output fp32_t                       x_in  [N_IN],
  output fp32_t                       y_t   [N_OUT],
  input  fp32_t                       hyp   [N_OUT],
  // status
  output logic                        busy,
  output logic                        done,
  output logic                        hyp_valid,
  output logic [31:0]                 hyp_idx,
  output logic [31:0]                 correct,
  output logic [31:0]                 stall_cycles,
  output logic [31:0]                 grad_steps
);

  typedef enum logic [2:0] {S_IDLE, S_WAITV, S_READ, S_LATCH, S_FWD, S_BWD, S_GRAD} state_e;

  state_e            state;
  logic              mode_train;
  logic [31:0]       pos, n_ex;
  logic [15:0]       bcount, bsize;
  logic [$clog2(NL+1)-1:0] li;
  logic              waiting;
  logic [NL-1:0]     gseen;

  assign rd_slot = pos[$clog2(BUF_VECS)-1:0];
  assign rd_en   = (state == S_READ);

  function automatic logic ge_half(fp32_t v);
    return !v[31] && (v[30:0] >= FP_HALF[30:0]);
  endfunction

  logic all_match;
  always_comb begin
    all_match = 1'b1;
    for (int i = 0; i < int'(N_OUT); i++)
      if (ge_half(hyp[i]) != ge_half(y_t[i])) all_match = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      mode_train   <= 1'b0;
      pos          <= '0;
      n_ex         <= '0;
      bcount       <= '0;
      bsize        <= 16'd1;
      li           <= '0;
      waiting      <= 1'b0;
      gseen        <= '0;
      rel          <= 1'b0;
      l_start      <= '0;
      for (int i = 0; i < int'(NL); i++) l_cmd[i] <= CMD_FWD;
      for (int i = 0; i < int'(N_IN); i++) x_in[i] <= '0;
      for (int i = 0; i < int'(N_OUT); i++) y_t[i] <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      hyp_valid    <= 1'b0;
      hyp_idx      <= '0;
      correct      <= '0;
      stall_cycles <= '0;
      grad_steps   <= '0;
    end else begin
      rel       <= 1'b0;
      l_start   <= '0;
      done      <= 1'b0;
      hyp_valid <= 1'b0;
      case (state)
        S_IDLE: if (go) begin
          mode_train   <= train;
          n_ex         <= num_examples;
          bsize        <= (batch == 16'd0) ? 16'd1 : batch;
          pos          <= '0;
          bcount       <= '0;
          correct      <= '0;
          stall_cycles <= '0;
          grad_steps   <= '0;
          busy         <= (num_examples != 0);
          done         <= (num_examples == 0);
          if (num_examples != 0) state <= S_WAITV;
        end
        S_WAITV: begin
          if (pos < loaded) state <= S_READ;
          else              stall_cycles <= stall_cycles + 1;
        end
        S_READ: state <= S_LATCH;
        S_LATCH: begin
          for (int i = 0; i < int'(N_IN); i++)  x_in[i] <= rd_vec[i];
          for (int i = 0; i < int'(N_OUT); i++) y_t[i]  <= rd_vec[N_IN + i];
          rel     <= 1'b1;
          li      <= '0;
          waiting <= 1'b0;
          state   <= S_FWD;
        end
        S_FWD: begin
          if (!waiting) begin
            l_start[li] <= 1'b1;
            l_cmd[li]   <= CMD_FWD;
            waiting     <= 1'b1;
          end else if (l_done[li]) begin
            waiting <= 1'b0;
            if (li == NL - 1) begin
              hyp_valid <= 1'b1;
              hyp_idx   <= pos;
              if (!mode_train && all_match) correct <= correct + 1;
              if (mode_train) begin
                state <= S_BWD;
              end else begin
                pos <= pos + 1;
                if (pos + 1 == n_ex) begin
                  state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
                end else begin
                  state <= S_WAITV;
                end
              end
            end else begin
              li <= li + 1'b1;
            end
          end
        end
        S_BWD: begin
          if (!waiting) begin
            l_start[li] <= 1'b1;
            l_cmd[li]   <= (li == NL - 1) ? CMD_BWD_OUT : CMD_BWD_HID;
            waiting     <= 1'b1;
          end else if (l_done[li]) begin
            waiting <= 1'b0;
            if (li == 0) begin
              pos <= pos + 1;
              if (bcount + 1 == bsize) begin
                bcount <= '0;
                gseen  <= '0;
                state  <= S_GRAD;
              end else begin
                bcount <= bcount + 1;
                if (pos + 1 == n_ex) begin
                  state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
                end else begin
                  state <= S_WAITV;
                end
              end
            end else begin
              li <= li - 1'b1;
            end
          end
        end
        S_GRAD: begin
          if (!waiting) begin
            l_start <= '1;
            for (int i = 0; i < int'(NL); i++) l_cmd[i] <= CMD_GRAD;
            waiting <= 1'b1;
          end else if ((gseen | l_done) == '1) begin
            waiting    <= 1'b0;
            grad_steps <= grad_steps + 1;
            if (pos == n_ex) begin
              state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
            end else begin
              state <= S_WAITV;
            end
          end else begin
            gseen <= gseen | l_done;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
