// forward_unit: forward trace of one neuron, a = sigmoid(sum_j w_j x_j).
//
// After start it streams N_IN+1 multiply-accumulate operations into the
// neuron's ALU, one per clock: word 0 of the weight memory (the bias
// weight) times the constant bias input 1, then w_j times input x_{j-1}.
// The last operation is tagged; when its result (the weighted sum z)
// returns, it goes through the sigmoid table and the activation is held
// in act until the next forward trace. done pulses for one clock when act
// is valid, which is the acknowledgement the layer passes on. From start
// to done takes N_IN+1 issue clocks, ALU_LAT clocks and one table clock,
// plus one clock to leave idle. The weighted sum with a bias unit and the
// table sigmoid follow the source design; the operation schedule is this
// design's choice.
module forward_unit
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN = 3
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  fp32_t             x [N_IN],
  // weight memory read port
  output logic [ADDR_W-1:0] w_raddr,
  input  fp32_t             w_rdata,
  // ALU
  output logic              op_valid,
  output alu_op_t           op,
  input  logic              res_valid,
  input  fp32_t             res,
  input  alu_tag_t          res_tag,
  // result
  output fp32_t             act,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_SIG} state_e;
  state_e            state;
  logic [ADDR_W-1:0] j;
  logic              sig_in_valid, sig_out_valid;
  fp32_t             sig_y;
  fp32_t             xin;

  always_comb begin
    xin = FP_ONE;
    for (int i = 0; i < int'(N_IN); i++) begin
      if (j == ADDR_W'(i + 1)) xin = x[i];
    end
  end

  assign w_raddr      = j;
  assign op_valid     = (state == S_ISSUE);
  assign op.a         = w_rdata;
  assign op.b         = xin;
  assign op.c         = FP_ZERO;
  assign op.use_acc   = (j != '0);
  assign op.tag.dest  = DST_NONE;
  assign op.tag.addr  = j;
  assign op.tag.last  = (j == ADDR_W'(N_IN));
  assign sig_in_valid = (state == S_WAIT) && res_valid && res_tag.last;

  sigmoid_lut u_sig (
    .clk, .rst,
    .in_valid (sig_in_valid),
    .x        (res),
    .out_valid(sig_out_valid),
    .y        (sig_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      j     <= '0;
      act   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) begin
                   j     <= '0;
                   state <= S_ISSUE;
                 end
        S_ISSUE: if (j == ADDR_W'(N_IN)) state <= S_WAIT;
                 else                   j <= j + 1'b1;
        S_WAIT:  if (sig_in_valid) state <= S_SIG;
        S_SIG:   if (sig_out_valid) begin
                   act   <= sig_y;
                   done  <= 1'b1;
                   state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
