// gradient_unit: gradient descent step of one neuron, once per batch.
//
// Pass 1 turns every accumulated Delta_j into the partial derivative
// D_j = Delta_j * (1/m), written back in place. Pass 2 updates every weight,
// w_j = w_j + D_j * (-alpha), and clears Delta_j for the next batch. Both
// passes issue one ALU operation per clock for j = 0..N_IN (j = 0 is the
// bias weight); pass 2 starts when the last result of pass 1 has been
// written back, and done pulses after the last weight is written. The
// reciprocal batch size 1/m and the negated learning rate -alpha arrive
// as fp32 values. The derivative Delta/m and the update with learning
// rate alpha follow the source design; taking 1/m and -alpha as inputs
// instead of dividing is this design's choice.
module gradient_unit
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN = 3
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  fp32_t             inv_m,
  input  fp32_t             neg_lr,
  // memory ports
  output logic [ADDR_W-1:0] d_raddr,
  input  fp32_t             d_rdata,
  output logic [ADDR_W-1:0] w_raddr,
  input  fp32_t             w_rdata,
  output logic              d_clr,
  output logic [ADDR_W-1:0] d_clr_addr,
  // ALU
  output logic              op_valid,
  output alu_op_t           op,
  input  logic              res_valid,
  input  alu_tag_t          res_tag,
  output logic              done
);

  typedef enum logic [2:0] {S_IDLE, S_P1, S_P1_W, S_P2, S_P2_W} state_e;
  state_e            state;
  logic [ADDR_W-1:0] j;
  logic              got;

  assign got        = res_valid && res_tag.last;
  assign d_raddr    = j;
  assign w_raddr    = j;
  assign d_clr      = (state == S_P2);
  assign d_clr_addr = j;

  always_comb begin
    op_valid    = (state == S_P1) || (state == S_P2);
    op          = '0;
    op.a        = d_rdata;
    op.tag.addr = j;
    op.tag.last = (j == ADDR_W'(N_IN));
    if (state == S_P2) begin
      op.b        = neg_lr;
      op.c        = w_rdata;
      op.tag.dest = DST_W;
    end else begin
      op.b        = inv_m;
      op.c        = FP_ZERO;
      op.tag.dest = DST_D;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      j     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin j <= '0; state <= S_P1; end
        S_P1:   if (j == ADDR_W'(N_IN)) state <= S_P1_W;
                else                   j <= j + 1'b1;
        S_P1_W: if (got) begin j <= '0; state <= S_P2; end
        S_P2:   if (j == ADDR_W'(N_IN)) state <= S_P2_W;
                else                   j <= j + 1'b1;
        S_P2_W: if (got) begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
