// backprop_unit: error term of one neuron and accumulation of its gradient.
//
// Output layer (hidden = 0): delta = a - y, the neuron's activation minus
// the target. Hidden layer (hidden = 1): delta = (sum_k w_kj delta_k) *
// a * (1 - a), where delta_k are the error terms of the layer above and
// w_kj the weights that link this neuron to them (bk_d, bk_w). The sum is
// one multiply-accumulate per clock; a*(1-a) and the final product are
// three dependent ALU operations that each wait for the previous result.
// Then, for every incoming weight j (j = 0 is the bias), the unit adds
// x_j * delta to Delta_j in the neuron's Delta memory: it reads Delta_j,
// issues Delta_j + x_j*delta to the ALU tagged for write-back to address
// j, one per clock. done pulses for one clock after the last write-back.
// The formulas, delta = a - y at the output and the Delta accumulation,
// follow the source design's equations (1) and (2); the schedule is this
// design's choice.
module backprop_unit
  import dnn_pkg::*;
#(
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_NEXT = 1
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              hidden,
  input  fp32_t             act,
  input  fp32_t             y,
  input  fp32_t             x    [N_IN],
  input  fp32_t             bk_w [N_NEXT],
  input  fp32_t             bk_d [N_NEXT],
  // Delta memory read port
  output logic [ADDR_W-1:0] d_raddr,
  input  fp32_t             d_rdata,
  // ALU
  output logic              op_valid,
  output alu_op_t           op,
  input  logic              res_valid,
  input  fp32_t             res,
  input  alu_tag_t          res_tag,
  // result
  output fp32_t             delta,
  output logic              done
);

  typedef enum logic [3:0] {
    S_IDLE, S_ERR, S_ERR_W, S_OMA, S_OMA_W, S_T, S_T_W, S_D, S_D_W, S_ACC, S_ACC_W
  } state_e;

  state_e            state;
  logic              mode_hid;
  logic [ADDR_W-1:0] k;
  fp32_t             err_sum, tmp;
  fp32_t             xin, bw, bd;
  logic              got;

  assign got = res_valid && res_tag.last;

  always_comb begin
    xin = FP_ONE;
    for (int i = 0; i < int'(N_IN); i++) begin
      if (k == ADDR_W'(i + 1)) xin = x[i];
    end
    bw = FP_ZERO;
    bd = FP_ZERO;
    for (int i = 0; i < int'(N_NEXT); i++) begin
      if (k == ADDR_W'(i)) begin
        bw = bk_w[i];
        bd = bk_d[i];
      end
    end
  end

  assign d_raddr = k;

  always_comb begin
    op_valid = 1'b0;
    op       = '0;
    case (state)
      S_ERR: begin
        op_valid = 1'b1;
        if (mode_hid) begin
          op.a        = bw;
          op.b        = bd;
          op.use_acc  = (k != '0);
          op.tag.last = (k == ADDR_W'(N_NEXT - 1));
        end else begin
          op.a        = act;
          op.b        = FP_ONE;
          op.c        = fp_neg(y);
          op.tag.last = 1'b1;
        end
      end
      S_OMA: begin            // 1 - a
        op_valid    = 1'b1;
        op.a        = act;
        op.b        = FP_NEG_ONE;
        op.c        = FP_ONE;
        op.tag.last = 1'b1;
      end
      S_T: begin              // a * (1 - a)
        op_valid    = 1'b1;
        op.a        = act;
        op.b        = tmp;
        op.tag.last = 1'b1;
      end
      S_D: begin              // sum * a * (1 - a)
        op_valid    = 1'b1;
        op.a        = err_sum;
        op.b        = tmp;
        op.tag.last = 1'b1;
      end
      S_ACC: begin            // Delta_j += x_j * delta
        op_valid    = 1'b1;
        op.a        = xin;
        op.b        = delta;
        op.c        = d_rdata;
        op.tag.dest = DST_D;
        op.tag.addr = k;
        op.tag.last = (k == ADDR_W'(N_IN));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      mode_hid <= 1'b0;
      k        <= '0;
      err_sum  <= '0;
      tmp      <= '0;
      delta    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:  if (start) begin
                   mode_hid <= hidden;
                   k        <= '0;
                   state    <= S_ERR;
                 end
        S_ERR:   if (!mode_hid || k == ADDR_W'(N_NEXT - 1)) state <= S_ERR_W;
                 else                                         k <= k + 1'b1;
        S_ERR_W: if (got) begin
                   if (mode_hid) begin
                     err_sum <= res;
                     state   <= S_OMA;
                   end else begin
                     delta   <= res;
                     k       <= '0;
                     state   <= S_ACC;
                   end
                 end
        S_OMA:   state <= S_OMA_W;
        S_OMA_W: if (got) begin tmp <= res; state <= S_T; end
        S_T:     state <= S_T_W;
        S_T_W:   if (got) begin tmp <= res; state <= S_D; end
        S_D:     state <= S_D_W;
        S_D_W:   if (got) begin
                   delta <= res;
                   k     <= '0;
                   state <= S_ACC;
                 end
        S_ACC:   if (k == ADDR_W'(N_IN)) state <= S_ACC_W;
                 else                   k <= k + 1'b1;
        S_ACC_W: if (got) begin
                   done  <= 1'b1;
                   state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
