// neuron_alu: the arithmetic unit of one neuron.
//
// Every clock it can accept one operation r = a*b + c, or, with use_acc
// set, r = a*b + (the ALU's previous result), which turns it into a
// multiply-accumulator for dot products. It is a pipelined fp32
// multiplier (2 clocks) followed by an fp32 adder (1 clock) whose
// registered output is the accumulator; c, use_acc and the tag ride
// along the multiplier stages. A result leaves ALU_LAT = 3 clocks after
// its operation with out_valid and the operation's tag. The source design
// gives a pipelined multiplier/adder ALU, shared by the forward,
// backpropagation and gradient steps, that delivers one result per clock;
// the fused multiply-add form and the accumulator feedback are this
// design's choices.
module neuron_alu
  import dnn_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  alu_op_t  op,
  output logic     out_valid,
  output fp32_t    result,
  output alu_tag_t out_tag
);

  logic     mul_valid;
  fp32_t    prod;
  fp32_t    c_pipe   [MUL_LAT];
  logic     acc_pipe [MUL_LAT];
  alu_tag_t tag_pipe [MUL_LAT];

  fp_mul u_mul (
    .clk, .rst,
    .in_valid (in_valid),
    .a        (op.a),
    .b        (op.b),
    .out_valid(mul_valid),
    .p        (prod)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < MUL_LAT; i++) begin
        c_pipe[i]   <= '0;
        acc_pipe[i] <= 1'b0;
        tag_pipe[i] <= '0;
      end
    end else begin
      c_pipe[0]   <= op.c;
      acc_pipe[0] <= op.use_acc;
      tag_pipe[0] <= op.tag;
      for (int i = 1; i < MUL_LAT; i++) begin
        c_pipe[i]   <= c_pipe[i-1];
        acc_pipe[i] <= acc_pipe[i-1];
        tag_pipe[i] <= tag_pipe[i-1];
      end
    end
  end

  fp32_t addend;
  assign addend = acc_pipe[MUL_LAT-1] ? result : c_pipe[MUL_LAT-1];

  fp_add u_add (
    .clk, .rst,
    .in_valid (mul_valid),
    .a        (prod),
    .b        (addend),
    .out_valid(out_valid),
    .s        (result)
  );

  always_ff @(posedge clk) begin
    if (rst) out_tag <= '0;
    else     out_tag <= tag_pipe[MUL_LAT-1];
  end

endmodule
