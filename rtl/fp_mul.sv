// fp_mul: pipelined IEEE-754 single-precision multiplier.
//
// Stage 1 multiplies the two 24-bit significands, adds the exponents and
// forms the sign. Stage 2 normalises the 48-bit product, rounds to nearest
// even and checks for overflow and underflow. One product can enter every
// clock; it appears LATENCY = 2 clocks later with out_valid. Subnormal
// inputs count as zero and results too small for a normal number are
// flushed to zero; an input with the maximum exponent, or an overflow,
// gives infinity (NaN is not produced). The source design asks for
// pipelined 32-bit IEEE-754 arithmetic; the pipeline depth and the
// handling of special values are this design's choices.
module fp_mul
  import dnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t p
);

  // ---------------- stage 1 ----------------
  logic        s1_valid, s1_sign, s1_zero, s1_inf;
  logic [9:0]  s1_exp;      // biased sum, signed 10-bit room
  logic [47:0] s1_prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_sign  <= 1'b0;
      s1_zero  <= 1'b1;
      s1_inf   <= 1'b0;
      s1_exp   <= '0;
      s1_prod  <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sign  <= a[31] ^ b[31];
      s1_zero  <= (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
      s1_inf   <= (a[30:23] == 8'hFF) || (b[30:23] == 8'hFF);
      s1_exp   <= {2'b00, a[30:23]} + {2'b00, b[30:23]};
      s1_prod  <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
    end
  end

  // ---------------- stage 2 ----------------
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [11:0] exp_n;
  fp32_t       res;

  always_comb begin
    if (s1_prod[47]) begin
      mant   = s1_prod[47:24];
      guard  = s1_prod[23];
      sticky = |s1_prod[22:0];
      exp_n  = $signed({2'b00, s1_exp}) - 12'sd126;
    end else begin
      mant   = s1_prod[46:23];
      guard  = s1_prod[22];
      sticky = |s1_prod[21:0];
      exp_n  = $signed({2'b00, s1_exp}) - 12'sd127;
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      exp_n = exp_n + 12'sd1;
    end
    if (s1_zero) begin
      res = {s1_sign, 31'd0};
    end else if (s1_inf || exp_n >= 12'sd255) begin
      res = {s1_sign, 8'hFF, 23'd0};
    end else if (exp_n <= 12'sd0) begin
      res = {s1_sign, 31'd0};
    end else begin
      // when mant_r overflowed, its fraction bits are all zero
      res = {s1_sign, exp_n[7:0], mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= s1_valid;
      p         <= res;
    end
  end

endmodule
