// fp_add: IEEE-754 single-precision adder with one registered stage.
//
// The operand with the larger magnitude is kept, the other is shifted
// right to align the binary points, keeping guard, round and sticky bits.
// The significands are then added or subtracted, the result is
// renormalised by a leading-zero count and rounded to nearest even.
// A sum enters every clock and leaves one clock later (LATENCY = 1), so a
// result can be fed straight back as the next operand, which the neuron
// ALU uses to accumulate; s holds its value while no new sum enters, so
// the accumulator survives idle clocks. Subnormals are flushed to zero, an input with
// the maximum exponent or an overflow gives infinity, an exact zero
// result is +0. The single-stage depth is this design's choice; the
// source design only asks for pipelined 32-bit IEEE-754 arithmetic.
module fp_add
  import dnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t s
);

  fp32_t big, sml;
  logic [26:0] big_m, sml_m, sml_sh;   // 1.m plus guard/round/sticky
  logic [7:0]  d;
  logic        sticky;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [10:0] e;
  logic        rnd;
  logic [24:0] mant_r;
  fp32_t       res;
  logic        big_zero, sml_zero;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin
      big = a;
      sml = b;
    end else begin
      big = b;
      sml = a;
    end
    big_zero = (big[30:23] == 8'd0);
    sml_zero = (sml[30:23] == 8'd0);
    big_m    = {1'b1, big[22:0], 3'b000};
    sml_m    = sml_zero ? 27'd0 : {1'b1, sml[22:0], 3'b000};
    d        = big[30:23] - sml[30:23];
    if (d >= 8'd27) begin
      sml_sh = 27'd0;
      sticky = |sml_m;
    end else begin
      sml_sh = sml_m >> d;
      sticky = |(sml_m & ((27'd1 << d) - 27'd1));
    end
    sml_sh[0] = sml_sh[0] | sticky;

    if (big[31] == sml[31]) sum = {1'b0, big_m} + {1'b0, sml_sh};
    else                    sum = {1'b0, big_m} - {1'b0, sml_sh};

    e = $signed({3'b000, big[30:23]});
    if (sum[27]) begin
      norm = {sum[27:2], sum[1] | sum[0]};
      e    = e + 11'sd1;
      lz   = 5'd0;
    end else begin
      lz = 5'd27;
      for (int i = 0; i < 27; i++) begin
        if (sum[i]) lz = 5'(26 - i);
      end
      norm = sum[26:0] << lz;
      e    = e - $signed({6'd0, lz});
    end

    rnd    = norm[2] && ((|norm[1:0]) || norm[3]);
    mant_r = {1'b0, norm[26:3]} + {24'd0, rnd};
    if (mant_r[24]) e = e + 11'sd1;

    if (big_zero) begin
      res = sml_zero ? 32'd0 : sml;
    end else if (big[30:23] == 8'hFF || e >= 11'sd255) begin
      res = {big[31], 8'hFF, 23'd0};
    end else if (sum == 28'd0 || e <= 11'sd0) begin
      res = 32'd0;
    end else begin
      res = {big[31], e[7:0], mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      s         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= res;
    end
  end

endmodule
