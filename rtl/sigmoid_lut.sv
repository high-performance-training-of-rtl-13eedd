// sigmoid_lut: activation function by table look-up.
//
// The fp32 input z is turned into a table index: z is scaled by
// 2^FRAC (FRAC = LUT_BITS - log2(2*X_RANGE) fractional bits, 4 by
// default, so buckets are 1/16 wide), truncated towards minus infinity
// and offset by half the table, which covers [-X_RANGE, X_RANGE) with
// 2^LUT_BITS buckets; inputs outside saturate to the first or last
// bucket. Each entry holds sigmoid() of its bucket centre as an fp32
// value; the table is computed at elaboration from exp(), so it needs no
// data file. The output is registered: y is valid one clock after x.
// Using a table for the sigmoid follows the source design, which found it
// about 3.5 times faster than computing the function with the ALU; the
// range, the bucket width and the centre values are this design's choices.
module sigmoid_lut
  import dnn_pkg::*;
#(
  parameter int unsigned LUT_BITS = 8,   // 256 entries
  parameter int unsigned X_RANGE  = 8    // table covers [-8, 8); a power of two
)(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  fp32_t x,
  output logic  out_valid,
  output fp32_t y
);

  localparam int unsigned ENTRIES = 1 << LUT_BITS;
  localparam int          FRAC    = int'(LUT_BITS) - $clog2(2 * X_RANGE);
  localparam int          HALF    = ENTRIES / 2;

  typedef fp32_t table_t [ENTRIES];

  // Round a real to the nearest fp32 value (normal range only).
  function automatic fp32_t real_to_fp32(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) m = m + 25'd1;
    if (m[24]) e = e + 1;
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      real z;
      z = (real'(i - HALF) + 0.5) / real'(1 << FRAC);
      t[i] = real_to_fp32(1.0 / (1.0 + $exp(-z)));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [LUT_BITS-1:0] idx;
  int                  sh, mag, pos;
  logic [23:0]         sig;
  logic                frac_nz;

  always_comb begin
    sig     = {1'b1, x[22:0]};
    sh      = int'(x[30:23]) - 127 + FRAC;   // |x| * 2^FRAC = sig * 2^(sh-23)
    frac_nz = 1'b0;
    mag     = 0;
    if (x[30:23] == 8'd0) begin
      mag = 0;
    end else if (sh < 0) begin
      frac_nz = 1'b1;
    end else if (sh > int'(LUT_BITS)) begin
      mag = ENTRIES;                          // saturate
    end else begin
      mag     = int'({8'd0, sig} >> (23 - sh));
      frac_nz = |(sig & ((24'd1 << (23 - sh)) - 24'd1));
    end
    if (x[31]) pos = HALF - mag - (frac_nz ? 1 : 0);
    else       pos = HALF + mag;
    if (pos < 0)                 idx = '0;
    else if (pos >= int'(ENTRIES)) idx = '1;
    else                         idx = LUT_BITS'(pos);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= TABLE[idx];
    end
  end

endmodule
