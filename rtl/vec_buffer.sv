// vec_buffer: on-chip SRAM holding the training vectors in use.
//
// BUF_VECS slots of VEC_W fp32 words each (inputs followed by targets).
// The SDRAM side writes one word per clock (we, wslot, wword, wdata); the
// network side reads a whole vector per access (rd_en, rd_slot), returned
// on rd_vec one clock later and held until the next read. The two ports
// work independently, so refilling one part of the buffer overlaps with
// training on another. The 256-vector size and the two access paths
// (network to SRAM, SRAM to SDRAM) follow the source design; the word-wide
// write and vector-wide read are this design's choices.
module vec_buffer
  import dnn_pkg::*;
#(
  parameter int unsigned BUF_VECS = 256,
  parameter int unsigned VEC_W    = 4
)(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        we,
  input  logic [$clog2(BUF_VECS)-1:0] wslot,
  input  logic [$clog2(VEC_W+1)-1:0]  wword,
  input  fp32_t                       wdata,
  input  logic                        rd_en,
  input  logic [$clog2(BUF_VECS)-1:0] rd_slot,
  output fp32_t                       rd_vec [VEC_W]
);

  fp32_t mem [BUF_VECS][VEC_W];

  always_ff @(posedge clk) begin
    if (we && wword < VEC_W) mem[wslot][wword] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(VEC_W); i++) rd_vec[i] <= '0;
    end else if (rd_en) begin
      rd_vec <= mem[rd_slot];
    end
  end

endmodule
