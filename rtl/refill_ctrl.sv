// refill_ctrl: keeps the training-vector SRAM filled from the SDRAM.
//
// The network consumes training vectors as a stream of positions 0, 1,
// 2, ...; position p holds SDRAM vector p mod num_vectors and lives in
// buffer slot p mod BUF_VECS. After go the controller first fills all
// BUF_VECS slots. From then on the buffer is handled in quarters of
// SWAP_VECS vectors: once the network has released all vectors of a
// quarter (rel pulses, one per vector), the controller fetches the next
// SWAP_VECS vectors into that quarter while the network keeps working on
// the other three. Only then may issue run ahead: position q is requested
// only when q < floor(released / SWAP_VECS) * SWAP_VECS + BUF_VECS.
// loaded counts the positions whose every word has arrived; the network
// may use position p once p < loaded, otherwise it stalls.
// SDRAM side: one word address per handshake (sd_req_valid/sd_req_ready),
// read data returned in order with sd_rvalid, any latency. Vectors are
// stored in SDRAM one after another, VEC_W words each, from word address
// vec_base (sampled with go; hold it stable during a run).
// A go may arrive while reads of the previous run are still in flight:
// pend counts issued reads whose data has not returned, and that many
// responses after the go are dropped instead of being written.
// The 256/64 swap scheme follows the source design; the request/response
// protocol and vector layout are this design's choices.
module refill_ctrl
  import dnn_pkg::*;
#(
  parameter int unsigned BUF_VECS  = 256,
  parameter int unsigned SWAP_VECS = 64,
  parameter int unsigned VEC_W     = 4
)(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        go,
  input  logic [31:0]                 num_vectors,
  input  logic [31:0]                 vec_base,
  input  logic                        rel,
  output logic [31:0]                 loaded,
  // SDRAM read interface
  output logic                        sd_req_valid,
  input  logic                        sd_req_ready,
  output logic [31:0]                 sd_req_addr,
  input  logic                        sd_rvalid,
  input  fp32_t                       sd_rdata,
  // buffer write port
  output logic                        buf_we,
  output logic [$clog2(BUF_VECS)-1:0] buf_slot,
  output logic [$clog2(VEC_W+1)-1:0]  buf_word,
  output fp32_t                       buf_wdata,
  // statistics
  output logic [31:0]                 swap_count
);

  localparam int unsigned SW = $clog2(BUF_VECS);
  localparam int unsigned WW = $clog2(VEC_W + 1);
  localparam int unsigned QB = $clog2(SWAP_VECS);

  logic        active;
  logic [31:0] iss_pos, iss_vec, iss_addr, released, rsp_pos, limit;
  logic [WW-1:0] iss_word, rsp_word;
  logic        fire;
  logic [31:0] pend, drop;
  logic        take;

  assign limit        = ((released >> QB) << QB) + 32'(BUF_VECS);
  assign sd_req_valid = active && (iss_pos < limit);
  assign sd_req_addr  = vec_base + iss_addr;
  assign fire         = sd_req_valid && sd_req_ready;
  assign loaded       = rsp_pos;

  assign take      = sd_rvalid && (drop == '0);
  assign buf_we    = take;
  assign buf_slot  = rsp_pos[SW-1:0];
  assign buf_word  = rsp_word;
  assign buf_wdata = sd_rdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend <= '0;
      drop <= '0;
    end else begin
      pend <= pend + 32'(fire) - 32'(sd_rvalid);
      if (go)                           drop <= pend + 32'(fire) - 32'(sd_rvalid);
      else if (sd_rvalid && drop != '0) drop <= drop - 1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || go) begin
      active     <= go;
      iss_pos    <= '0;
      iss_vec    <= '0;
      iss_addr   <= '0;
      iss_word   <= '0;
      released   <= '0;
      rsp_pos    <= '0;
      rsp_word   <= '0;
      swap_count <= '0;
    end else begin
      if (rel) released <= released + 1;
      if (fire) begin
        if (iss_word == '0 && iss_pos >= 32'(BUF_VECS) && iss_pos[QB-1:0] == '0)
          swap_count <= swap_count + 1;
        if (iss_word == WW'(VEC_W - 1)) begin
          iss_word <= '0;
          iss_pos  <= iss_pos + 1;
          if (iss_vec + 1 >= num_vectors) begin
            iss_vec  <= '0;
            iss_addr <= '0;
          end else begin
            iss_vec  <= iss_vec + 1;
            iss_addr <= iss_addr + 1;
          end
        end else begin
          iss_word <= iss_word + 1'b1;
          iss_addr <= iss_addr + 1;
        end
      end
      if (take) begin
        if (rsp_word == WW'(VEC_W - 1)) begin
          rsp_word <= '0;
          rsp_pos  <= rsp_pos + 1;
        end else begin
          rsp_word <= rsp_word + 1'b1;
        end
      end
    end
  end

  // the network never releases a vector that has not been loaded
  assert property (@(posedge clk) disable iff (rst) rel |-> released < loaded);

endmodule
