// neuron_mem: a neuron's own small scratch memory.
//
// DEPTH fp32 words with one write port, one read port whose data is
// available in the same clock, and a row port that shows every word at
// once. A neuron has two of them: one holds its incoming weights (word 0
// is the bias weight) and one the Delta sums of its gradient. The row
// port of the weight memory lets the layer below read, during
// backpropagation, the weight that links each of its neurons to this one,
// which is how the memory serves several units at a time. Reset clears
// every word. Placing a small multi-port memory next to each neuron
// follows the source design's distributed memory; building it from
// registers with a row port is this design's choice.
module neuron_mem
  import dnn_pkg::*;
#(
  parameter int unsigned DEPTH = 4
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  fp32_t             wdata,
  input  logic [ADDR_W-1:0] raddr,
  output fp32_t             rdata,
  output fp32_t             row [DEPTH]
);

  fp32_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we && waddr < ADDR_W'(DEPTH)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (raddr < ADDR_W'(DEPTH)) ? mem[raddr] : '0;
  assign row   = mem;

endmodule
