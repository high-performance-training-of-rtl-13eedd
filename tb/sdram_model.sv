// sdram_model: behavioural model of the external SDRAM that holds the
// training vectors (simulation only, not synthesizable).
//
// A word array of DEPTH fp32 words. Read requests are accepted on the
// valid/ready address channel at most every other clock, half the rate
// of the on-chip buffer, and can be held off entirely with pause; each
// read returns its word in order LAT clocks after acceptance with rvalid.
// The testbench fills the array through the wr_* port.
module sdram_model #(
  parameter int DEPTH = 32768,
  parameter int LAT   = 6
)(
  input  logic        clk,
  input  logic        rst,
  input  logic        pause,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  output logic        rvalid,
  output logic [31:0] rdata,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data
);
  logic [31:0] mem [DEPTH];
  logic        toggle;
  logic        v_pipe [LAT];
  logic [31:0] d_pipe [LAT];

  assign req_ready = toggle && !pause;

  always @(posedge clk) begin
    if (wr_en && wr_addr < DEPTH) mem[wr_addr] <= wr_data;
    if (rst) begin
      toggle <= 1'b0;
      for (int i = 0; i < LAT; i++) v_pipe[i] <= 1'b0;
    end else begin
      toggle    <= ~toggle;
      v_pipe[0] <= req_valid && req_ready;
      d_pipe[0] <= (req_addr < DEPTH) ? mem[req_addr] : 32'd0;
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
    end
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
