// dnn_pkg: types and constants shared by the training accelerator.
//
// Every number in the datapath is an IEEE-754 single-precision value
// (fp32_t). A neuron's ALU takes operations of type alu_op_t: the
// product a*b is added either to c or to the ALU's previous result
// (use_acc), and a tag travels with the operation so that its result can
// be written back to the neuron's memories (dest/addr) or recognised as
// the end of a sequence (last). Neurons obey the commands in
// neuron_cmd_e. The 32-bit format follows the source design; the tag
// layout, the command encoding and the address width are this design's
// choices (ADDR_W = 10 covers up to 1023 inputs per neuron, enough for
// 784 MNIST pixels plus the bias).
package dnn_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_NEG_ONE = 32'hBF80_0000;
  localparam fp32_t FP_HALF    = 32'h3F00_0000;

  localparam int unsigned MUL_LAT = 2;              // fp_mul pipeline depth
  localparam int unsigned ADD_LAT = 1;              // fp_add pipeline depth
  localparam int unsigned ALU_LAT = MUL_LAT + ADD_LAT;
  localparam int unsigned ADDR_W  = 10;

  typedef enum logic [1:0] {
    DST_NONE = 2'd0,   // result only observed by the issuing unit
    DST_W    = 2'd1,   // write result to weight memory
    DST_D    = 2'd2    // write result to the Delta (gradient) memory
  } dest_e;

  typedef struct packed {
    dest_e             dest;
    logic [ADDR_W-1:0] addr;
    logic              last;
  } alu_tag_t;

  typedef struct packed {
    fp32_t    a;
    fp32_t    b;
    fp32_t    c;
    logic     use_acc;
    alu_tag_t tag;
  } alu_op_t;

  typedef enum logic [1:0] {
    CMD_FWD     = 2'd0,  // forward trace: activation
    CMD_BWD_OUT = 2'd1,  // output layer: delta = a - y, accumulate Delta
    CMD_BWD_HID = 2'd2,  // hidden layer: delta from the layer above, accumulate Delta
    CMD_GRAD    = 2'd3   // gradient descent: theta -= alpha * Delta / m
  } neuron_cmd_e;

  // Negate an fp32 value.
  function automatic fp32_t fp_neg(fp32_t v);
    return {~v[31], v[30:0]};
  endfunction

endpackage
