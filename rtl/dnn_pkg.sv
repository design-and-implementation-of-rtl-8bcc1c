// dnn_pkg: shared types and default sizes of the quantized CNN accelerator.
//
// The network is a small object-detection classifier: three 3x3 convolution
// layers with ReLU, a 2x2 max pool after the first two, and one fully
// connected (FC) layer. Weights and activations are 8-bit signed integers;
// products are accumulated in 32 bits. The 256x256 input frame and the 8-bit
// integer format follow the published design. The channel count (8 in every
// layer), the 3 input channels (RGB) and the 10 output classes are this
// design's own choices, since no layer widths were published.
package dnn_pkg;

  // Frame size of the input image.
  localparam int unsigned IMG_H   = 256;
  localparam int unsigned IMG_W   = 256;
  // Input image channels (RGB) carried in each input stream beat.
  localparam int unsigned IN_CH   = 3;
  // Channels of every feature map; the feature memory word holds all of them.
  localparam int unsigned CH      = 8;
  // Classes produced by the FC layer.
  localparam int unsigned NCLS    = 10;
  // Convolution layers and taps of a 3x3 kernel.
  localparam int unsigned NUM_CONV = 3;
  localparam int unsigned KTAPS   = 9;
  // Accumulator width.
  localparam int unsigned ACC_W   = 32;

  typedef logic signed [7:0]       q8_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Phases of one inference, in the order of the layer sequencer.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_LOAD = 3'd1,
    PH_CONV = 3'd2,
    PH_FC   = 3'd3,
    PH_OUT  = 3'd4
  } phase_e;

  // Per-layer settings handed from the sequencer to the convolution layer.
  typedef struct packed {
    logic [1:0]  layer;    // weight set 0..NUM_CONV-1
    logic [15:0] height;   // input (and unpooled output) rows
    logic [15:0] width;    // input (and unpooled output) columns
    logic        pool;     // 2x2 max pool after ReLU
    logic        src_bank; // feature bank read
    logic [4:0]  shift;    // requantization right shift
  } conv_cfg_t;

  // AXI-lite register map (byte addresses).
  localparam logic [19:0] A_CTRL      = 20'h0_0000; // W: bit0 start
  localparam logic [19:0] A_STATUS    = 20'h0_0004; // R: bit0 busy, bit1 done, bit2 frame error, [11:8] class
  localparam logic [19:0] A_SHIFT0    = 20'h0_0008; // RW: shift of conv layer 0 (+4 per layer)
  localparam logic [19:0] A_CYCLES    = 20'h0_0018; // R: cycles of the last inference
  localparam logic [19:0] A_CONV_W    = 20'h0_1000; // conv weights: ((layer*9+tap)*16+lane)*4
  localparam logic [19:0] A_CONV_B    = 20'h0_2000; // conv bias: (layer*CH+o)*4
  localparam logic [19:0] A_FC_B      = 20'h0_3000; // FC bias: k*4
  localparam logic [19:0] A_FC_W      = 20'h8_0000; // FC weights: (pixel*32+lane)*4

endpackage
