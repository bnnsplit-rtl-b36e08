// bnn_pkg: shared types and constants of the split 2-bit CNV accelerator.
//
// The network is a convolutional BNN with 2-bit weights and 2-bit activations:
// six 3x3 convolution layers with two 2x2 max-pool layers (the convolutional
// part, "part 1") and three fully connected layers (the fully connected part,
// "part 2"). The split sits between the last convolution and the first fully
// connected layer, where one image is only 256 channels x 2 bit = 64 bytes.
// Both kernels move data as 64-bit memory words over AXI4.
//
// Layer shapes follow the standard CIFAR-10 CNV topology (32x32x3 input,
// 64-64-128-128-256-256 convolution channels, 512-512-10 fully connected
// outputs); they reproduce the 12544 and 64 bytes per image quoted for the
// split points. Number formats (unsigned 8-bit pixels, signed 2-bit weights,
// unsigned 2-bit activations from three per-channel thresholds, 16-bit
// accumulators) and the parallelism per layer (PE) are this design's choices.
package bnn_pkg;

  localparam int unsigned WORD_W   = 64;  // AXI4 data word (ap_uint<64>)
  localparam int unsigned WBITS    = 2;   // weight width
  localparam int unsigned ABITS    = 2;   // activation width
  localparam int unsigned NTHR     = 3;   // thresholds per channel = 2**ABITS-1
  localparam int unsigned ACC_W    = 16;  // accumulator width
  localparam int unsigned PIX_BITS = 8;   // input pixel channel width
  localparam int unsigned K        = 3;   // convolution kernel size

  // Input image
  localparam int unsigned IMG_DIM  = 32;
  localparam int unsigned IMG_CH   = 3;
  localparam int unsigned IMG_WORDS = IMG_DIM * IMG_DIM * IMG_CH * PIX_BITS / WORD_W; // 384

  // Convolution layers: input channels, input size, output channels, PE
  localparam int unsigned C0_IN = 3,   C0_DIM = 32, C0_OUT = 64,  C0_PE = 16;
  localparam int unsigned C1_IN = 64,  C1_DIM = 30, C1_OUT = 64,  C1_PE = 16;
  localparam int unsigned P0_DIM = 28;                            // pool 28 -> 14
  localparam int unsigned C2_IN = 64,  C2_DIM = 14, C2_OUT = 128, C2_PE = 16;
  localparam int unsigned C3_IN = 128, C3_DIM = 12, C3_OUT = 128, C3_PE = 8;
  localparam int unsigned P1_DIM = 10;                            // pool 10 -> 5
  localparam int unsigned C4_IN = 128, C4_DIM = 5,  C4_OUT = 256, C4_PE = 4;
  localparam int unsigned C5_IN = 256, C5_DIM = 3,  C5_OUT = 256, C5_PE = 1;

  // Split point: 256 channels x 2 bit at 1x1 = 64 bytes = 8 words per image
  localparam int unsigned CHUNK_BITS  = C5_OUT * ABITS;           // 512
  localparam int unsigned CHUNK_WORDS = CHUNK_BITS / WORD_W;      // 8

  // Fully connected layers: inputs, outputs, PE, SIMD
  localparam int unsigned F0_IN = 256, F0_OUT = 512, F0_PE = 16, F0_SIMD = 64;
  localparam int unsigned F1_IN = 512, F1_OUT = 512, F1_PE = 16, F1_SIMD = 64;
  localparam int unsigned F2_IN = 512, F2_OUT = 10,  F2_PE = 10, F2_SIMD = 64;

  // Result: 10 class scores x 16 bit, padded to whole words
  localparam int unsigned RES_WORDS = (F2_OUT * ACC_W + WORD_W - 1) / WORD_W; // 3
  localparam int unsigned RES_BITS  = RES_WORDS * WORD_W;                     // 192

  // Layer numbers on the configuration bus
  localparam int unsigned NUM_LAYERS = 9;   // 0..5 convolution, 6..8 fully connected

  // Parameter load bus. kind 0 writes one 2-bit weight of output channel oc,
  // kernel position kpos (ky*K+kx, 0 for fully connected) and input channel ic
  // from data[1:0]. kind 1 writes the three thresholds of channel oc from
  // data[15:0], data[31:16], data[47:32] (ascending).
  typedef struct packed {
    logic        we;
    logic [3:0]  layer;
    logic        kind;
    logic [15:0] oc;
    logic [7:0]  kpos;
    logic [15:0] ic;
    logic [63:0] data;
  } cfg_t;

  localparam logic CFG_WEIGHT = 1'b0;
  localparam logic CFG_THRESH = 1'b1;

  // AXI4 channel payloads (valid/ready travel beside them)
  typedef struct packed {
    logic [31:0] addr;
    logic [7:0]  len;    // beats - 1
    logic [2:0]  size;   // 3 = 8 bytes
    logic [1:0]  burst;  // 1 = INCR
  } axi_a_t;

  typedef struct packed {
    logic [WORD_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } axi_r_t;

  typedef struct packed {
    logic [WORD_W-1:0]   data;
    logic [WORD_W/8-1:0] strb;
    logic                last;
  } axi_w_t;

  localparam int unsigned MAX_BURST = 16;  // beats per AXI4 burst

endpackage
