// part1_kernel: the convolutional part of the split network, as one kernel
// with AXI4 memory ports on both ends.
//
// Dataflow: AXI4 read of the image batch (axi_mem2stream) -> 64-bit words cut
// into 24-bit RGB pixels (width_conv) -> conv0 (3->64, 32x32) -> conv1
// (64->64) -> 2x2 max pool -> conv2 (64->128) -> conv3 (128->128) -> 2x2 max
// pool -> conv4 (128->256) -> conv5 (256->256, 1x1 output) -> 512-bit result
// packed into eight 64-bit words (width_conv) -> AXI4 write (axi_stream2mem).
// All stages are valid/ready streams and run concurrently on successive
// images, like a dataflow region.
//
// Memory formats: an image is 3072 bytes (384 words), pixel p channel c at
// byte 3p+c, raster order, byte 0 in bits 7:0 of word 0. The output is 64
// bytes per image: channel c of conv5 at bits [2c+1:2c] of the 512-bit chunk,
// word 0 holding channels 0..31.
//
// Control: pulse start with num_images, src_addr and dst_addr (8-byte
// aligned; 64-byte aligned dst keeps each burst to whole chunks). busy stays
// high until the last output burst is acknowledged, then done pulses.
// Weights and thresholds of layers 0..5 are loaded beforehand through cfg.
// The layer list, the split point and the AXI4/stream structure follow the
// design description; formats and per-layer parallelism are this design's.
module part1_kernel
  import bnn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_t         cfg,
  input  logic         start,
  input  logic [31:0]  num_images,
  input  logic [31:0]  src_addr,
  input  logic [31:0]  dst_addr,
  output logic         busy,
  output logic         done,
  // AXI4 read master (images)
  output axi_a_t       m_ar,
  output logic         m_ar_valid,
  input  logic         m_ar_ready,
  input  axi_r_t       m_r,
  input  logic         m_r_valid,
  output logic         m_r_ready,
  // AXI4 write master (64-byte chunks)
  output axi_a_t       m_aw,
  output logic         m_aw_valid,
  input  logic         m_aw_ready,
  output axi_w_t       m_w,
  output logic         m_w_valid,
  input  logic         m_w_ready,
  input  logic [1:0]   m_b_resp,
  input  logic         m_b_valid,
  output logic         m_b_ready
);

  logic rd_busy, rd_done, wr_busy, wr_done;
  logic unused;
  assign unused = rd_done ^ rd_busy;

  // stream stage signals: sN_* is the input of stage N
  logic                     w_v, w_r;   logic [WORD_W-1:0]          w_d;
  logic                     p_v, p_r;   logic [C0_IN*PIX_BITS-1:0]  p_d;
  logic                     a0_v, a0_r; logic [C0_OUT*ABITS-1:0]    a0_d;
  logic                     a1_v, a1_r; logic [C1_OUT*ABITS-1:0]    a1_d;
  logic                     q0_v, q0_r; logic [C1_OUT*ABITS-1:0]    q0_d;
  logic                     a2_v, a2_r; logic [C2_OUT*ABITS-1:0]    a2_d;
  logic                     a3_v, a3_r; logic [C3_OUT*ABITS-1:0]    a3_d;
  logic                     q1_v, q1_r; logic [C3_OUT*ABITS-1:0]    q1_d;
  logic                     a4_v, a4_r; logic [C4_OUT*ABITS-1:0]    a4_d;
  logic                     a5_v, a5_r; logic [C5_OUT*ABITS-1:0]    a5_d;
  logic                     o_v, o_r;   logic [WORD_W-1:0]          o_d;

  axi_mem2stream u_rd (
    .clk, .rst_n, .start, .base_addr(src_addr),
    .num_words(num_images * IMG_WORDS), .busy(rd_busy), .done(rd_done),
    .ar(m_ar), .ar_valid(m_ar_valid), .ar_ready(m_ar_ready),
    .r(m_r), .r_valid(m_r_valid), .r_ready(m_r_ready),
    .out_valid(w_v), .out_ready(w_r), .out_data(w_d));

  width_conv #(.IN_W(WORD_W), .OUT_W(C0_IN*PIX_BITS)) u_unpack (
    .clk, .rst_n, .in_valid(w_v), .in_ready(w_r), .in_data(w_d),
    .out_valid(p_v), .out_ready(p_r), .out_data(p_d));

  conv_layer #(.IFM_CH(C0_IN), .IFM_DIM(C0_DIM), .OFM_CH(C0_OUT), .PE(C0_PE),
               .IN_BITS(PIX_BITS), .LAYER_ID(0)) u_conv0 (
    .clk, .rst_n, .cfg, .in_valid(p_v), .in_ready(p_r), .in_data(p_d),
    .out_valid(a0_v), .out_ready(a0_r), .out_data(a0_d));

  conv_layer #(.IFM_CH(C1_IN), .IFM_DIM(C1_DIM), .OFM_CH(C1_OUT), .PE(C1_PE),
               .IN_BITS(ABITS), .LAYER_ID(1)) u_conv1 (
    .clk, .rst_n, .cfg, .in_valid(a0_v), .in_ready(a0_r), .in_data(a0_d),
    .out_valid(a1_v), .out_ready(a1_r), .out_data(a1_d));

  maxpool #(.CH(C1_OUT), .IN_DIM(P0_DIM)) u_pool0 (
    .clk, .rst_n, .in_valid(a1_v), .in_ready(a1_r), .in_data(a1_d),
    .out_valid(q0_v), .out_ready(q0_r), .out_data(q0_d));

  conv_layer #(.IFM_CH(C2_IN), .IFM_DIM(C2_DIM), .OFM_CH(C2_OUT), .PE(C2_PE),
               .IN_BITS(ABITS), .LAYER_ID(2)) u_conv2 (
    .clk, .rst_n, .cfg, .in_valid(q0_v), .in_ready(q0_r), .in_data(q0_d),
    .out_valid(a2_v), .out_ready(a2_r), .out_data(a2_d));

  conv_layer #(.IFM_CH(C3_IN), .IFM_DIM(C3_DIM), .OFM_CH(C3_OUT), .PE(C3_PE),
               .IN_BITS(ABITS), .LAYER_ID(3)) u_conv3 (
    .clk, .rst_n, .cfg, .in_valid(a2_v), .in_ready(a2_r), .in_data(a2_d),
    .out_valid(a3_v), .out_ready(a3_r), .out_data(a3_d));

  maxpool #(.CH(C3_OUT), .IN_DIM(P1_DIM)) u_pool1 (
    .clk, .rst_n, .in_valid(a3_v), .in_ready(a3_r), .in_data(a3_d),
    .out_valid(q1_v), .out_ready(q1_r), .out_data(q1_d));

  conv_layer #(.IFM_CH(C4_IN), .IFM_DIM(C4_DIM), .OFM_CH(C4_OUT), .PE(C4_PE),
               .IN_BITS(ABITS), .LAYER_ID(4)) u_conv4 (
    .clk, .rst_n, .cfg, .in_valid(q1_v), .in_ready(q1_r), .in_data(q1_d),
    .out_valid(a4_v), .out_ready(a4_r), .out_data(a4_d));

  conv_layer #(.IFM_CH(C5_IN), .IFM_DIM(C5_DIM), .OFM_CH(C5_OUT), .PE(C5_PE),
               .IN_BITS(ABITS), .LAYER_ID(5)) u_conv5 (
    .clk, .rst_n, .cfg, .in_valid(a4_v), .in_ready(a4_r), .in_data(a4_d),
    .out_valid(a5_v), .out_ready(a5_r), .out_data(a5_d));

  width_conv #(.IN_W(CHUNK_BITS), .OUT_W(WORD_W)) u_pack (
    .clk, .rst_n, .in_valid(a5_v), .in_ready(a5_r), .in_data(a5_d),
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d));

  axi_stream2mem u_wr (
    .clk, .rst_n, .start, .base_addr(dst_addr),
    .num_words(num_images * CHUNK_WORDS), .busy(wr_busy), .done(wr_done),
    .in_valid(o_v), .in_ready(o_r), .in_data(o_d),
    .aw(m_aw), .aw_valid(m_aw_valid), .aw_ready(m_aw_ready),
    .w(m_w), .w_valid(m_w_valid), .w_ready(m_w_ready),
    .b_resp(m_b_resp), .b_valid(m_b_valid), .b_ready(m_b_ready));

  assign busy = wr_busy;
  assign done = wr_done;

endmodule
