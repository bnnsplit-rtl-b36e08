// part2_kernel: the fully connected part of the split network, as one kernel
// with AXI4 memory ports on both ends.
//
// Dataflow: AXI4 read of the chunk batch (axi_mem2stream) -> eight 64-bit
// words gathered into the 512-bit chunk of one image (width_conv) -> fc0
// (256 -> 512, thresholded) -> fc1 (512 -> 512, thresholded) -> fc2 (512 -> 10,
// raw scores) -> scores packed into three 64-bit words (width_conv) -> AXI4
// write (axi_stream2mem).
//
// Memory formats: input 64 bytes per image as produced by part1_kernel.
// Output 24 bytes per image: class k score, signed 16 bit, at bits
// [16k+15:16k] of the 192-bit result (upper 32 bits zero).
//
// Control: as part1_kernel (start, num_images, src_addr, dst_addr, busy,
// done). Weights and thresholds of layers 6..8 come through cfg. Layer sizes
// and the AXI4/stream structure follow the design description; formats and
// folding are this design's choices.
module part2_kernel
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
  // AXI4 read master (chunks)
  output axi_a_t       m_ar,
  output logic         m_ar_valid,
  input  logic         m_ar_ready,
  input  axi_r_t       m_r,
  input  logic         m_r_valid,
  output logic         m_r_ready,
  // AXI4 write master (class scores)
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

  logic w_v, w_r;   logic [WORD_W-1:0]        w_d;
  logic c_v, c_r;   logic [CHUNK_BITS-1:0]    c_d;
  logic f0_v, f0_r; logic [F0_OUT*ABITS-1:0]  f0_d;
  logic f1_v, f1_r; logic [F1_OUT*ABITS-1:0]  f1_d;
  logic f2_v, f2_r; logic [F2_OUT*ACC_W-1:0]  f2_d;
  logic o_v, o_r;   logic [WORD_W-1:0]        o_d;

  axi_mem2stream u_rd (
    .clk, .rst_n, .start, .base_addr(src_addr),
    .num_words(num_images * CHUNK_WORDS), .busy(rd_busy), .done(rd_done),
    .ar(m_ar), .ar_valid(m_ar_valid), .ar_ready(m_ar_ready),
    .r(m_r), .r_valid(m_r_valid), .r_ready(m_r_ready),
    .out_valid(w_v), .out_ready(w_r), .out_data(w_d));

  width_conv #(.IN_W(WORD_W), .OUT_W(CHUNK_BITS)) u_gather (
    .clk, .rst_n, .in_valid(w_v), .in_ready(w_r), .in_data(w_d),
    .out_valid(c_v), .out_ready(c_r), .out_data(c_d));

  fc_layer #(.IN_CH(F0_IN), .OUT_CH(F0_OUT), .PE(F0_PE), .SIMD(F0_SIMD),
             .THRESH(1'b1), .LAYER_ID(6)) u_fc0 (
    .clk, .rst_n, .cfg, .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
    .out_valid(f0_v), .out_ready(f0_r), .out_data(f0_d));

  fc_layer #(.IN_CH(F1_IN), .OUT_CH(F1_OUT), .PE(F1_PE), .SIMD(F1_SIMD),
             .THRESH(1'b1), .LAYER_ID(7)) u_fc1 (
    .clk, .rst_n, .cfg, .in_valid(f0_v), .in_ready(f0_r), .in_data(f0_d),
    .out_valid(f1_v), .out_ready(f1_r), .out_data(f1_d));

  fc_layer #(.IN_CH(F2_IN), .OUT_CH(F2_OUT), .PE(F2_PE), .SIMD(F2_SIMD),
             .THRESH(1'b0), .LAYER_ID(8)) u_fc2 (
    .clk, .rst_n, .cfg, .in_valid(f1_v), .in_ready(f1_r), .in_data(f1_d),
    .out_valid(f2_v), .out_ready(f2_r), .out_data(f2_d));

  width_conv #(.IN_W(RES_BITS), .OUT_W(WORD_W)) u_pack (
    .clk, .rst_n, .in_valid(f2_v), .in_ready(f2_r),
    .in_data(RES_BITS'(f2_d)),
    .out_valid(o_v), .out_ready(o_r), .out_data(o_d));

  axi_stream2mem u_wr (
    .clk, .rst_n, .start, .base_addr(dst_addr),
    .num_words(num_images * RES_WORDS), .busy(wr_busy), .done(wr_done),
    .in_valid(o_v), .in_ready(o_r), .in_data(o_d),
    .aw(m_aw), .aw_valid(m_aw_valid), .aw_ready(m_aw_ready),
    .w(m_w), .w_valid(m_w_valid), .w_ready(m_w_ready),
    .b_resp(m_b_resp), .b_valid(m_b_valid), .b_ready(m_b_ready));

  assign busy = wr_busy;
  assign done = wr_done;

endmodule
