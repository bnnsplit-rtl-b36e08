// bnnsplit_top: the multi-board arrangement of the split network. N_CONV
// convolutional nodes (part1_kernel) each classify their own image stream up
// to the split point and send 64 bytes per image to one shared fully
// connected node (fc_input_buffer + part2_kernel), which finishes the
// classification. With the default N_CONV = 2 the two convolutional nodes
// together produce chunks faster than one convolutional node could, while the
// light fully connected node keeps up with both.
//
// Ports: per convolutional node a parameter load bus, a start/num/src
// control, busy/done and an AXI4 read master to the memory holding its
// images; for the fully connected node a parameter load bus, start/num/dst,
// busy/done and an AXI4 write master to the memory receiving the class scores;
// buf_level shows the input buffer occupancy. Each node is started separately
// and runs independently; the fully connected node must be started with the
// total number of images the convolutional nodes will send.
//
// The board-to-board network is replaced by direct AXI4 connections from the
// convolutional nodes' write masters into the input buffer (their dst address
// is unused and tied to 0). Memories, processors and network are outside.
module bnnsplit_top
  import bnn_pkg::*;
#(
  parameter int unsigned N_CONV    = 2,
  parameter int unsigned BUF_DEPTH = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // convolutional nodes
  input  cfg_t   [N_CONV-1:0]          conv_cfg,
  input  logic   [N_CONV-1:0]          conv_start,
  input  logic   [N_CONV-1:0][31:0]    conv_num_images,
  input  logic   [N_CONV-1:0][31:0]    conv_src_addr,
  output logic   [N_CONV-1:0]          conv_busy,
  output logic   [N_CONV-1:0]          conv_done,
  output axi_a_t [N_CONV-1:0]          conv_ar,
  output logic   [N_CONV-1:0]          conv_ar_valid,
  input  logic   [N_CONV-1:0]          conv_ar_ready,
  input  axi_r_t [N_CONV-1:0]          conv_r,
  input  logic   [N_CONV-1:0]          conv_r_valid,
  output logic   [N_CONV-1:0]          conv_r_ready,
  // fully connected node
  input  cfg_t                         fc_cfg,
  input  logic                         fc_start,
  input  logic [31:0]                  fc_num_images,
  input  logic [31:0]                  fc_dst_addr,
  output logic                         fc_busy,
  output logic                         fc_done,
  output axi_a_t                       fc_aw,
  output logic                         fc_aw_valid,
  input  logic                         fc_aw_ready,
  output axi_w_t                       fc_w,
  output logic                         fc_w_valid,
  input  logic                         fc_w_ready,
  input  logic [1:0]                   fc_b_resp,
  input  logic                         fc_b_valid,
  output logic                         fc_b_ready,
  output logic [$clog2(BUF_DEPTH+1)-1:0] buf_level
);

  axi_a_t [N_CONV-1:0]      l_aw;
  logic   [N_CONV-1:0]      l_aw_valid, l_aw_ready;
  axi_w_t [N_CONV-1:0]      l_w;
  logic   [N_CONV-1:0]      l_w_valid, l_w_ready;
  logic   [N_CONV-1:0][1:0] l_b_resp;
  logic   [N_CONV-1:0]      l_b_valid, l_b_ready;

  for (genvar n = 0; n < N_CONV; n++) begin : g_conv
    part1_kernel u_part1 (
      .clk, .rst_n, .cfg(conv_cfg[n]),
      .start(conv_start[n]), .num_images(conv_num_images[n]),
      .src_addr(conv_src_addr[n]), .dst_addr(32'd0),
      .busy(conv_busy[n]), .done(conv_done[n]),
      .m_ar(conv_ar[n]), .m_ar_valid(conv_ar_valid[n]), .m_ar_ready(conv_ar_ready[n]),
      .m_r(conv_r[n]), .m_r_valid(conv_r_valid[n]), .m_r_ready(conv_r_ready[n]),
      .m_aw(l_aw[n]), .m_aw_valid(l_aw_valid[n]), .m_aw_ready(l_aw_ready[n]),
      .m_w(l_w[n]), .m_w_valid(l_w_valid[n]), .m_w_ready(l_w_ready[n]),
      .m_b_resp(l_b_resp[n]), .m_b_valid(l_b_valid[n]), .m_b_ready(l_b_ready[n]));
  end

  axi_a_t ar;
  logic   ar_valid, ar_ready;
  axi_r_t r;
  logic   r_valid, r_ready;

  fc_input_buffer #(.N_IN(N_CONV), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .s_aw(l_aw), .s_aw_valid(l_aw_valid), .s_aw_ready(l_aw_ready),
    .s_w(l_w), .s_w_valid(l_w_valid), .s_w_ready(l_w_ready),
    .s_b_resp(l_b_resp), .s_b_valid(l_b_valid), .s_b_ready(l_b_ready),
    .s_ar(ar), .s_ar_valid(ar_valid), .s_ar_ready(ar_ready),
    .s_r(r), .s_r_valid(r_valid), .s_r_ready(r_ready),
    .level(buf_level));

  part2_kernel u_part2 (
    .clk, .rst_n, .cfg(fc_cfg),
    .start(fc_start), .num_images(fc_num_images),
    .src_addr(32'd0), .dst_addr(fc_dst_addr),
    .busy(fc_busy), .done(fc_done),
    .m_ar(ar), .m_ar_valid(ar_valid), .m_ar_ready(ar_ready),
    .m_r(r), .m_r_valid(r_valid), .m_r_ready(r_ready),
    .m_aw(fc_aw), .m_aw_valid(fc_aw_valid), .m_aw_ready(fc_aw_ready),
    .m_w(fc_w), .m_w_valid(fc_w_valid), .m_w_ready(fc_w_ready),
    .m_b_resp(fc_b_resp), .m_b_valid(fc_b_valid), .m_b_ready(fc_b_ready));

endmodule
