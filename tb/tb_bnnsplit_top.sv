// tb_bnnsplit_top: end-to-end test of the three-node system at its default
// size (full network, two convolutional nodes, 64-word input buffer).
//
// Each convolutional node gets its own memory holding NIMG (10) generated
// images, 20 in all;
// the fully connected node writes its class scores to a third memory. All
// three parameter buses are loaded in parallel with the same hash-generated
// network. Both convolutional nodes are started together; the fully connected
// node is started only once the input buffer has been full for a while, so
// the buffer back-pressure stalls the convolutional nodes. The order in which
// chunks enter the buffer is recorded, and every class score is compared with
// the reference network applied to the image that chunk came from.
// Mechanisms counted (each must occur): chunks from each node, both nodes
// requesting the buffer in the same cycle, writes stalled by a full buffer,
// memory stalls on the image reads.
module tb_bnnsplit_top;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int NIMG = 10;                      // images per convolutional node (20 in all)
  localparam int unsigned SRC = 32'h0002_0000, DST = 32'h0000_1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t   [1:0]       conv_cfg = '0;
  cfg_t               fc_cfg = '0;
  logic   [1:0]       conv_start = '0, conv_busy, conv_done;
  axi_a_t [1:0]       conv_ar;
  logic   [1:0]       conv_ar_valid, conv_ar_ready, conv_r_valid, conv_r_ready;
  axi_r_t [1:0]       conv_r;
  logic               fc_start = 1'b0, fc_busy, fc_done;
  axi_a_t             fc_aw;
  logic               fc_aw_valid, fc_aw_ready, fc_w_valid, fc_w_ready, fc_b_valid, fc_b_ready;
  axi_w_t             fc_w;
  logic [1:0]         fc_b_resp;
  logic [6:0]         buf_level;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bnnsplit_top dut (
    .clk, .rst_n,
    .conv_cfg, .conv_start,
    .conv_num_images({32'(NIMG), 32'(NIMG)}), .conv_src_addr({SRC, SRC}),
    .conv_busy, .conv_done,
    .conv_ar, .conv_ar_valid, .conv_ar_ready, .conv_r, .conv_r_valid, .conv_r_ready,
    .fc_cfg, .fc_start, .fc_num_images(32'(2 * NIMG)), .fc_dst_addr(DST),
    .fc_busy, .fc_done,
    .fc_aw, .fc_aw_valid, .fc_aw_ready, .fc_w, .fc_w_valid, .fc_w_ready,
    .fc_b_resp, .fc_b_valid, .fc_b_ready, .buf_level);

  // memories: one per convolutional node (images), one for the scores
  axi_a_t a0 = '0;
  axi_w_t w0 = '0;
  logic [1:0] u_awr, u_wr, u_bv, u_arr;
  logic [1:0][1:0] u_br;
  axi_r_t u_r;
  logic u_rv;
  for (genvar n = 0; n < 2; n++) begin : g_mem
    axi_mem_model #(.STALL(20)) u_mem (
      .clk, .rst_n, .ar(conv_ar[n]), .ar_valid(conv_ar_valid[n]), .ar_ready(conv_ar_ready[n]),
      .r(conv_r[n]), .r_valid(conv_r_valid[n]), .r_ready(conv_r_ready[n]),
      .aw(a0), .aw_valid(1'b0), .aw_ready(u_awr[n]), .w(w0), .w_valid(1'b0), .w_ready(u_wr[n]),
      .b_resp(u_br[n]), .b_valid(u_bv[n]), .b_ready(1'b0));
  end
  axi_mem_model #(.STALL(20)) u_out (
    .clk, .rst_n, .ar(a0), .ar_valid(1'b0), .ar_ready(u_arr[0]), .r(u_r), .r_valid(u_rv),
    .r_ready(1'b0),
    .aw(fc_aw), .aw_valid(fc_aw_valid), .aw_ready(fc_aw_ready), .w(fc_w), .w_valid(fc_w_valid),
    .w_ready(fc_w_ready), .b_resp(fc_b_resp), .b_valid(fc_b_valid), .b_ready(fc_b_ready));
  assign u_arr[1] = 1'b0;

  // monitors
  int src_order[$];                    // source node of each chunk, in buffer order
  int pushes = 0, from_node[2] = '{0, 0}, both_req = 0, full_stall = 0, mem_stall = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_buf.push) begin
      if (pushes % CHUNK_WORDS == 0) begin
        src_order.push_back(int'(dut.u_buf.owner));
        from_node[dut.u_buf.owner]++;
      end
      pushes++;
    end
    if (dut.l_aw_valid == 2'b11) both_req++;
    if ((dut.l_w_valid & ~dut.l_w_ready) != 0 && int'(buf_level) == 64) full_stall++;
    if ((conv_ar_valid & ~conv_ar_ready) != 0) mem_stall++;
  end

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load_all();
    // convolution layers on both convolutional nodes, in parallel with the
    // fully connected layers on the fully connected node
    fork
      begin
        int ich[6] = '{C0_IN, C1_IN, C2_IN, C3_IN, C4_IN, C5_IN};
        int och[6] = '{C0_OUT, C1_OUT, C2_OUT, C3_OUT, C4_OUT, C5_OUT};
        for (int l = 0; l < 6; l++)
          for (int oc = 0; oc < och[l]; oc++) begin
            for (int kp = 0; kp < K * K; kp++)
              for (int ic = 0; ic < ich[l]; ic++) begin
                conv_cfg = {2{cfg_w(l, oc, kp, ic)}};
                @(negedge clk);
              end
            conv_cfg = {2{cfg_t3(l, oc, K * K * ich[l], l == 0)}};
            @(negedge clk);
          end
        conv_cfg = '0;
      end
      begin
        int nin[3] = '{F0_IN, F1_IN, F2_IN};
        int nout[3] = '{F0_OUT, F1_OUT, F2_OUT};
        for (int l = 0; l < 3; l++)
          for (int oc = 0; oc < nout[l]; oc++) begin
            for (int ic = 0; ic < nin[l]; ic++) begin
              fc_cfg = cfg_w(6 + l, oc, 0, ic);
              @(negedge clk);
            end
            if (l < 2) begin
              fc_cfg = cfg_t3(6 + l, oc, nin[l], 1'b0);
              @(negedge clk);
            end
          end
        fc_cfg = '0;
      end
    join
  endtask

  initial begin
    fmap_t scores[2][NIMG];
    int next_img[2] = '{0, 0};
    int unsigned seed;
    longint t0, t_conv[2], t_fc0, t_fc1;
    seed = $urandom;
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < NIMG; n++)
        for (int wd = 0; wd < int'(IMG_WORDS); wd++) begin
          logic [63:0] v;
          for (int b = 0; b < 8; b++) v[b*8 +: 8] = 8'(pixgen(int'(seed) + s * 100 + n, wd * 8 + b));
          if (s == 0) g_mem[0].u_mem.mem[SRC / 8 + n * IMG_WORDS + wd] = v;
          else        g_mem[1].u_mem.mem[SRC / 8 + n * IMG_WORDS + wd] = v;
        end
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < NIMG; n++)
        scores[s][n] = part2_ref(part1_ref(int'(seed) + s * 100 + n));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_all();
    $display("parameters loaded at cycle %0d", cyc);
    @(negedge clk);
    conv_start = 2'b11;
    t0 = cyc;
    @(negedge clk);
    conv_start = 2'b00;
    fork
      begin
        while (!conv_done[0]) @(negedge clk);
        t_conv[0] = cyc - t0;
      end
      begin
        while (!conv_done[1]) @(negedge clk);
        t_conv[1] = cyc - t0;
      end
      begin
        // wait until a node tries to write into the full buffer
        while (!(int'(buf_level) == 64 && dut.l_w_valid != 0)) @(negedge clk);
        repeat (500) @(negedge clk);
        fc_start = 1'b1;
        t_fc0 = cyc;
        @(negedge clk);
        fc_start = 1'b0;
        while (!fc_done) @(negedge clk);
        t_fc1 = cyc;
      end
    join
    $display("convolutional nodes finished %0d images each after %0d and %0d cycles",
             NIMG, t_conv[0], t_conv[1]);
    $display("fully connected node: %0d images in %0d cycles", 2 * NIMG, t_fc1 - t_fc0);
    check("chunks received", src_order.size(), 2 * NIMG);
    for (int k = 0; k < src_order.size() && k < 2 * NIMG; k++) begin
      int s, n;
      logic [RES_BITS-1:0] res;
      s = src_order[k];
      n = next_img[s]++;
      for (int wd = 0; wd < int'(RES_WORDS); wd++)
        res[wd*64 +: 64] = u_out.mem.exists(DST / 8 + k * RES_WORDS + wd) ?
                           u_out.mem[DST / 8 + k * RES_WORDS + wd] : 64'hdead;
      for (int c = 0; c < int'(F2_OUT); c++)
        check($sformatf("result %0d (node %0d image %0d) class %0d", k, s, n, c),
              $signed(res[c*16 +: 16]), scores[s][n][c]);
    end
    $display("chunks from node 0: %0d, node 1: %0d; both requesting: %0d cycles; full-buffer stalls: %0d cycles; memory stalls: %0d cycles",
             from_node[0], from_node[1], both_req, full_stall, mem_stall);
    check("chunks from node 0", from_node[0], NIMG);
    check("chunks from node 1", from_node[1], NIMG);
    check("both nodes competed for the buffer", both_req > 0, 1);
    check("full buffer stalled a node", full_stall > 0, 1);
    check("memory stalled a read", mem_stall > 0, 1);
    check("buffer drained", buf_level, 0);
    check("fully connected node faster per image than a convolutional node",
          (t_fc1 - t_fc0) / (2 * NIMG) < t_conv[0] / NIMG, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
