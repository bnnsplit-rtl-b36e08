// tb_part1_kernel: end-to-end test of the convolutional kernel at full size.
//
// Loads hash-generated weights and thresholds into all six convolution
// layers, places NIMG generated 32x32x3 images in the behavioural memory,
// starts the kernel and waits for done. Every 64-byte result is compared, 2-bit
// channel by channel, with the reference network of bnn_ref_pkg. Also checks
// busy/done, the number of AXI4 bursts in each direction and that no burst
// crosses 4 KB, and reports the cycles per image and how often each
// activation level occurs in the results. The memory stalls randomly.
module tb_part1_kernel;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int NIMG = 2;
  localparam int unsigned SRC = 32'h0001_0000, DST = 32'h0008_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg = '0;
  logic start = 1'b0, busy, done;
  axi_a_t ar, aw; logic ar_valid, ar_ready, aw_valid, aw_ready;
  axi_r_t r;      logic r_valid, r_ready;
  axi_w_t w;      logic w_valid, w_ready;
  logic [1:0] b_resp; logic b_valid, b_ready;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  part1_kernel dut (
    .clk, .rst_n, .cfg, .start, .num_images(32'(NIMG)), .src_addr(SRC), .dst_addr(DST),
    .busy, .done,
    .m_ar(ar), .m_ar_valid(ar_valid), .m_ar_ready(ar_ready),
    .m_r(r), .m_r_valid(r_valid), .m_r_ready(r_ready),
    .m_aw(aw), .m_aw_valid(aw_valid), .m_aw_ready(aw_ready),
    .m_w(w), .m_w_valid(w_valid), .m_w_ready(w_ready),
    .m_b_resp(b_resp), .m_b_valid(b_valid), .m_b_ready(b_ready));

  axi_mem_model #(.STALL(20)) u_mem (
    .clk, .rst_n, .ar, .ar_valid, .ar_ready, .r, .r_valid, .r_ready,
    .aw, .aw_valid, .aw_ready, .w, .w_valid, .w_ready, .b_resp, .b_valid, .b_ready);

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
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

  task automatic load_conv(int layer, int ich, int och, bit pix);
    for (int oc = 0; oc < och; oc++) begin
      for (int kp = 0; kp < K * K; kp++)
        for (int ic = 0; ic < ich; ic++) begin
          cfg = cfg_w(layer, oc, kp, ic);
          @(negedge clk);
        end
      cfg = cfg_t3(layer, oc, K * K * ich, pix);
      @(negedge clk);
    end
    cfg = '0;
  endtask

  initial begin
    fmap_t refs[NIMG];
    int lv[4] = '{0, 0, 0, 0};
    longint t0, t1;
    int unsigned seed;
    seed = $urandom;                  // image set of this run
    // images: byte i of image n at SRC + n*3072 + i
    for (int n = 0; n < NIMG; n++)
      for (int wd = 0; wd < int'(IMG_WORDS); wd++) begin
        logic [63:0] v;
        for (int b = 0; b < 8; b++) v[b*8 +: 8] = 8'(pixgen(int'(seed) + n, wd * 8 + b));
        u_mem.mem[SRC / 8 + n * IMG_WORDS + wd] = v;
      end
    for (int n = 0; n < NIMG; n++) refs[n] = part1_ref(int'(seed) + n);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_conv(0, C0_IN, C0_OUT, 1'b1);
    load_conv(1, C1_IN, C1_OUT, 1'b0);
    load_conv(2, C2_IN, C2_OUT, 1'b0);
    load_conv(3, C3_IN, C3_OUT, 1'b0);
    load_conv(4, C4_IN, C4_OUT, 1'b0);
    load_conv(5, C5_IN, C5_OUT, 1'b0);
    $display("parameters loaded at cycle %0d", cyc);
    @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    check("busy after start", busy, 1);
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    check("idle after done", busy, 0);
    $display("%0d images in %0d cycles", NIMG, t1 - t0);
    for (int n = 0; n < NIMG; n++)
      for (int wd = 0; wd < int'(CHUNK_WORDS); wd++) begin
        logic [63:0] v;
        v = u_mem.mem.exists(DST / 8 + n * CHUNK_WORDS + wd) ?
            u_mem.mem[DST / 8 + n * CHUNK_WORDS + wd] : 64'd0;
        for (int c = 0; c < 32; c++) begin
          lv[v[c*2 +: 2]]++;
          check($sformatf("image %0d channel %0d", n, wd * 32 + c),
                v[c*2 +: 2], refs[n][wd * 32 + c]);
        end
      end
    for (int l = 0; l < 4; l++) $display("activation level %0d: %0d channels", l, lv[l]);
    check("read bursts", u_mem.rd_bursts, NIMG * IMG_WORDS / MAX_BURST);
    check("write bursts", u_mem.wr_bursts, NIMG * CHUNK_WORDS / MAX_BURST);
    check("4 KB crossings", u_mem.cross_4k, 0);
    check("wlast errors", u_mem.wlast_err, 0);
    check("more than one activation level", int'((lv[0] != 0) + (lv[1] != 0) + (lv[2] != 0) + (lv[3] != 0) > 1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
