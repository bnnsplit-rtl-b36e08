// tb_part2_kernel: end-to-end test of the fully connected kernel at full
// size. Loads hash-generated weights and thresholds into the three fully
// connected layers, places NIMG random 64-byte chunks in the behavioural
// memory, runs the kernel and compares the ten 16-bit class scores of every
// image with the reference. Also checks busy/done, the padding word bits,
// and the burst counts, and reports the cycles per image.
module tb_part2_kernel;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int NIMG = 4;
  localparam int unsigned SRC = 32'h0000_4000, DST = 32'h0000_8000;

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

  part2_kernel dut (
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
    repeat (1_000_000) @(posedge clk);
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

  task automatic load_fc(int layer, int nin, int nout, bit thresh);
    for (int oc = 0; oc < nout; oc++) begin
      for (int ic = 0; ic < nin; ic++) begin
        cfg = cfg_w(layer, oc, 0, ic);
        @(negedge clk);
      end
      if (thresh) begin
        cfg = cfg_t3(layer, oc, nin, 1'b0);
        @(negedge clk);
      end
    end
    cfg = '0;
  endtask

  initial begin
    fmap_t chunk, refs[NIMG];
    longint t0, t1;
    for (int n = 0; n < NIMG; n++) begin
      chunk = new[F0_IN];
      foreach (chunk[i]) chunk[i] = int'($urandom_range(3));
      for (int wd = 0; wd < int'(CHUNK_WORDS); wd++) begin
        logic [63:0] v;
        for (int c = 0; c < 32; c++) v[c*2 +: 2] = 2'(chunk[wd * 32 + c]);
        u_mem.mem[SRC / 8 + n * CHUNK_WORDS + wd] = v;
      end
      refs[n] = part2_ref(chunk);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_fc(6, F0_IN, F0_OUT, 1'b1);
    load_fc(7, F1_IN, F1_OUT, 1'b1);
    load_fc(8, F2_IN, F2_OUT, 1'b0);
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
    for (int n = 0; n < NIMG; n++) begin
      logic [RES_BITS-1:0] res;
      for (int wd = 0; wd < int'(RES_WORDS); wd++)
        res[wd*64 +: 64] = u_mem.mem.exists(DST / 8 + n * RES_WORDS + wd) ?
                           u_mem.mem[DST / 8 + n * RES_WORDS + wd] : 64'hdead;
      for (int k = 0; k < int'(F2_OUT); k++)
        check($sformatf("image %0d class %0d", n, k), $signed(res[k*16 +: 16]), refs[n][k]);
      check("padding zero", res[RES_BITS-1:F2_OUT*ACC_W], 0);
    end
    check("read bursts", u_mem.rd_bursts, NIMG * CHUNK_WORDS / MAX_BURST);
    check("write bursts", u_mem.wr_bursts, 1);
    check("4 KB crossings", u_mem.cross_4k, 0);
    check("wlast errors", u_mem.wlast_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
