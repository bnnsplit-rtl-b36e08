// tb_fc_input_buffer: self-checking test of the fully connected node's input
// buffer with a reduced depth of 16 words. Two AXI4 write masters
// (axi_stream2mem) each send 10 chunks of 8 tagged words with random gaps;
// one AXI4 read master (axi_mem2stream) drains the buffer with random
// back-pressure after a delay long enough to fill it. Checks that every word
// arrives exactly once, that each source's words keep their order, that every
// 8-word chunk arrives whole from one source, that the buffer filled
// (writers stalled) and that grants alternated between the sources.
module tb_fc_input_buffer;
  import bnn_pkg::*;

  localparam int DEPTH = 16, NCH = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_a_t [1:0]      aw;
  logic   [1:0]      aw_valid, aw_ready;
  axi_w_t [1:0]      w;
  logic   [1:0]      w_valid, w_ready;
  logic   [1:0][1:0] b_resp;
  logic   [1:0]      b_valid, b_ready;
  axi_a_t ar; logic ar_valid, ar_ready;
  axi_r_t r;  logic r_valid, r_ready;
  logic [$clog2(DEPTH+1)-1:0] level;

  logic [1:0] wstart = '0, wbusy, wdone;
  logic [1:0] iv = '0, ir;
  logic [1:0][63:0] id;
  logic rstart = 1'b0, rbusy, rdone, ov, ordy = 1'b0;
  logic [63:0] od;

  int checks = 0, failures = 0, full_cycles = 0, switches = 0, both_req = 0;
  logic [1:0] last_owner = 2'b11;

  for (genvar s = 0; s < 2; s++) begin : g_src
    axi_stream2mem u_wr (
      .clk, .rst_n, .start(wstart[s]), .base_addr(32'h0), .num_words(32'(NCH * CHUNK_WORDS)),
      .busy(wbusy[s]), .done(wdone[s]), .in_valid(iv[s]), .in_ready(ir[s]), .in_data(id[s]),
      .aw(aw[s]), .aw_valid(aw_valid[s]), .aw_ready(aw_ready[s]),
      .w(w[s]), .w_valid(w_valid[s]), .w_ready(w_ready[s]),
      .b_resp(b_resp[s]), .b_valid(b_valid[s]), .b_ready(b_ready[s]));
  end

  fc_input_buffer #(.N_IN(2), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .s_aw(aw), .s_aw_valid(aw_valid), .s_aw_ready(aw_ready),
    .s_w(w), .s_w_valid(w_valid), .s_w_ready(w_ready),
    .s_b_resp(b_resp), .s_b_valid(b_valid), .s_b_ready(b_ready),
    .s_ar(ar), .s_ar_valid(ar_valid), .s_ar_ready(ar_ready),
    .s_r(r), .s_r_valid(r_valid), .s_r_ready(r_ready), .level);

  axi_mem2stream u_rd (
    .clk, .rst_n, .start(rstart), .base_addr(32'h0), .num_words(32'(2 * NCH * CHUNK_WORDS)),
    .busy(rbusy), .done(rdone), .ar, .ar_valid, .ar_ready, .r, .r_valid, .r_ready,
    .out_valid(ov), .out_ready(ordy), .out_data(od));

  always @(negedge clk) begin
    if (rst_n && (w_valid != 0) && (w_ready == 0) && int'(level) == DEPTH) full_cycles++;
    if (aw_valid == 2'b11) both_req++;
    for (int s = 0; s < 2; s++)
      if (aw_valid[s] && aw_ready[s]) begin
        if (last_owner != 2'(s)) switches++;
        last_owner = 2'(s);
      end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // word tag: source, chunk, word
  function automatic logic [63:0] tag(int s, int c, int k);
    return {32'hc0de_0000 | 32'(s), 16'(c), 16'(k)};
  endfunction

  task automatic source(int s);
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < CHUNK_WORDS; k++) begin
        while ($urandom_range(4) == 0) @(negedge clk);
        iv[s] = 1'b1; id[s] = tag(s, c, k);
        while (!ir[s]) @(negedge clk);
        @(negedge clk);
        iv[s] = 1'b0;
      end
  endtask

  initial begin
    int next_chunk[2] = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    wstart = 2'b11;
    @(negedge clk);
    wstart = 2'b00;
    fork
      source(0);
      source(1);
      begin
        repeat (150) @(negedge clk);      // let the buffer fill up
        rstart = 1'b1;
        @(negedge clk);
        rstart = 1'b0;
        for (int n = 0; n < 2 * NCH; n++)
          for (int k = 0; k < CHUNK_WORDS; k++) begin
            int s;
            ordy = ($urandom_range(2) != 0);
            while (!(ov && ordy)) begin @(negedge clk); ordy = ($urandom_range(2) != 0); end
            s = int'(od[32]);
            check("tag", od[63:34], 30'(32'hc0de_0000 >> 2));
            check($sformatf("source %0d chunk order", s), od[31:16], next_chunk[s]);
            check($sformatf("source %0d word %0d in place", s, k), od[15:0], k);
            if (k == CHUNK_WORDS - 1) next_chunk[s]++;
            @(negedge clk);
            ordy = 1'b0;
          end
      end
    join
    while (wbusy != 0 || rbusy) @(negedge clk);
    check("all chunks of source 0", next_chunk[0], NCH);
    check("all chunks of source 1", next_chunk[1], NCH);
    check("buffer empty", level, 0);
    $display("cycles writers stalled on a full buffer: %0d", full_cycles);
    $display("grant switches between sources: %0d, cycles both requesting: %0d", switches, both_req);
    check("buffer became full", full_cycles > 0, 1);
    check("grants switched", switches > 2, 1);
    check("both sources competed", both_req > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
