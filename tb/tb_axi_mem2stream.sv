// tb_axi_mem2stream: self-checking test of the AXI4 read master against the
// behavioural memory with random bus stalls and random consumer
// back-pressure. Reads three batches (one spanning a 4 KB boundary, one of a
// single word) and an empty one; checks every streamed word, the busy/done
// behaviour, the number of bursts (at most 16 beats, split at 4 KB) and that
// no burst crosses a 4 KB boundary.
module tb_axi_mem2stream;
  import bnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [31:0] base = '0, nw = '0;
  axi_a_t ar;  logic ar_valid, ar_ready;
  axi_r_t r;   logic r_valid, r_ready;
  logic ov, ordy = 1'b0;
  logic [WORD_W-1:0] od;
  axi_a_t aw_unused = '0;
  axi_w_t w_unused = '0;
  logic aw_rdy_u, w_rdy_u, b_val_u;
  logic [1:0] b_resp_u;
  int checks = 0, failures = 0, dones = 0;

  always @(negedge clk) if (done) dones++;

  axi_mem2stream dut (
    .clk, .rst_n, .start, .base_addr(base), .num_words(nw), .busy, .done,
    .ar, .ar_valid, .ar_ready, .r, .r_valid, .r_ready,
    .out_valid(ov), .out_ready(ordy), .out_data(od));

  axi_mem_model #(.STALL(30)) u_mem (
    .clk, .rst_n, .ar, .ar_valid, .ar_ready, .r, .r_valid, .r_ready,
    .aw(aw_unused), .aw_valid(1'b0), .aw_ready(aw_rdy_u),
    .w(w_unused), .w_valid(1'b0), .w_ready(w_rdy_u),
    .b_resp(b_resp_u), .b_valid(b_val_u), .b_ready(1'b0));

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
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [63:0] pattern(int unsigned waddr);
    return {waddr, ~waddr};
  endfunction

  task automatic batch(int unsigned b, int unsigned n);
    int got;
    base = b; nw = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    if (n > 0) check("busy after start", busy, 1);
    got = 0;
    while (got < n) begin
      ordy = ($urandom_range(3) != 0);
      if (ov && ordy) begin
        check($sformatf("word %0d of batch at %0h", got, b), od, pattern(b / 8 + got));
        got++;
      end
      @(negedge clk);
    end
    ordy = 1'b0;
    repeat (2) @(negedge clk);
    check("idle after batch", busy, 0);
  endtask

  initial begin
    for (int unsigned a = 'h200; a < 'h800; a++) u_mem.mem[a] = pattern(a);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    batch('h1000, 40);   // 16 + 16 + 8
    batch('h1fc0, 30);   // 8 up to the 4 KB boundary, then 16 + 6
    batch('h3000, 1);
    batch('h3000, 0);
    check("done pulses", dones, 4);
    check("read bursts", u_mem.rd_bursts, 7);
    check("4 KB crossings", u_mem.cross_4k, 0);
    check("no extra words", ov, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
