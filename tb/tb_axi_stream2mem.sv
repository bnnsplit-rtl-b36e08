// tb_axi_stream2mem: self-checking test of the AXI4 write master against the
// behavioural memory with random bus stalls and random gaps in the input
// stream. Writes three batches (one spanning a 4 KB boundary, one of a single
// word) and an empty one; checks the memory contents, that words around the
// batches are untouched, wlast placement, busy/done, the burst count and that
// no burst crosses a 4 KB boundary.
module tb_axi_stream2mem;
  import bnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done;
  logic [31:0] base = '0, nw = '0;
  logic iv = 1'b0, ir;
  logic [WORD_W-1:0] id = '0;
  axi_a_t aw; logic aw_valid, aw_ready;
  axi_w_t w;  logic w_valid, w_ready;
  logic [1:0] b_resp; logic b_valid, b_ready;
  axi_a_t ar_unused = '0;
  axi_r_t r_u; logic ar_rdy_u, r_val_u;
  int checks = 0, failures = 0, dones = 0;

  always @(negedge clk) if (done) dones++;

  axi_stream2mem dut (
    .clk, .rst_n, .start, .base_addr(base), .num_words(nw), .busy, .done,
    .in_valid(iv), .in_ready(ir), .in_data(id),
    .aw, .aw_valid, .aw_ready, .w, .w_valid, .w_ready, .b_resp, .b_valid, .b_ready);

  axi_mem_model #(.STALL(30)) u_mem (
    .clk, .rst_n, .ar(ar_unused), .ar_valid(1'b0), .ar_ready(ar_rdy_u),
    .r(r_u), .r_valid(r_val_u), .r_ready(1'b0),
    .aw, .aw_valid, .aw_ready, .w, .w_valid, .w_ready, .b_resp, .b_valid, .b_ready);

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
    return {~waddr, waddr ^ 32'h5a5a_0000};
  endfunction

  task automatic batch(int unsigned b, int unsigned n);
    base = b; nw = n; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int unsigned k = 0; k < n; k++) begin
      while ($urandom_range(3) == 0) @(negedge clk);
      iv = 1'b1; id = pattern(b / 8 + k);
      while (!ir) @(negedge clk);
      @(negedge clk);
      iv = 1'b0;
    end
    while (busy) @(negedge clk);
    for (int unsigned k = 0; k < n; k++)
      check($sformatf("mem word %0d of batch at %0h", k, b),
            u_mem.mem.exists(b / 8 + k) ? u_mem.mem[b / 8 + k] : 64'hdead, pattern(b / 8 + k));
    check("word before batch untouched", u_mem.mem.exists(b / 8 - 1), 0);
    check("word after batch untouched", u_mem.mem.exists(b / 8 + n), 0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    batch('h1000, 40);
    batch('h1fc0, 30);
    batch('h3000, 1);
    batch('h3800, 0);
    repeat (2) @(negedge clk);
    check("done pulses", dones, 4);
    check("write bursts", u_mem.wr_bursts, 7);
    check("4 KB crossings", u_mem.cross_4k, 0);
    check("wlast errors", u_mem.wlast_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
