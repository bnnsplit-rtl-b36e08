// tb_maxpool: self-checking test of maxpool at a reduced size (4 channels,
// 6x6 input). Streams three random 2-bit images with random input gaps and
// random output back-pressure and compares each pooled pixel with the
// reference 2x2 maximum. Also checks that an unstalled image leaves the block
// one cycle after its last input pixel, and that stalls did occur.
module tb_maxpool;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int CH = 4, DIM = 6, NIMG = 3;
  localparam int OD = DIM / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv = 1'b0, ir, ov, ordy = 1'b0;
  logic [CH*ABITS-1:0] id = '0, od;
  int checks = 0, failures = 0, stalls = 0;
  longint cyc = 0, t_in_last, t_out_last;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (iv && !ir) stalls++;

  maxpool #(.CH(CH), .IN_DIM(DIM)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(ordy), .out_data(od));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  fmap_t imgs[NIMG], refs[NIMG];

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      imgs[n] = new[DIM * DIM * CH];
      foreach (imgs[n][i]) imgs[n][i] = int'($urandom_range(3));
      refs[n] = pool_ref(imgs[n], DIM, CH);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      for (int n = 0; n < NIMG; n++)
        for (int p = 0; p < DIM * DIM; p++) begin
          logic [CH*ABITS-1:0] v;
          for (int c = 0; c < CH; c++) v[c*ABITS +: ABITS] = 2'(imgs[n][p * CH + c]);
          if (n > 0) while ($urandom_range(3) == 0) begin iv = 1'b0; @(negedge clk); end
          iv = 1'b1; id = v;
          #1;                                   // let the consumer set out_ready first
          while (!ir) begin @(negedge clk); #1; end
          if (n == 0 && p == DIM * DIM - 1) t_in_last = cyc;
          @(negedge clk);
          iv = 1'b0;
        end
      for (int m = 0; m < NIMG; m++)
        for (int q = 0; q < OD * OD; q++) begin
          ordy = (m == 0) ? 1'b1 : ($urandom_range(3) == 0);
          while (!(ov && ordy)) begin
            @(negedge clk);
            ordy = (m == 0) ? 1'b1 : ($urandom_range(3) == 0);
          end
          if (m == 0 && q == OD * OD - 1) t_out_last = cyc;
          for (int c = 0; c < CH; c++)
            check($sformatf("img %0d pix %0d ch %0d", m, q, c),
                  int'(od[c*ABITS +: ABITS]), refs[m][q * CH + c]);
          @(negedge clk);
          ordy = 1'b0;
        end
    join
    check("output latency", int'(t_out_last - t_in_last), 1);
    $display("input stalls: %0d", stalls);
    check("input stalled at least once", int'(stalls > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
