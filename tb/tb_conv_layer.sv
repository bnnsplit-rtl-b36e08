// tb_conv_layer: self-checking test of conv_layer at a reduced size (8 input
// channels, 6x6 input, 8 output channels, PE 4).
//
// Loads hash-generated weights and thresholds, streams three random
// 2-bit images with random input gaps and output back-pressure, and compares
// every output pixel with the reference convolution of bnn_ref_pkg. For the
// first image (no gaps, no back-pressure) it also checks the compute time:
// OFM_DIM^2 * (K*K*OFM_CH/PE + 1) cycles from the last input to the last
// output. Counts how often each activation level occurs.
module tb_conv_layer;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int CH = 8, DIM = 6, OC = 8, PE = 4, LID = 1, NIMG = 3;
  localparam int OD = DIM - K + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg = '0;
  logic iv = 1'b0, ir, ov, ordy = 1'b0;
  logic [CH*ABITS-1:0] id = '0;
  logic [OC*ABITS-1:0] od;
  int checks = 0, failures = 0;
  int level_cnt[4] = '{0, 0, 0, 0};
  longint t_in_last, t_out_last, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  conv_layer #(.IFM_CH(CH), .IFM_DIM(DIM), .OFM_CH(OC), .PE(PE), .IN_BITS(ABITS),
               .LAYER_ID(LID)) dut (
    .clk, .rst_n, .cfg, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(ordy), .out_data(od));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fmap_t imgs[NIMG], refs[NIMG];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < NIMG; n++) begin
      imgs[n] = new[DIM * DIM * CH];
      foreach (imgs[n][i]) imgs[n][i] = int'($urandom_range(3));
      refs[n] = conv_ref(imgs[n], DIM, CH, OC, LID, 1'b0);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // parameters
    for (int oc = 0; oc < OC; oc++) begin
      for (int kp = 0; kp < K * K; kp++)
        for (int ic = 0; ic < CH; ic++) begin
          cfg <= cfg_w(LID, oc, kp, ic);
          @(posedge clk);
        end
      cfg <= cfg_t3(LID, oc, K * K * CH, 1'b0);
      @(posedge clk);
    end
    cfg <= '0;
    @(posedge clk);
    @(negedge clk);
    fork
      // producer: drives at the falling edge; a transfer happens at the next
      // rising edge when in_valid and in_ready are both high at the falling edge
      for (int n = 0; n < NIMG; n++)
        for (int p = 0; p < DIM * DIM; p++) begin
          logic [CH*ABITS-1:0] v;
          for (int c = 0; c < CH; c++) v[c*ABITS +: ABITS] = 2'(imgs[n][p * CH + c]);
          if (n > 0) while ($urandom_range(3) == 0) begin iv = 1'b0; @(negedge clk); end
          iv = 1'b1; id = v;
          while (!ir) @(negedge clk);
          if (n == 0 && p == DIM * DIM - 1) t_in_last = cyc;
          @(negedge clk);
          iv = 1'b0;
        end
      // consumer
      for (int m = 0; m < NIMG; m++)
        for (int q = 0; q < OD * OD; q++) begin
          ordy = (m == 0) ? 1'b1 : ($urandom_range(2) != 0);
          while (!(ov && ordy)) begin
            @(negedge clk);
            ordy = (m == 0) ? 1'b1 : ($urandom_range(2) != 0);
          end
          if (m == 0 && q == OD * OD - 1) t_out_last = cyc;
          for (int c = 0; c < OC; c++) begin
            int g;
            g = int'(od[c*ABITS +: ABITS]);
            level_cnt[g]++;
            check($sformatf("img %0d pix %0d ch %0d", m, q, c), g, refs[m][q * OC + c]);
          end
          @(negedge clk);
          ordy = 1'b0;
        end
    join
    check("compute cycles", int'(t_out_last - t_in_last), OD * OD * (K * K * OC / PE + 1));
    for (int l = 0; l < 4; l++) begin
      $display("activation level %0d: %0d times", l, level_cnt[l]);
      check($sformatf("level %0d occurs", l), int'(level_cnt[l] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
