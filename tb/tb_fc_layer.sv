// tb_fc_layer: self-checking test of fc_layer at reduced sizes, in both of
// its modes: a thresholded layer (32 inputs, 8 outputs, PE 4, SIMD 8) and a
// raw-score layer (32 inputs, 6 outputs, PE 3, SIMD 16). Each gets four random
// 2-bit input vectors with random output back-pressure; outputs are compared
// with the reference layer. The time from accepting an input to offering the
// output is checked against 1 + (OUT/PE)*(IN/SIMD) cycles.
module tb_fc_layer;
  import bnn_pkg::*;
  import bnn_ref_pkg::*;

  localparam int NI = 32, NO_A = 8, PE_A = 4, SIMD_A = 8, LA = 6;
  localparam int NO_B = 6, PE_B = 3, SIMD_B = 16, LB = 8;
  localparam int NVEC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg = '0;
  logic iv_a = 1'b0, ir_a, ov_a, or_a = 1'b0;
  logic iv_b = 1'b0, ir_b, ov_b, or_b = 1'b0;
  logic [NI*ABITS-1:0]  id = '0;
  logic [NO_A*ABITS-1:0] od_a;
  logic [NO_B*ACC_W-1:0] od_b;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  fc_layer #(.IN_CH(NI), .OUT_CH(NO_A), .PE(PE_A), .SIMD(SIMD_A), .THRESH(1'b1),
             .LAYER_ID(LA)) dut_a (
    .clk, .rst_n, .cfg, .in_valid(iv_a), .in_ready(ir_a), .in_data(id),
    .out_valid(ov_a), .out_ready(or_a), .out_data(od_a));

  fc_layer #(.IN_CH(NI), .OUT_CH(NO_B), .PE(PE_B), .SIMD(SIMD_B), .THRESH(1'b0),
             .LAYER_ID(LB)) dut_b (
    .clk, .rst_n, .cfg, .in_valid(iv_b), .in_ready(ir_b), .in_data(id),
    .out_valid(ov_b), .out_ready(or_b), .out_data(od_b));

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

  task automatic load(int layer, int nout);
    for (int oc = 0; oc < nout; oc++) begin
      for (int ic = 0; ic < NI; ic++) begin
        cfg = cfg_w(layer, oc, 0, ic);
        @(negedge clk);
      end
      cfg = cfg_t3(layer, oc, NI, 1'b0);
      @(negedge clk);
    end
    cfg = '0;
  endtask

  initial begin
    fmap_t x, ra, rb;
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load(LA, NO_A);
    load(LB, NO_B);
    @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      x = new[NI];
      foreach (x[i]) begin
        x[i] = int'($urandom_range(3));
        id[i*ABITS +: ABITS] = 2'(x[i]);
      end
      ra = fc_ref(x, NI, NO_A, LA, 1'b1);
      rb = fc_ref(x, NI, NO_B, LB, 1'b0);
      // thresholded layer
      iv_a = 1'b1;
      while (!ir_a) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      iv_a = 1'b0;
      while (!ov_a) @(negedge clk);
      check("latency A", int'(cyc - t0), 1 + (NO_A / PE_A) * (NI / SIMD_A));
      repeat (v) @(negedge clk);            // hold the output for a while
      or_a = 1'b1;
      for (int c = 0; c < NO_A; c++)
        check($sformatf("A vec %0d out %0d", v, c), int'(od_a[c*ABITS +: ABITS]), ra[c]);
      @(negedge clk);
      or_a = 1'b0;
      // raw-score layer
      iv_b = 1'b1;
      while (!ir_b) @(negedge clk);
      t0 = cyc;
      @(negedge clk);
      iv_b = 1'b0;
      while (!ov_b) @(negedge clk);
      check("latency B", int'(cyc - t0), 1 + (NO_B / PE_B) * (NI / SIMD_B));
      repeat (v) @(negedge clk);
      or_b = 1'b1;
      for (int c = 0; c < NO_B; c++)
        check($sformatf("B vec %0d out %0d", v, c),
              int'($signed(od_b[c*ACC_W +: ACC_W])), rb[c]);
      @(negedge clk);
      or_b = 1'b0;
      check("A idle after output", int'(ov_a), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
