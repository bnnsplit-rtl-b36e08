// thresh_act: multi-threshold activation of PE accumulators.
//
// Each channel has three ascending signed thresholds; the 2-bit output is the
// number of thresholds the accumulator reaches (acc >= t), giving 0..3.
// This folds batch normalisation and 2-bit quantisation into comparisons.
// Combinational. thr[p] packs the thresholds as {t2, t1, t0}.
module thresh_act
  import bnn_pkg::*;
#(
  parameter int unsigned PE = 2
) (
  input  logic [PE-1:0][ACC_W-1:0]      acc,
  input  logic [PE-1:0][NTHR*ACC_W-1:0] thr,
  output logic [PE-1:0][ABITS-1:0]      act
);

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      logic [ABITS-1:0] n;
      n = '0;
      for (int t = 0; t < NTHR; t++)
        if ($signed(acc[p]) >= $signed(thr[p][t*ACC_W +: ACC_W])) n = n + 1'b1;
      act[p] = n;
    end
  end

endmodule
