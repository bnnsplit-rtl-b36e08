// mac_dot: PE parallel dot products of one activation vector with PE weight
// vectors. This is the multiply-accumulate core of every layer.
//
// act holds SIMD unsigned activations of IN_BITS each (lane i at
// [i*IN_BITS +: IN_BITS]); w holds PE x SIMD signed 2-bit weights (PE row p,
// lane i at [(p*SIMD+i)*2 +: 2]). sum[p] is the signed sum over i of
// act[i]*w[p][i]. Purely combinational; the caller registers the result.
// A 2-bit signed weight times an unsigned value is a small multiplier that
// maps to LUTs; no DSP block is needed.
module mac_dot
  import bnn_pkg::*;
#(
  parameter int unsigned SIMD    = 4,
  parameter int unsigned PE      = 2,
  parameter int unsigned IN_BITS = 2
) (
  input  logic [SIMD*IN_BITS-1:0]    act,
  input  logic [PE*SIMD*WBITS-1:0]   w,
  output logic [PE-1:0][ACC_W-1:0]   sum
);

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      logic signed [ACC_W-1:0] s;
      s = '0;
      for (int i = 0; i < SIMD; i++) begin
        logic signed [ACC_W-1:0] a, wt;
        a  = ACC_W'($unsigned(act[i*IN_BITS +: IN_BITS]));
        wt = ACC_W'($signed(w[(p*SIMD+i)*WBITS +: WBITS]));
        s  = s + a * wt;
      end
      sum[p] = s;
    end
  end

endmodule
