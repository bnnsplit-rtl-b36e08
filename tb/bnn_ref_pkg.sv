// bnn_ref_pkg: reference model and test data for the split 2-bit CNV
// testbenches.
//
// Test weights, thresholds and pixels come from a 32-bit integer hash, so a
// testbench can both load them into the hardware and recompute them here.
// Weights take all four 2-bit values with zero mean. The three thresholds of a
// channel sit at 0 and 0.67 estimated standard deviations of its accumulator
// either side (for uniform inputs), plus a small per-channel offset,
// so that all four activation levels occur. The reference layers work on
// plain int arrays (feature map index (y*dim + x)*channels + c) and model
// the 16-bit wrap of the accumulators.
package bnn_ref_pkg;
  import bnn_pkg::*;

  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int wgen(int layer, int oc, int kpos, int ic);
    int unsigned h;
    h = mix(mix(mix(mix(32'(layer) + 1) ^ 32'(oc)) ^ 32'(kpos)) ^ 32'(ic));
    // -2 with p=1/8, -1 with 2/8, 0 with 1/8, +1 with 4/8: mean 0, E[w^2] = 1.25
    case (h[2:0])
      3'd0:       return -2;
      3'd1, 3'd2: return -1;
      3'd3:       return 0;
      default:    return 1;
    endcase
  endfunction

  function automatic int pixgen(int img, int idx);
    int unsigned h;
    h = mix(mix(32'(img) + 32'h1234) ^ 32'(idx));
    return int'(h[7:0]);
  endfunction

  function automatic int sat16(int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // threshold t (0..2) of channel oc of a layer with the given fan-in
  function automatic int tgen(int layer, int oc, int fanin, bit pixel_in, int t);
    real ea2, mu, sd;
    int off;
    ea2 = pixel_in ? 21717.5 : 3.5;
    mu  = 0.0;
    sd  = $sqrt(fanin * ea2 * 1.25);
    off = int'(mix(32'(layer * 4096 + oc)) % 11) - 5;
    case (t)
      0:       return sat16(int'(mu - 0.67 * sd) + off);
      1:       return sat16(int'(mu) + off);
      default: return sat16(int'(mu + 0.67 * sd) + off);
    endcase
  endfunction

  function automatic int wrap16(int v);
    logic [15:0] b;
    b = v[15:0];
    return int'($signed(b));
  endfunction

  function automatic int act_of(int acc, int layer, int oc, int fanin, bit pixel_in);
    int n;
    n = 0;
    for (int t = 0; t < 3; t++)
      if (acc >= tgen(layer, oc, fanin, pixel_in, t)) n++;
    return n;
  endfunction

  typedef int fmap_t[];

  // Always 1. Sizes are multiplied by it so that they are run-time values,
  // which keeps the simulator's compiler from unrolling the reference loops.
  int rt_one = 1;

  // valid KxK convolution, thresholded
  function automatic fmap_t conv_ref(fmap_t in, int dim, int ch, int och, int layer, bit pixel_in);
    fmap_t o;
    int od, acc;
    od = dim - K + 1;
    o = new[od * od * och];
    for (int y = 0; y < od; y++)
      for (int x = 0; x < od; x++)
        for (int c = 0; c < och; c++) begin
          acc = 0;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              for (int i = 0; i < ch; i++)
                acc += in[((y + ky) * dim + x + kx) * ch + i] * wgen(layer, c, ky * K + kx, i);
          o[(y * od + x) * och + c] = act_of(wrap16(acc), layer, c, K * K * ch, pixel_in);
        end
    return o;
  endfunction

  function automatic fmap_t pool_ref(fmap_t in, int dim, int ch);
    fmap_t o;
    int od, m;
    od = dim / 2;
    o = new[od * od * ch];
    for (int y = 0; y < od; y++)
      for (int x = 0; x < od; x++)
        for (int c = 0; c < ch; c++) begin
          m = 0;
          for (int dy = 0; dy < 2; dy++)
            for (int dx = 0; dx < 2; dx++)
              if (in[((2 * y + dy) * dim + 2 * x + dx) * ch + c] > m)
                m = in[((2 * y + dy) * dim + 2 * x + dx) * ch + c];
          o[(y * od + x) * ch + c] = m;
        end
    return o;
  endfunction

  // fully connected layer: thresholded activations or raw 16-bit scores
  function automatic fmap_t fc_ref(fmap_t in, int nin, int nout, int layer, bit thresh);
    fmap_t o;
    int acc;
    o = new[nout];
    for (int c = 0; c < nout; c++) begin
      acc = 0;
      for (int i = 0; i < nin; i++) acc += in[i] * wgen(layer, c, 0, i);
      o[c] = thresh ? act_of(wrap16(acc), layer, c, nin, 1'b0) : wrap16(acc);
    end
    return o;
  endfunction

  // the convolutional part on one generated image: 256 activations
  function automatic fmap_t part1_ref(int img);
    fmap_t a;
    a = new[IMG_DIM * rt_one * IMG_DIM * IMG_CH * rt_one];
    for (int i = 0; i < IMG_DIM * rt_one * IMG_DIM * IMG_CH * rt_one; i++) a[i] = pixgen(img, i);
    a = conv_ref(a, C0_DIM * rt_one, C0_IN * rt_one, C0_OUT * rt_one, 0, 1'b1);
    a = conv_ref(a, C1_DIM * rt_one, C1_IN * rt_one, C1_OUT * rt_one, 1, 1'b0);
    a = pool_ref(a, P0_DIM * rt_one, C1_OUT * rt_one);
    a = conv_ref(a, C2_DIM * rt_one, C2_IN * rt_one, C2_OUT * rt_one, 2, 1'b0);
    a = conv_ref(a, C3_DIM * rt_one, C3_IN * rt_one, C3_OUT * rt_one, 3, 1'b0);
    a = pool_ref(a, P1_DIM * rt_one, C3_OUT * rt_one);
    a = conv_ref(a, C4_DIM * rt_one, C4_IN * rt_one, C4_OUT * rt_one, 4, 1'b0);
    a = conv_ref(a, C5_DIM * rt_one, C5_IN * rt_one, C5_OUT * rt_one, 5, 1'b0);
    return a;
  endfunction

  // the fully connected part: 10 class scores
  function automatic fmap_t part2_ref(fmap_t chunk);
    fmap_t a;
    a = fc_ref(chunk, F0_IN * rt_one, F0_OUT * rt_one, 6, 1'b1);
    a = fc_ref(a, F1_IN * rt_one, F1_OUT * rt_one, 7, 1'b1);
    a = fc_ref(a, F2_IN * rt_one, F2_OUT * rt_one, 8, 1'b0);
    return a;
  endfunction

  // configuration words
  function automatic cfg_t cfg_w(int layer, int oc, int kpos, int ic);
    cfg_t c;
    c = '0;
    c.we    = 1'b1;
    c.layer = 4'(layer);
    c.kind  = CFG_WEIGHT;
    c.oc    = 16'(oc);
    c.kpos  = 8'(kpos);
    c.ic    = 16'(ic);
    c.data  = 64'(wgen(layer, oc, kpos, ic) & 3);
    return c;
  endfunction

  function automatic cfg_t cfg_t3(int layer, int oc, int fanin, bit pixel_in);
    cfg_t c;
    c = '0;
    c.we    = 1'b1;
    c.layer = 4'(layer);
    c.kind  = CFG_THRESH;
    c.oc    = 16'(oc);
    for (int t = 0; t < 3; t++)
      c.data[t*16 +: 16] = 16'(tgen(layer, oc, fanin, pixel_in, t));
    return c;
  endfunction

endpackage
