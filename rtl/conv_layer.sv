// conv_layer: one KxK valid convolution layer with 2-bit weights and 2-bit
// thresholded activations, streaming pixel vectors in and out.
//
// Input: one pixel per transfer, raster order, all IFM_CH channels of the
// pixel packed in in_data (channel c at [c*IN_BITS +: IN_BITS], unsigned).
// Output: one pixel per transfer, raster order, OFM_DIM = IFM_DIM-K+1, with
// OFM_CH 2-bit activations (channel c at [c*2 +: 2]). Streams use
// valid/ready; data moves when both are high.
//
// How it works: the layer first stores the whole input feature map (LOAD),
// then for each output pixel and each group of PE output channels it spends
// K*K cycles, one per kernel position, multiplying the IFM_CH channels of the
// input pixel under that position by PE weight vectors (mac_dot) and adding
// into PE accumulators. After the last position the accumulators go through
// the three thresholds of their channel (thresh_act). When all OFM_CH/PE
// groups are done the pixel is offered on the output (EMIT). Cycles per image:
// IFM_DIM^2 (load) + OFM_DIM^2 * (K*K*OFM_CH/PE + 1) plus output stalls.
//
// Weights and thresholds are written through the cfg bus (bnn_pkg::cfg_t)
// when cfg.layer equals LAYER_ID; they are not reset. Weight memory row
// (oc/PE)*K*K + kpos holds PE*IFM_CH weights, lane (oc%PE)*IFM_CH + ic.
// The layer shapes come from the CNV network; storing the whole feature map
// instead of a sliding-window line buffer, the PE folding and the formats are
// this design's choices.
module conv_layer
  import bnn_pkg::*;
#(
  parameter int unsigned IFM_CH   = 3,
  parameter int unsigned IFM_DIM  = 32,
  parameter int unsigned OFM_CH   = 64,
  parameter int unsigned KSIZE    = K,
  parameter int unsigned PE       = 16,
  parameter int unsigned IN_BITS  = PIX_BITS,
  parameter int unsigned LAYER_ID = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  cfg_t                      cfg,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [IFM_CH*IN_BITS-1:0] in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [OFM_CH*ABITS-1:0]   out_data
);

  localparam int unsigned OFM_DIM = IFM_DIM - KSIZE + 1;
  localparam int unsigned KK      = KSIZE * KSIZE;
  localparam int unsigned NGRP    = OFM_CH / PE;
  localparam int unsigned NPIX    = IFM_DIM * IFM_DIM;
  localparam int unsigned ROW_W   = PE * IFM_CH * WBITS;

  initial begin
    assert (OFM_CH % PE == 0) else $error("OFM_CH must be a multiple of PE");
    assert (IFM_DIM >= KSIZE) else $error("IFM_DIM must be at least KSIZE");
  end

  // ---------------- memories ----------------
  logic [IFM_CH*IN_BITS-1:0] ifm  [NPIX];
  logic [ROW_W-1:0]          wmem [NGRP*KK];
  logic [NTHR*ACC_W-1:0]     tmem [OFM_CH];

  // parameter loading
  always_ff @(posedge clk) begin
    if (cfg.we && cfg.layer == 4'(LAYER_ID)) begin
      if (cfg.kind == CFG_WEIGHT)
        wmem[(int'(cfg.oc) / PE) * KK + int'(cfg.kpos)]
            [((int'(cfg.oc) % PE) * IFM_CH + int'(cfg.ic)) * WBITS +: WBITS] <= cfg.data[WBITS-1:0];
      else
        tmem[int'(cfg.oc)] <= cfg.data[NTHR*ACC_W-1:0];
    end
  end

  // ---------------- control ----------------
  typedef enum logic [1:0] {S_LOAD, S_COMP, S_EMIT} state_t;
  state_t state;

  logic [$clog2(NPIX+1)-1:0]    lcnt;
  logic [$clog2(OFM_DIM+1)-1:0] ox, oy;
  logic [$clog2(KSIZE+1)-1:0]   kx, ky;
  logic [$clog2(NGRP+1)-1:0]    grp;
  logic [PE-1:0][ACC_W-1:0]     acc;
  logic [OFM_CH*ABITS-1:0]      obuf;

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_EMIT);
  assign out_data  = obuf;

  // datapath
  logic [IFM_CH*IN_BITS-1:0]       pix;
  logic [ROW_W-1:0]                wrow;
  logic [PE-1:0][ACC_W-1:0]        psum, accn;
  logic [PE-1:0][NTHR*ACC_W-1:0]   thr;
  logic [PE-1:0][ABITS-1:0]        act;
  logic                            first_k, last_k;

  assign pix     = ifm[(int'(oy) + int'(ky)) * IFM_DIM + int'(ox) + int'(kx)];
  assign wrow    = wmem[int'(grp) * KK + int'(ky) * KSIZE + int'(kx)];
  assign first_k = (kx == 0) && (ky == 0);
  assign last_k  = (int'(kx) == KSIZE-1) && (int'(ky) == KSIZE-1);

  mac_dot #(.SIMD(IFM_CH), .PE(PE), .IN_BITS(IN_BITS)) u_mac (
    .act(pix), .w(wrow), .sum(psum));

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      accn[p] = (first_k ? ACC_W'(0) : acc[p]) + psum[p];
      thr[p]  = tmem[int'(grp) * PE + p];
    end
  end

  thresh_act #(.PE(PE)) u_thr (.acc(accn), .thr(thr), .act(act));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      lcnt  <= '0;
      ox    <= '0; oy <= '0; kx <= '0; ky <= '0; grp <= '0;
      acc   <= '0;
      obuf  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (int'(lcnt) == NPIX-1) begin
            lcnt  <= '0;
            state <= S_COMP;
          end else begin
            lcnt <= lcnt + 1'b1;
          end
        end
        S_COMP: begin
          acc <= accn;
          if (int'(kx) == KSIZE-1) begin
            kx <= '0;
            if (int'(ky) == KSIZE-1) ky <= '0;
            else                     ky <= ky + 1'b1;
          end else begin
            kx <= kx + 1'b1;
          end
          if (last_k) begin
            for (int p = 0; p < PE; p++)
              obuf[(int'(grp) * PE + p) * ABITS +: ABITS] <= act[p];
            if (int'(grp) == NGRP-1) begin
              grp   <= '0;
              state <= S_EMIT;
            end else begin
              grp <= grp + 1'b1;
            end
          end
        end
        S_EMIT: if (out_ready) begin
          if (int'(ox) == OFM_DIM-1) begin
            ox <= '0;
            if (int'(oy) == OFM_DIM-1) begin
              oy    <= '0;
              state <= S_LOAD;
            end else begin
              oy    <= oy + 1'b1;
              state <= S_COMP;
            end
          end else begin
            ox    <= ox + 1'b1;
            state <= S_COMP;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // input feature map store (no reset: memory)
  always_ff @(posedge clk)
    if (state == S_LOAD && in_valid) ifm[int'(lcnt)] <= in_data;

endmodule
