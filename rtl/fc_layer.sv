// fc_layer: fully connected layer with 2-bit weights, one input vector in and
// one output vector out per image.
//
// Input: IN_CH unsigned 2-bit activations packed in in_data (channel i at
// [i*2 +: 2]). Output: OUT_CH values; with THRESH=1 they are 2-bit activations
// (three thresholds per neuron, as in conv_layer), with THRESH=0 they are the
// raw signed 16-bit accumulators (class scores of the last layer).
//
// How it works: the input vector is registered (LOAD), then the layer folds
// the matrix-vector product as NGRP = OUT_CH/PE groups of PE neurons times
// NFOLD = IN_CH/SIMD slices of SIMD inputs, one slice per cycle (mac_dot).
// Cycles per image: 1 + NGRP*NFOLD + output stall. Weights and thresholds are
// loaded through cfg when cfg.layer equals LAYER_ID (kpos ignored). Weight
// memory row grp*NFOLD + fold holds PE*SIMD weights, lane (oc%PE)*SIMD +
// ic%SIMD. The layer sizes are the CNV ones; PE/SIMD folding, formats and the
// handshake are this design's choices.
module fc_layer
  import bnn_pkg::*;
#(
  parameter int unsigned IN_CH    = 256,
  parameter int unsigned OUT_CH   = 512,
  parameter int unsigned PE       = 16,
  parameter int unsigned SIMD     = 64,
  parameter bit          THRESH   = 1'b1,
  parameter int unsigned LAYER_ID = 6,
  localparam int unsigned OUT_W   = THRESH ? ABITS : ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [IN_CH*ABITS-1:0]   in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [OUT_CH*OUT_W-1:0]  out_data
);

  localparam int unsigned NGRP  = OUT_CH / PE;
  localparam int unsigned NFOLD = IN_CH / SIMD;
  localparam int unsigned ROW_W = PE * SIMD * WBITS;

  initial begin
    assert (OUT_CH % PE == 0) else $error("OUT_CH must be a multiple of PE");
    assert (IN_CH % SIMD == 0) else $error("IN_CH must be a multiple of SIMD");
  end

  logic [ROW_W-1:0]      wmem [NGRP*NFOLD];
  logic [NTHR*ACC_W-1:0] tmem [OUT_CH];

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.layer == 4'(LAYER_ID)) begin
      if (cfg.kind == CFG_WEIGHT)
        wmem[(int'(cfg.oc) / PE) * NFOLD + int'(cfg.ic) / SIMD]
            [((int'(cfg.oc) % PE) * SIMD + int'(cfg.ic) % SIMD) * WBITS +: WBITS] <= cfg.data[WBITS-1:0];
      else
        tmem[int'(cfg.oc)] <= cfg.data[NTHR*ACC_W-1:0];
    end
  end

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_EMIT} state_t;
  state_t state;

  logic [IN_CH*ABITS-1:0]        ivec;
  logic [$clog2(NGRP+1)-1:0]     grp;
  logic [$clog2(NFOLD+1)-1:0]    fold;
  logic [PE-1:0][ACC_W-1:0]      acc, psum, accn;
  logic [PE-1:0][NTHR*ACC_W-1:0] thr;
  logic [PE-1:0][ABITS-1:0]      act;
  logic [OUT_CH*OUT_W-1:0]       obuf;
  logic [SIMD*ABITS-1:0]         slice;
  logic [ROW_W-1:0]              wrow;

  assign in_ready  = (state == S_LOAD);

  // a fully connected layer has no kernel positions
  logic unused_kpos;
  assign unused_kpos = ^cfg.kpos;
  assign out_valid = (state == S_EMIT);
  assign out_data  = obuf;

  assign slice = ivec[int'(fold) * SIMD * ABITS +: SIMD * ABITS];
  assign wrow  = wmem[int'(grp) * NFOLD + int'(fold)];

  mac_dot #(.SIMD(SIMD), .PE(PE), .IN_BITS(ABITS)) u_mac (
    .act(slice), .w(wrow), .sum(psum));

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      accn[p] = ((fold == 0) ? ACC_W'(0) : acc[p]) + psum[p];
      thr[p]  = tmem[int'(grp) * PE + p];
    end
  end

  thresh_act #(.PE(PE)) u_thr (.acc(accn), .thr(thr), .act(act));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      ivec  <= '0;
      grp   <= '0;
      fold  <= '0;
      acc   <= '0;
      obuf  <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          ivec  <= in_data;
          state <= S_COMP;
        end
        S_COMP: begin
          acc <= accn;
          if (int'(fold) == NFOLD-1) begin
            fold <= '0;
            for (int p = 0; p < PE; p++)
              obuf[(int'(grp) * PE + p) * OUT_W +: OUT_W] <=
                  THRESH ? OUT_W'(act[p]) : OUT_W'(accn[p]);
            if (int'(grp) == NGRP-1) begin
              grp   <= '0;
              state <= S_EMIT;
            end else begin
              grp <= grp + 1'b1;
            end
          end else begin
            fold <= fold + 1'b1;
          end
        end
        S_EMIT: if (out_ready) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
