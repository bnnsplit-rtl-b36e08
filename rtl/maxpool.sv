// maxpool: 2x2 max pooling (stride 2) of streamed 2-bit activation pixels.
//
// Input: one pixel per transfer in raster order, CH unsigned 2-bit channels
// packed as in conv_layer; IN_DIM must be even. Output: (IN_DIM/2)^2 pixels,
// each channel the maximum over its 2x2 window.
//
// Works on the fly: the first pixel of each horizontal pair is held, the pair
// maximum of an even row goes into a row buffer of IN_DIM/2 entries, and on the
// odd row the pair maximum is combined with the buffered one and sent out. One
// registered output slot; the input is stalled only while that slot is full
// and the consumer is not ready. The 2x2 window is the CNV pooling; the
// streaming structure is this design's choice.
module maxpool
  import bnn_pkg::*;
#(
  parameter int unsigned CH     = 64,
  parameter int unsigned IN_DIM = 28
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [CH*ABITS-1:0]   in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [CH*ABITS-1:0]   out_data
);

  localparam int unsigned OUT_DIM = IN_DIM / 2;

  initial assert (IN_DIM % 2 == 0) else $error("IN_DIM must be even");

  logic [CH*ABITS-1:0] rowmax [OUT_DIM];
  logic [CH*ABITS-1:0] hold;
  logic [$clog2(IN_DIM+1)-1:0] x, y;
  logic in_fire;

  function automatic logic [CH*ABITS-1:0] vmax(input logic [CH*ABITS-1:0] a,
                                               input logic [CH*ABITS-1:0] b);
    logic [CH*ABITS-1:0] r;
    for (int c = 0; c < CH; c++)
      r[c*ABITS +: ABITS] = (a[c*ABITS +: ABITS] > b[c*ABITS +: ABITS]) ?
                            a[c*ABITS +: ABITS] : b[c*ABITS +: ABITS];
    return r;
  endfunction

  logic [CH*ABITS-1:0] pairmax;
  assign pairmax  = vmax(hold, in_data);
  assign in_ready = !out_valid || out_ready;
  assign in_fire  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      hold      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_fire) begin
        if (!x[0]) hold <= in_data;
        else if (y[0]) begin
          out_data  <= vmax(rowmax[x[$bits(x)-1:1]], pairmax);
          out_valid <= 1'b1;
        end
        if (int'(x) == IN_DIM-1) begin
          x <= '0;
          y <= (int'(y) == IN_DIM-1) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (in_fire && x[0] && !y[0]) rowmax[x[$bits(x)-1:1]] <= pairmax;

endmodule
