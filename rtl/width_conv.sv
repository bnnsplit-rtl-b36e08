// width_conv: stream width converter (gearbox) between any two widths.
//
// Bits keep their order, least significant first: an IN_W-bit input word is
// appended above the bits already held, and OUT_W-bit output words are taken
// from the bottom. Used to cut 64-bit memory words into pixels or activation
// vectors and to pack results back into 64-bit words. Holds at most
// IN_W+OUT_W-1 bits; accepts input whenever fewer than OUT_W+1 bits are held,
// offers output whenever at least OUT_W are held. Valid/ready on both sides.
module width_conv #(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned OUT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);

  localparam int unsigned CAP = IN_W + OUT_W;
  localparam int unsigned CW  = $clog2(CAP + 1);

  logic [CAP-1:0] sreg, sreg_n;
  logic [CW-1:0]  cnt, cnt_n;

  assign out_valid = (int'(cnt) >= OUT_W);
  assign in_ready  = (int'(cnt) <= OUT_W);
  assign out_data  = sreg[OUT_W-1:0];

  always_comb begin
    sreg_n = sreg;
    cnt_n  = cnt;
    if (out_valid && out_ready) begin
      sreg_n = sreg_n >> OUT_W;
      cnt_n  = cnt_n - CW'(OUT_W);
    end
    if (in_valid && in_ready) begin
      sreg_n = sreg_n | (CAP'(in_data) << cnt_n);
      cnt_n  = cnt_n + CW'(IN_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      cnt  <= '0;
    end else begin
      sreg <= sreg_n;
      cnt  <= cnt_n;
    end
  end

endmodule
