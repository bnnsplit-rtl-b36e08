// axi_mem_model: behavioural AXI4 slave memory of 64-bit words for the
// testbenches (stands in for the board's DDR). Not synthesizable.
//
// Handles one read burst and one write burst at a time, INCR bursts of 8-byte
// beats. Ready and valid signals of the slave side are randomly withheld
// (STALL percent of cycles) to exercise back-pressure. Words never written
// read as zero. Counts bursts and flags bursts that cross a 4 KB boundary.
module axi_mem_model
  import bnn_pkg::*;
#(
  parameter int unsigned STALL = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  axi_a_t ar,
  input  logic   ar_valid,
  output logic   ar_ready,
  output axi_r_t r,
  output logic   r_valid,
  input  logic   r_ready,
  input  axi_a_t aw,
  input  logic   aw_valid,
  output logic   aw_ready,
  input  axi_w_t w,
  input  logic   w_valid,
  output logic   w_ready,
  output logic [1:0] b_resp,
  output logic   b_valid,
  input  logic   b_ready
);

  logic [63:0] mem [int unsigned];
  int unsigned rd_bursts = 0, wr_bursts = 0, cross_4k = 0, wlast_err = 0;

  function automatic logic [63:0] rd(int unsigned waddr);
    return mem.exists(waddr) ? mem[waddr] : 64'd0;
  endfunction

  function automatic bit go();
    return ($urandom_range(99) >= STALL);
  endfunction

  // ---------------- read ----------------
  logic        rbusy;
  int unsigned raddr, rleft;

  assign r.resp = 2'b00;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbusy <= 1'b0; ar_ready <= 1'b0; r_valid <= 1'b0;
      r.data <= '0; r.last <= 1'b0;
    end else begin
      if (!rbusy) begin
        if (ar_valid && ar_ready) begin
          rbusy <= 1'b1;
          raddr = ar.addr >> 3;
          rleft = ar.len + 1;
          rd_bursts++;
          if ((ar.addr >> 12) != ((ar.addr + (ar.len + 1) * 8 - 1) >> 12)) cross_4k++;
          ar_ready <= 1'b0;
        end else ar_ready <= go();
      end else begin
        if (r_valid && r_ready) begin
          raddr++; rleft--;
          r_valid <= 1'b0;
          if (rleft == 0) rbusy <= 1'b0;
        end
        if ((!r_valid || r_ready) && rleft != 0 && go()) begin
          r_valid <= 1'b1;
          r.data  <= rd(raddr);
          r.last  <= (rleft == 1);
        end
      end
    end
  end

  // ---------------- write ----------------
  typedef enum {WI, WD, WB} ws_t;
  ws_t         ws;
  int unsigned waddr, wleft;

  assign b_resp = 2'b00;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= WI; aw_ready <= 1'b0; w_ready <= 1'b0; b_valid <= 1'b0;
    end else begin
      case (ws)
        WI: if (aw_valid && aw_ready) begin
              waddr = aw.addr >> 3;
              wleft = aw.len + 1;
              wr_bursts++;
              if ((aw.addr >> 12) != ((aw.addr + (aw.len + 1) * 8 - 1) >> 12)) cross_4k++;
              aw_ready <= 1'b0;
              w_ready  <= go();
              ws <= WD;
            end else aw_ready <= go();
        WD: begin
              if (w_valid && w_ready) begin
                mem[waddr] = w.data;
                if (w.last != (wleft == 1)) wlast_err++;
                waddr++; wleft--;
                if (wleft == 0) begin
                  ws <= WB; w_ready <= 1'b0; b_valid <= 1'b1;
                end else w_ready <= go();
              end else w_ready <= go();
            end
        WB: if (b_ready) begin b_valid <= 1'b0; ws <= WI; end
        default: ws <= WI;
      endcase
    end
  end

endmodule
