// fc_input_buffer: input buffer of the fully connected node in the
// multi-board system. Several convolutional nodes send their 64-byte result
// chunks to it; the fully connected kernel reads them back in arrival order.
//
// Write side: N_IN AXI4 write slaves. A round-robin arbiter grants one slave
// at a time for a whole burst (AW, all W beats, B), so the words of different
// bursts never interleave; a burst from part1_kernel always carries whole
// 64-byte chunks. Addresses are ignored: the buffer is a FIFO of DEPTH 64-bit
// words, and W beats are stalled (wready low) while it is full.
// Read side: one AXI4 read slave. Each AR is answered with len+1 beats popped
// from the FIFO (rvalid low while it is empty), rlast on the final beat,
// OKAY responses. level gives the FIFO occupancy in words.
//
// The multi-board arrangement and the existence of this buffer follow the
// design description; the network transport between boards is abstracted
// away, and the FIFO depth, arbitration and AXI4 slave behaviour are this
// design's choices.
module fc_input_buffer
  import bnn_pkg::*;
#(
  parameter int unsigned N_IN  = 2,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // AXI4 write slaves, one per sending node
  input  axi_a_t [N_IN-1:0]          s_aw,
  input  logic   [N_IN-1:0]          s_aw_valid,
  output logic   [N_IN-1:0]          s_aw_ready,
  input  axi_w_t [N_IN-1:0]          s_w,
  input  logic   [N_IN-1:0]          s_w_valid,
  output logic   [N_IN-1:0]          s_w_ready,
  output logic   [N_IN-1:0][1:0]     s_b_resp,
  output logic   [N_IN-1:0]          s_b_valid,
  input  logic   [N_IN-1:0]          s_b_ready,
  // AXI4 read slave towards the fully connected kernel
  input  axi_a_t                     s_ar,
  input  logic                       s_ar_valid,
  output logic                       s_ar_ready,
  output axi_r_t                     s_r,
  output logic                       s_r_valid,
  input  logic                       s_r_ready,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  // addresses and burst attributes are ignored: the buffer is a FIFO
  logic unused_addr;
  assign unused_addr = ^{s_aw, s_ar.addr, s_ar.size, s_ar.burst};
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  // ---------------- FIFO ----------------
  logic [WORD_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic              push, pop, full, empty;

  assign full  = (int'(level) == DEPTH);
  assign empty = (level == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      if (push && !pop)      level <= level + 1'b1;
      else if (pop && !push) level <= level - 1'b1;
    end
  end

  // ---------------- write side ----------------
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_t;
  wstate_t        wstate;
  logic [IW-1:0]  owner, prio, pick;
  logic           any_req;

  always_comb begin
    pick    = prio;
    any_req = 1'b0;
    for (int k = N_IN-1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(prio) + k) % N_IN;
      if (s_aw_valid[idx]) begin
        pick    = IW'(idx);
        any_req = 1'b1;
      end
    end
  end

  logic [WORD_W-1:0] wdata;
  logic              wlast;
  assign wdata = s_w[owner].data;
  assign wlast = s_w[owner].last;
  assign push  = (wstate == W_DATA) && s_w_valid[owner] && !full;

  always_comb begin
    s_aw_ready = '0;
    s_w_ready  = '0;
    s_b_valid  = '0;
    for (int i = 0; i < N_IN; i++) s_b_resp[i] = 2'b00;
    if (wstate == W_IDLE && any_req) s_aw_ready[pick]  = 1'b1;
    if (wstate == W_DATA)            s_w_ready[owner]  = !full;
    if (wstate == W_RESP)            s_b_valid[owner]  = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate <= W_IDLE;
      owner  <= '0;
      prio   <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (any_req) begin
          owner  <= pick;
          prio   <= (int'(pick) == N_IN-1) ? '0 : pick + 1'b1;
          wstate <= W_DATA;
        end
        W_DATA: if (push && wlast) wstate <= W_RESP;
        W_RESP: if (s_b_ready[owner]) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wp] <= wdata;

  // ---------------- read side ----------------
  logic       rbusy;
  logic [8:0] rbeats;

  assign s_ar_ready = !rbusy;
  assign s_r_valid  = rbusy && !empty;
  assign s_r.data   = mem[rp];
  assign s_r.resp   = 2'b00;
  assign s_r.last   = (rbeats == 1);
  assign pop        = s_r_valid && s_r_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbusy  <= 1'b0;
      rbeats <= '0;
    end else if (!rbusy) begin
      if (s_ar_valid) begin
        rbusy  <= 1'b1;
        rbeats <= {1'b0, s_ar.len} + 9'd1;
      end
    end else if (pop) begin
      rbeats <= rbeats - 1'b1;
      if (rbeats == 1) rbusy <= 1'b0;
    end
  end

  // the FIFO is never written when full nor read when empty
  always_ff @(posedge clk) if (rst_n) begin
    assert (!(push && full));
    assert (!(pop && empty));
  end

endmodule
