// axi_mem2stream: AXI4 read master that turns a batch of 64-bit words in
// memory into a valid/ready stream ("mem batch -> stream").
//
// A one-cycle start pulse with base_addr (byte address, 8-byte aligned) and
// num_words begins a batch. The master issues INCR bursts of 8-byte beats,
// each at most MAX_BURST beats and never crossing a 4 KB boundary, one burst
// outstanding at a time. Read data go straight to the output stream; rready
// follows out_ready, so a slow consumer stalls the bus. busy is high from
// start until the last word of the batch has left; done pulses one cycle
// then. Read responses are not checked (resp is ignored). The conversion of
// 64-bit memory batches into streams is the kernels' documented structure;
// the burst policy is this design's choice.
module axi_mem2stream
  import bnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       base_addr,
  input  logic [31:0]       num_words,
  output logic              busy,
  output logic              done,
  // AXI4 read address / data channels
  output axi_a_t            ar,
  output logic              ar_valid,
  input  logic              ar_ready,
  input  axi_r_t            r,
  input  logic              r_valid,
  output logic              r_ready,
  // output stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [WORD_W-1:0] out_data
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_t;
  state_t state;

  logic [31:0] addr, left;      // next burst address, words not yet requested
  logic [31:0] pending;         // words requested but not yet received
  logic [8:0]  blen;            // beats of the next burst

  // beats up to the next 4 KB boundary
  logic [9:0]  to_4k;
  assign to_4k = 10'((13'd4096 - {1'b0, addr[11:0]}) >> 3);

  always_comb begin
    blen = 9'(MAX_BURST);
    if (left < 32'(blen)) blen = 9'(left);
    if (10'(blen) > to_4k) blen = 9'(to_4k);
  end

  assign ar.addr    = addr;
  assign ar.len     = 8'(blen - 1'b1);
  assign ar.size    = 3'd3;
  assign ar.burst   = 2'b01;
  assign ar_valid   = (state == S_ADDR);
  assign r_ready    = (state == S_DATA) && out_ready;
  assign out_valid  = (state == S_DATA) && r_valid;
  assign out_data   = r.data;
  assign busy       = (state != S_IDLE);

  // read responses and rlast are not used: beats are counted instead
  logic unused_r;
  assign unused_r = ^{r.resp, r.last};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      addr    <= '0;
      left    <= '0;
      pending <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          addr <= base_addr;
          left <= num_words;
          if (num_words == 0) done <= 1'b1;
          else                state <= S_ADDR;
        end
        S_ADDR: if (ar_ready) begin
          addr    <= addr + {20'd0, blen, 3'd0};
          left    <= left - 32'(blen);
          pending <= 32'(blen);
          state   <= S_DATA;
        end
        S_DATA: if (r_valid && r_ready) begin
          pending <= pending - 1'b1;
          if (pending == 1) begin
            if (left == 0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ADDR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
