// axi_stream2mem: AXI4 write master that writes a valid/ready stream of
// 64-bit words to memory as a batch ("stream -> mem batch").
//
// A one-cycle start pulse with base_addr (8-byte aligned) and num_words
// begins a batch. For each INCR burst (at most MAX_BURST 8-byte beats, never
// crossing 4 KB) the master sends the address, then the beats as stream words
// arrive (wlast on the final beat, all strobes set), then waits for the write
// response before the next burst. busy is high from start until the last
// response; done pulses one cycle then. Write responses are not checked. The
// burst policy is this design's choice.
module axi_stream2mem
  import bnn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [31:0]       base_addr,
  input  logic [31:0]       num_words,
  output logic              busy,
  output logic              done,
  // input stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_data,
  // AXI4 write address / data / response channels
  output axi_a_t            aw,
  output logic              aw_valid,
  input  logic              aw_ready,
  output axi_w_t            w,
  output logic              w_valid,
  input  logic              w_ready,
  input  logic [1:0]        b_resp,
  input  logic              b_valid,
  output logic              b_ready
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_RESP} state_t;
  state_t state;

  logic [31:0] addr, left;
  logic [8:0]  blen, beat;
  logic [9:0]  to_4k;

  assign to_4k = 10'((13'd4096 - {1'b0, addr[11:0]}) >> 3);

  always_comb begin
    blen = 9'(MAX_BURST);
    if (left < 32'(blen)) blen = 9'(left);
    if (10'(blen) > to_4k) blen = 9'(to_4k);
  end

  logic unused_resp;
  assign unused_resp = ^b_resp;

  assign aw.addr  = addr;
  assign aw.len   = 8'(blen - 1'b1);
  assign aw.size  = 3'd3;
  assign aw.burst = 2'b01;
  assign aw_valid = (state == S_ADDR);
  assign w.data   = in_data;
  assign w.strb   = '1;
  assign w.last   = (beat == 1);
  assign w_valid  = (state == S_DATA) && in_valid;
  assign in_ready = (state == S_DATA) && w_ready;
  assign b_ready  = (state == S_RESP);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      addr  <= '0;
      left  <= '0;
      beat  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          addr <= base_addr;
          left <= num_words;
          if (num_words == 0) done <= 1'b1;
          else                state <= S_ADDR;
        end
        S_ADDR: if (aw_ready) begin
          addr  <= addr + {20'd0, blen, 3'd0};
          left  <= left - 32'(blen);
          beat  <= blen;
          state <= S_DATA;
        end
        S_DATA: if (w_valid && w_ready) begin
          beat <= beat - 1'b1;
          if (beat == 1) state <= S_RESP;
        end
        S_RESP: if (b_valid) begin
          if (left == 0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
