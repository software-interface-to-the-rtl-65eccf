// dma_buf_addr: host buffer selection for each DMA tick.
//
// Each transfer direction uses two DMA channels as a double buffer: DMA
// ticks with an even count go to channel 0 and odd ones to channel 1, the
// tick that carries the samples of the 1 PPS being even.  Each channel
// cycles through 2^N buffers: buffer i of a channel starts at the channel's
// address plus i times the channel's buffer offset.  With both channel
// addresses equal and N = 0 this is a single buffer; with the second
// address one buffer length higher it is a double buffer; with N = 1 and
// the offset set to twice the length the four buffers form a ring.
//
// The tick count is taken from the DMA tick phase (event time minus delay):
// k = phase >> log2(period).  Because there are a power of two DMA ticks
// per second, even/odd and the ring position run on seamlessly from one
// second to the next.  N is limited to MAX_LOG2_BUFS; larger values are
// clipped (this limit and its value are this design's choice).
//
// Timing: desc_valid is a one-clock pulse one clock after `tick`.
module dma_buf_addr
  import conv_pkg::*;
#(
  parameter int unsigned MAX_LOG2_BUFS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic [31:0] phase,
  input  logic [5:0]  log2_per,
  input  logic [7:0]  log2_bufs,
  input  dma_chan_t   chan [2],
  output logic        desc_valid,
  output dma_desc_t   desc,
  output logic [MAX_LOG2_BUFS-1:0] buf_idx
);
  logic [31:0]              k;
  logic [7:0]               n;
  logic [MAX_LOG2_BUFS-1:0] idx, idx_mask;
  logic                     ch;
  logic [63:0]              addr;

  always_comb begin
    k        = phase >> log2_per;
    ch       = k[0];
    n        = (log2_bufs > 8'(MAX_LOG2_BUFS)) ? 8'(MAX_LOG2_BUFS) : log2_bufs;
    idx_mask = MAX_LOG2_BUFS'((64'd1 << n) - 64'd1);
    idx      = MAX_LOG2_BUFS'(k >> 1) & idx_mask;
    addr     = chan[ch].addr + 64'(idx) * 64'(chan[ch].offset);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      desc_valid <= 1'b0;
      desc       <= '0;
      buf_idx    <= '0;
    end else begin
      desc_valid <= tick;
      if (tick) begin
        desc.ch   <= ch;
        desc.addr <= addr;
        desc.len  <= chan[ch].len[27:0];
        buf_idx   <= idx;
      end
    end
  end
endmodule
