// dma_chan_ctrl: DMA request and error supervision for one direction.
//
// On every DMA tick (a descriptor from dma_buf_addr) while the direction's
// DMA is enabled, the request is handed to the DMA engine.  The engine must
// show `eng_ready` for that channel on the same clock; if it does not, no
// request is made and a "DMA channel isn't ready" error is flagged for the
// channel.  A channel is busy from its request until the engine reports it
// done.  A `deadline` pulse names the channel whose data must be complete
// at that moment (for the ADC: the previous channel at the next DMA tick;
// for the DAC: the channel whose data starts converting); if that channel
// is still busy a "DMA data didn't arrive in time" error is flagged.
//
// Error outputs are one-clock pulses; the sticky status bits and the error
// counters are kept in the register block.  `done_irq` pulses on every
// completed transfer when the direction's interrupt enable is set.  The
// error kinds follow the board's status register; the exact moments at
// which they are checked are this design's choice.
//
// Handshake: req_valid is a one-clock pulse; req_ch/req are stable with it.
module dma_chan_ctrl
  import conv_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       irq_en,
  input  logic       desc_valid,
  input  dma_desc_t  desc,
  input  logic [1:0] eng_ready,
  input  logic [1:0] eng_done,
  input  logic       deadline,
  input  logic       deadline_ch,
  output logic       req_valid,
  output dma_desc_t  req,
  output logic [1:0] busy,
  output logic [1:0] err_ready,
  output logic [1:0] err_missing,
  output logic       running,
  output logic       done_irq
);
  logic issue;
  assign issue = desc_valid && enable && eng_ready[desc.ch];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid   <= 1'b0;
      req         <= '0;
      busy        <= '0;
      err_ready   <= '0;
      err_missing <= '0;
      running     <= 1'b0;
      done_irq    <= 1'b0;
    end else begin
      req_valid   <= issue;
      err_ready   <= '0;
      err_missing <= '0;
      done_irq    <= irq_en && (eng_done != 2'b00);
      if (issue) req <= desc;
      if (desc_valid && enable && !eng_ready[desc.ch]) err_ready[desc.ch] <= 1'b1;
      if (deadline && enable && busy[deadline_ch]) err_missing[deadline_ch] <= 1'b1;
      for (int c = 0; c < 2; c++) begin
        if (eng_done[c])                        busy[c] <= 1'b0;
        else if (issue && desc.ch == 1'(c))     busy[c] <= 1'b1;
      end
      if (!enable)    running <= 1'b0;
      else if (issue) running <= 1'b1;
    end
  end

  // The engine reports completion only for a channel it was given.
  a_done_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    ((eng_done & ~busy) == 2'b00));
endmodule
