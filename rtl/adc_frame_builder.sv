// adc_frame_builder: dual-ported ADC DMA buffer and its host-side layout.
//
// ADC samples arrive from the converter side LANES values (16 bytes) per
// beat, channel 0..3 first, after each ADC sampling tick.  A set of N_CH
// channels takes ceil(N_CH/LANES) beats ("rows"); unused lanes of the last
// row are dummy zeros.  With oversampling, the sets of all sampling ticks
// between two DMA ticks go into the same buffer one after the other, so the
// set taken at tick s of a DMA period starts at row s*ROWS.  The buffer has
// two halves of BUF_BYTES each: the samples sent by an even DMA tick fill
// half 0, those of an odd tick half 1, so one half can be read by the DMA
// engine while the other fills.  A sample at time t belongs to the first
// DMA tick after it: slot = ((t - dma_delay) mod P_dma) / P_smp, half =
// parity of that tick.
//
// The DMA engine reads a transfer of `rd_len` bytes row by row.  Rows
// holding sample sets come from the memory, the last row of the transfer is
// the 16-byte time stamp and status block (from low to high address:
// time stamp fraction, time stamp seconds, status word, overflow word) and
// any rows between are dummy zeros that pad the transfer to the cache line.
// The time stamp is the time of the first set in the buffer with the bits
// below the sampling period cleared.  With the time stamp disabled the last
// row is a dummy row as well.  Length bits above twice the buffer size and
// the low four bits are ignored.
//
// The layout, dummy padding, time stamp rules and double-buffer halves
// follow the board description.  Using the last 32-bit word for per-channel
// overflow flags (bit = channel mod 32) and a single 16-byte transfer width
// are this design's choices.
//
// Timing: rd_data is valid one clock after rd_en.  Samples of a set must all
// arrive before the next sampling tick.
module adc_frame_builder #(
  parameter int unsigned N_CH      = 32,
  parameter int unsigned LANES     = 4,
  parameter int unsigned BUF_BYTES = 4096,
  localparam int unsigned ROWS     = (N_CH + LANES - 1) / LANES,
  localparam int unsigned BUF_ROWS = BUF_BYTES / (LANES * 4),
  localparam int unsigned RW       = $clog2(BUF_ROWS),
  localparam int unsigned LW       = $clog2(2 * BUF_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // timing
  input  logic              smp_tick,
  input  logic [31:0]       smp_sec,
  input  logic [31:0]       smp_frac,
  input  logic [31:0]       smp_per_m1,
  input  logic [31:0]       dma_dly_m1,
  input  logic [5:0]        log2_dma_per,
  input  logic [5:0]        log2_smp_per,
  input  logic              ts_disable,
  input  logic [31:0]       status_word,
  // converter side
  input  logic              adc_valid,
  input  logic [31:0]       adc_data [LANES],
  input  logic [LANES-1:0]  adc_ovf,
  output logic              data_valid,
  // DMA side
  input  logic              rd_en,
  input  logic              rd_half,
  input  logic [RW:0]       rd_row,
  input  logic [27:0]       rd_len,
  output logic [LANES*32-1:0] rd_data
);
  logic [LANES*32-1:0] mem [2*BUF_ROWS];

  logic [31:0] rel, slot_full;
  logic        cur_half;
  logic [31:0] cur_slot;
  logic [31:0] cur_sec, cur_frac;
  logic [$clog2(ROWS+1)-1:0] beat;
  logic [31:0] ts_sec  [2];
  logic [31:0] ts_frac [2];
  logic [31:0] ovf     [2];

  always_comb begin
    rel       = smp_frac - (dma_dly_m1 + 32'd1);
    slot_full = (rel & ((32'd1 << log2_dma_per) - 32'd1)) >> log2_smp_per;
  end

  // Row of the current beat inside its half.
  logic [31:0] wr_row;
  logic [LANES*32-1:0] wr_word;
  logic [31:0] ovf_bits;
  always_comb begin
    wr_row   = cur_slot * ROWS + 32'(beat);
    ovf_bits = '0;
    for (int l = 0; l < LANES; l++) begin
      if (32'(beat) * LANES + l < N_CH) begin
        wr_word[l*32 +: 32] = adc_data[l];
        ovf_bits[(32'(beat) * LANES + l) % 32] = adc_ovf[l];
      end else begin
        wr_word[l*32 +: 32] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adc_valid && 32'(beat) < ROWS && wr_row < BUF_ROWS)
      mem[{cur_half, wr_row[RW-1:0]}] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_half   <= 1'b0;
      cur_slot   <= '0;
      cur_sec    <= '0;
      cur_frac   <= '0;
      beat       <= ROWS[$bits(beat)-1:0];
      data_valid <= 1'b0;
      for (int h = 0; h < 2; h++) begin
        ts_sec[h] <= '0; ts_frac[h] <= '0; ovf[h] <= '0;
      end
    end else begin
      if (smp_tick) begin
        cur_half <= ~rel[log2_dma_per[4:0]];
        cur_slot <= slot_full;
        cur_sec  <= smp_sec;
        cur_frac <= smp_frac & ~smp_per_m1;
        beat     <= '0;
        if (beat != ROWS[$bits(beat)-1:0]) data_valid <= 1'b0;
      end else if (adc_valid && 32'(beat) < ROWS) begin
        beat <= beat + 1'b1;
        if (beat == ROWS[$bits(beat)-1:0] - 1'b1) data_valid <= 1'b1;
        if (cur_slot == 0 && beat == 0) begin
          ts_sec[cur_half]  <= cur_sec;
          ts_frac[cur_half] <= cur_frac;
          ovf[cur_half]     <= ovf_bits;
        end else begin
          ovf[cur_half]     <= ovf[cur_half] | ovf_bits;
        end
      end
    end
  end

  // ------------------------------------------------------------ DMA read
  logic [LW-5:0]       len_rows;
  logic [31:0]         data_rows;
  logic [1:0]          sel_q;      // 0 dummy, 1 memory, 2 stamp
  logic [LANES*32-1:0] mem_q, stamp_q;

  always_comb begin
    len_rows  = rd_len[LW-1:4];
    data_rows = (log2_dma_per >= log2_smp_per)
              ? (32'(ROWS) << (log2_dma_per - log2_smp_per)) : 32'(ROWS);
  end

  always_ff @(posedge clk) begin
    if (rd_en) mem_q <= mem[{rd_half, rd_row[RW-1:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q   <= '0;
      stamp_q <= '0;
    end else if (rd_en) begin
      stamp_q <= (LANES*32)'({ovf[rd_half], status_word, ts_sec[rd_half], ts_frac[rd_half]});
      if (32'(rd_row) < data_rows)                              sel_q <= 2'd1;
      else if (!ts_disable && 32'(rd_row) + 1 == 32'(len_rows)) sel_q <= 2'd2;
      else                                                      sel_q <= 2'd0;
    end
  end

  always_comb begin
    unique case (sel_q)
      2'd1:    rd_data = mem_q;
      2'd2:    rd_data = stamp_q;
      default: rd_data = '0;
    endcase
  end
endmodule
