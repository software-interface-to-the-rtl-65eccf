// dac_frame_reader: dual-ported DAC DMA buffer and conversion play-out.
//
// The DMA engine writes each DAC transfer row by row (16 bytes, LANES
// values per row) into one of two halves: half 0 for the even DMA channel,
// half 1 for the odd one.  A transfer holds, for each DAC sampling tick of
// a DMA period, one set of N_CH values in ceil(N_CH/LANES) rows, followed
// directly (no dummy rows) by a 16-byte block whose first two words are the
// time stamp fraction and seconds.  The time stamp row is captured in a
// register when it is written.
//
// At each DAC sampling tick at time t the set for slot
// ((t - dma_delay) mod P_dma) / P_smp of the DMA tick k = floor((t -
// dma_delay) / P_dma) is played out, one row per clock.  When bit 0 of the
// DAC sampling delay register is zero one more DMA period is inserted
// between transfer and conversion, i.e. the data of tick k-1 is used.  At
// slot 0 the time stamp of that buffer is compared with t (bits below the
// sampling period cleared); a mismatch flags a time stamp error for the
// channel unless time stamps are disabled, and unless time stamp errors are
// ignored the sets of that buffer are replaced by zeros and the DAC data
// valid status drops.  `conv_start`/`conv_half` tell the DMA supervisor
// which channel must be complete at that moment.
//
// The buffer layout, time stamp rules, extra-period bit and error kinds
// follow the board description; zeroing rejected data is this design's
// choice for "preventing stale data from being processed".
//
// Timing: dac_valid/dac_data follow the sampling tick by two clocks and
// last ROWS clocks.
module dac_frame_reader #(
  parameter int unsigned N_CH      = 16,
  parameter int unsigned LANES     = 4,
  parameter int unsigned BUF_BYTES = 4096,
  localparam int unsigned ROWS     = (N_CH + LANES - 1) / LANES,
  localparam int unsigned BUF_ROWS = BUF_BYTES / (LANES * 4),
  localparam int unsigned RW       = $clog2(BUF_ROWS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // DMA side
  input  logic                wr_en,
  input  logic                wr_half,
  input  logic [RW:0]         wr_row,    // may address the stamp row past the data
  input  logic [LANES*32-1:0] wr_data,
  // timing
  input  logic                conv_en,
  input  logic                smp_tick,
  input  logic [31:0]         smp_sec,
  input  logic [31:0]         smp_frac,
  input  logic [31:0]         smp_per_m1,
  input  logic [31:0]         smp_dly_m1,
  input  logic [31:0]         dma_dly_m1,
  input  logic [5:0]          log2_dma_per,
  input  logic [5:0]          log2_smp_per,
  input  logic                ts_disable,
  input  logic                ts_ignore,
  // converter side
  output logic                dac_valid,
  output logic [31:0]         dac_data [LANES],
  output logic                data_valid,
  output logic                conv_start,
  output logic                conv_half,
  output logic [1:0]          ts_err
);
  logic [LANES*32-1:0] mem [2*BUF_ROWS];
  logic [31:0] ts_sec  [2];
  logic [31:0] ts_frac [2];

  logic [31:0] data_rows;
  assign data_rows = (log2_dma_per >= log2_smp_per)
                   ? (32'(ROWS) << (log2_dma_per - log2_smp_per)) : 32'(ROWS);

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_row) < BUF_ROWS) mem[{wr_half, wr_row[RW-1:0]}] <= wr_data;
  end

  // ------------------------------------------------------ play-out
  logic [31:0] rel, slot;
  logic        half;
  logic        ts_match;
  always_comb begin
    rel      = smp_frac - (dma_dly_m1 + 32'd1);
    slot     = (rel & ((32'd1 << log2_dma_per) - 32'd1)) >> log2_smp_per;
    half     = rel[log2_dma_per[4:0]] ^ ~smp_dly_m1[0];
    ts_match = (ts_sec[half] == smp_sec) && (ts_frac[half] == (smp_frac & ~smp_per_m1));
  end

  logic              playing, rd_q, reject;
  logic [31:0]       base_row;
  logic [$clog2(ROWS+1)-1:0] beat;
  logic              play_half;
  logic [LANES*32-1:0] rd_word;
  logic [31:0]       rd_row;
  assign rd_row = base_row + 32'(beat);

  always_ff @(posedge clk) begin
    if (playing) rd_word <= mem[{play_half, rd_row[RW-1:0]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < 2; h++) begin ts_sec[h] <= '0; ts_frac[h] <= '0; end
      playing    <= 1'b0;
      rd_q       <= 1'b0;
      reject     <= 1'b0;
      base_row   <= '0;
      beat       <= '0;
      play_half  <= 1'b0;
      data_valid <= 1'b0;
      conv_start <= 1'b0;
      conv_half  <= 1'b0;
      ts_err     <= '0;
    end else begin
      conv_start <= 1'b0;
      ts_err     <= '0;
      rd_q       <= playing;
      if (wr_en && 32'(wr_row) == data_rows) begin
        ts_frac[wr_half] <= wr_data[31:0];
        ts_sec[wr_half]  <= wr_data[63:32];
      end
      if (smp_tick && conv_en) begin
        playing   <= 1'b1;
        beat      <= '0;
        play_half <= half;
        base_row  <= slot * ROWS;
        if (slot == 0) begin
          conv_start <= 1'b1;
          conv_half  <= half;
          if (!ts_disable && !ts_match) begin
            ts_err[half] <= 1'b1;
            reject       <= !ts_ignore;
            data_valid   <= ts_ignore;
          end else begin
            reject     <= 1'b0;
            data_valid <= 1'b1;
          end
        end
      end else if (playing) begin
        if (beat == ROWS[$bits(beat)-1:0] - 1'b1) playing <= 1'b0;
        beat <= beat + 1'b1;
      end
      if (!conv_en) data_valid <= 1'b0;
    end
  end

  always_comb begin
    dac_valid = rd_q;
    for (int l = 0; l < LANES; l++)
      dac_data[l] = reject ? 32'd0 : rd_word[l*32 +: 32];
  end
endmodule
