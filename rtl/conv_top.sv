// conv_top: host interface of the PCIe converter board.
//
// The board samples ADCs and drives DACs on a grid of times derived from
// GPS time, and moves the samples to and from host memory by DMA once per
// DMA period.  This module holds everything between the PCIe/DMA IP, the
// timing receiver and the converters:
//
//  * bar0_decoder splits the 32 kB BAR0 window into the control registers
//    (ctrl_regs), converter diagnostics and flash programmer (both brought
//    out as ports) and the filter coefficient memory (coef_mem).
//  * gps_time_base keeps GPS time in 2^-32 s from the 1 PPS and seconds
//    supplied by the timing receiver.
//  * Four period_tick_gen instances turn the period/delay registers into
//    ADC sampling, ADC DMA, DAC conversion and DAC DMA ticks.
//  * Per direction, dma_buf_addr picks the even/odd DMA channel and the
//    buffer in its 2^N ring, and dma_chan_ctrl issues the request to the
//    DMA engine and flags not-ready and missing-data errors.
//  * adc_frame_builder and dac_frame_reader are the dual-ported DMA buffers
//    with their time stamp and status blocks; the DAC values pass through
//    range_limit to the converter's 28 bits.
//  * watchdog drives the watchdog line to the adapter board.
//
// Ports: `bar_*` is the BAR0 single-word access from the PCIe IP; `adc_dma_*`
// and `dac_dma_*` connect to the DMA engine (requests, per-channel ready and
// done, and the row-wide buffer read/write ports); `adc_*` and `dac_*` are
// the converter streams (LANES values per clock); `flt_*` is the
// coefficient port for the filter engine.  Everything runs on one clock of
// 2^LOG2_CLK_HZ Hz.  The register map, time formats, DMA buffer layout and
// double buffering follow the board description; the handshakes on these
// ports, the default channel counts and buffer sizes, the supported rate
// limits and the exact rule for a valid sampling configuration (power-of-two
// periods, rates within the reported limits, the sets of one DMA period
// fitting a buffer half) are this design's choices.
module conv_top
  import conv_pkg::*;
#(
  parameter int unsigned LOG2_CLK_HZ   = 26,
  parameter int unsigned N_ADC         = 32,
  parameter int unsigned N_DAC         = 16,
  parameter int unsigned LANES         = 4,
  parameter int unsigned ADC_BUF_BYTES = 4096,
  parameter int unsigned DAC_BUF_BYTES = 4096,
  parameter int unsigned COEF_BYTES    = 8192,
  parameter int unsigned LOG2_CYCLES   = 6,
  parameter int unsigned MAX_LOG2_BUFS = 4,
  parameter int unsigned WD_TIMEOUT    = 1 << 26,
  parameter logic [31:0] AXI_CLK_HZ    = 32'd125_000_000,
  localparam int unsigned ADC_RW       = $clog2(ADC_BUF_BYTES / (LANES * 4)),
  localparam int unsigned DAC_RW       = $clog2(DAC_BUF_BYTES / (LANES * 4))
) (
  input  logic                clk,
  input  logic                rst_n,
  // BAR0 access
  input  bar_req_t            bar_req,
  output logic                bar_rvalid,
  output logic [31:0]         bar_rdata,
  // timing receiver
  input  logic                pps,
  input  logic [31:0]         gps_sec_in,
  input  logic [31:0]         node_addr,
  output logic                timing_ok,
  // monitors
  input  logic [15:0]         vcxo_ctrl,
  input  logic [15:0]         adc_vcxo_ctrl,
  input  logic [31:0]         mon [12],
  // converter diagnostics and flash programmer regions
  output logic                diag_wr, diag_rd,
  output logic [11:0]         diag_addr,
  input  logic [31:0]         diag_rdata,
  output logic                flash_wr, flash_rd,
  output logic [12:0]         flash_addr,
  input  logic [31:0]         flash_rdata,
  output logic [31:0]         bar_wdata,
  // ADC converter stream
  output logic                adc_sample,
  input  logic                adc_valid,
  input  logic [31:0]         adc_data [LANES],
  input  logic [LANES-1:0]    adc_ovf,
  // DAC converter stream
  output logic                dac_sample,
  output logic                dac_valid,
  output logic [31:0]         dac_data [LANES],
  output logic [LANES-1:0]    dac_ovf,
  // ADC DMA engine
  output logic                adc_dma_req_valid,
  output dma_desc_t           adc_dma_req,
  input  logic [1:0]          adc_dma_ready,
  input  logic [1:0]          adc_dma_done,
  input  logic                adc_rd_en,
  input  logic                adc_rd_half,
  input  logic [ADC_RW:0]     adc_rd_row,
  output logic [LANES*32-1:0] adc_rd_data,
  // DAC DMA engine
  output logic                dac_dma_req_valid,
  output dma_desc_t           dac_dma_req,
  input  logic [1:0]          dac_dma_ready,
  input  logic [1:0]          dac_dma_done,
  input  logic                dac_wr_en,
  input  logic                dac_wr_half,
  input  logic [DAC_RW:0]     dac_wr_row,
  input  logic [LANES*32-1:0] dac_wr_data,
  // filter engine coefficient port
  output logic [31:0]         filt_sel,
  input  logic                flt_rd,
  input  logic [LOG2_CYCLES-1:0] flt_cycle,
  output logic [63:0]         flt_coef,
  // interrupts and watchdog
  output logic                irq_adc_dma_done,
  output logic                irq_dac_dma_done,
  output logic                wd_trigger
);
  localparam int unsigned ADC_ROWS = (N_ADC + LANES - 1) / LANES;
  localparam int unsigned DAC_ROWS = (N_DAC + LANES - 1) / LANES;
  localparam int unsigned STEP_LOG2 = 32 - LOG2_CLK_HZ;
  localparam logic [7:0]  LOG2_LANE_BYTES = 8'($clog2(LANES * 4));

  // Supported rates (log2 Hz), reported at 0x050/0x054 and enforced by
  // the configuration check below.
  localparam int unsigned MAX_DMA_RATE = 16, MIN_DMA_RATE = 12,
                          MAX_SMP_RATE = 19, MIN_SMP_RATE = 12;

  // Largest oversampling (log2) whose sets fit a buffer half.  The time
  // stamp block is not stored in the buffer, so it does not count.
  function automatic logic [7:0] max_os_log2(int unsigned buf_bytes, int unsigned rows);
    int unsigned n;
    n = 0;
    while (((rows * LANES * 4) << (n + 1)) <= buf_bytes) n++;
    return 8'(n);
  endfunction

  localparam logic [31:0] CONV_DESC [16] = '{
    32'(N_ADC), 32'(N_DAC), 32'(N_ADC), 32'(N_DAC),
    {8'(MAX_DMA_RATE), 8'(MIN_DMA_RATE), 8'(MAX_SMP_RATE), 8'(MIN_SMP_RATE)},
    {8'(MAX_DMA_RATE), 8'(MIN_DMA_RATE), 8'(MAX_SMP_RATE), 8'(MIN_SMP_RATE)},
    {16'd15, 8'd19, max_os_log2(ADC_BUF_BYTES, ADC_ROWS)},
    {16'd2,  8'd19, max_os_log2(DAC_BUF_BYTES, DAC_ROWS)},
    32'(ADC_BUF_BYTES), 32'(DAC_BUF_BYTES),
    {16'd0, 11'd0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1},       // DACs and ADCs present
    {16'd0, 8'(MAX_LOG2_BUFS), 8'(LOG2_CLK_HZ)},
    {LOG2_LANE_BYTES, LOG2_LANE_BYTES, LOG2_LANE_BYTES, LOG2_LANE_BYTES},
    32'd0,
    AXI_CLK_HZ,
    32'd2                                              // DAC data delay (clocks)
  };
  localparam logic [31:0] FILT_CFG =
    {24'd0, 4'(($clog2(COEF_BYTES / 8)) - LOG2_CYCLES), 4'(LOG2_CYCLES)};

  // ------------------------------------------------------------ BAR0
  logic        ctrl_wr, ctrl_rd, coef_wr, coef_rd;
  logic [11:0] ctrl_addr;
  logic [12:0] coef_addr;
  logic [31:0] ctrl_rdata, coef_rdata;

  bar0_decoder u_bar (
    .clk, .rst_n, .req(bar_req), .rvalid(bar_rvalid), .rdata(bar_rdata),
    .ctrl_wr, .ctrl_rd, .ctrl_addr, .ctrl_rdata,
    .diag_wr, .diag_rd, .diag_addr, .diag_rdata,
    .flash_wr, .flash_rd, .flash_addr, .flash_rdata,
    .coef_wr, .coef_rd, .coef_addr, .coef_rdata,
    .wdata(bar_wdata));

  // ------------------------------------------------------------ time
  logic [31:0] sec, frac;
  gps_time_base #(.LOG2_CLK_HZ(LOG2_CLK_HZ)) u_time (
    .clk, .rst_n, .pps, .sec_in(gps_sec_in), .sec, .frac, .timing_ok);

  // ------------------------------------------------------------ registers
  conv_cfg_t   cfg;
  logic [31:0] setup [8];
  dma_chan_t   adc_chan [2];
  dma_chan_t   dac_chan [2];
  logic [31:0] timing_cfg, board_cfg, xadc_cfg;
  logic        wd_write, wd_monitor;
  logic [3:0]  adc_sticky;
  logic [5:0]  dac_sticky;
  logic [1:0]  adc_err_ready, adc_err_missing, dac_err_ready, dac_err_missing, dac_err_ts;
  logic        adc_dma_running, dac_dma_running, adc_running, dac_running;
  logic        adc_cfg_valid, dac_cfg_valid, adc_data_valid, dac_data_valid;

  ctrl_regs #(.CONV_DESC(CONV_DESC), .FILT_CFG(FILT_CFG)) u_regs (
    .clk, .rst_n, .wr(ctrl_wr), .rd(ctrl_rd), .addr(ctrl_addr), .wdata(bar_wdata),
    .rdata(ctrl_rdata), .sec, .frac, .timing_ok,
    .adc_dma_running, .adc_running, .adc_cfg_valid,
    .dac_dma_running, .dac_running, .dac_cfg_valid,
    .adc_err_ready, .adc_err_missing, .dac_err_ready, .dac_err_missing, .dac_err_ts,
    .node_addr, .vcxo_ctrl, .mon, .adc_vcxo_ctrl, .wd_trigger, .wd_monitor,
    .cfg, .setup, .adc_chan, .dac_chan, .filt_sel, .timing_cfg, .board_cfg, .xadc_cfg,
    .wd_write, .adc_err_sticky(adc_sticky), .dac_err_sticky(dac_sticky));

  // ------------------------------------------------------------ ticks
  logic [5:0] l2_adc_dma, l2_adc_smp, l2_dac_dma, l2_dac_smp;
  assign l2_adc_dma = log2_period(setup[S_ADC_DMA_PER]);
  assign l2_adc_smp = log2_period(setup[S_ADC_SMP_PER]);
  assign l2_dac_dma = log2_period(setup[S_DAC_DMA_PER]);
  assign l2_dac_smp = log2_period(setup[S_DAC_SMP_PER]);

  function automatic logic cfg_ok(logic [31:0] dma_m1, logic [31:0] smp_m1,
                                  int unsigned rows, int unsigned buf_bytes);
    logic [5:0] ld, ls;
    ld = log2_period(dma_m1);
    ls = log2_period(smp_m1);
    // A period of 2^p units is a rate of 2^(32-p) Hz.
    return is_pow2_m1(dma_m1) && is_pow2_m1(smp_m1) && (smp_m1 <= dma_m1) &&
           (ld >= 6'(32 - MAX_DMA_RATE)) && (ld <= 6'(32 - MIN_DMA_RATE)) &&
           (ls >= 6'(32 - MAX_SMP_RATE)) && (ls <= 6'(32 - MIN_SMP_RATE)) &&
           (((64'(rows) * LANES * 4) << (ld - ls)) <= 64'(buf_bytes));
  endfunction

  assign adc_cfg_valid = cfg_ok(setup[S_ADC_DMA_PER], setup[S_ADC_SMP_PER], ADC_ROWS, ADC_BUF_BYTES);
  assign dac_cfg_valid = cfg_ok(setup[S_DAC_DMA_PER], setup[S_DAC_SMP_PER], DAC_ROWS, DAC_BUF_BYTES);
  assign adc_running   = timing_ok && adc_cfg_valid && !cfg.adc_conv_disable;
  assign dac_running   = timing_ok && dac_cfg_valid && !cfg.dac_conv_disable;

  logic        adc_smp_tick, adc_dma_tick, dac_smp_tick, dac_dma_tick;
  logic [31:0] adc_smp_sec, adc_smp_frac, adc_smp_phase;
  logic [31:0] adc_dma_sec, adc_dma_frac, adc_dma_phase;
  logic [31:0] dac_smp_sec, dac_smp_frac, dac_smp_phase;
  logic [31:0] dac_dma_sec, dac_dma_frac, dac_dma_phase;

  period_tick_gen #(.STEP_LOG2(STEP_LOG2)) u_adc_smp (
    .clk, .rst_n, .en(adc_running), .sec, .frac,
    .period_m1(setup[S_ADC_SMP_PER]), .delay_m1(setup[S_ADC_SMP_DLY]),
    .tick(adc_smp_tick), .evt_sec(adc_smp_sec), .evt_frac(adc_smp_frac), .phase(adc_smp_phase));
  period_tick_gen #(.STEP_LOG2(STEP_LOG2)) u_adc_dma (
    .clk, .rst_n, .en(timing_ok && adc_cfg_valid && cfg.adc_dma_en), .sec, .frac,
    .period_m1(setup[S_ADC_DMA_PER]), .delay_m1(setup[S_ADC_DMA_DLY]),
    .tick(adc_dma_tick), .evt_sec(adc_dma_sec), .evt_frac(adc_dma_frac), .phase(adc_dma_phase));
  period_tick_gen #(.STEP_LOG2(STEP_LOG2)) u_dac_smp (
    .clk, .rst_n, .en(dac_running), .sec, .frac,
    .period_m1(setup[S_DAC_SMP_PER]), .delay_m1(setup[S_DAC_SMP_DLY] | 32'd1),
    .tick(dac_smp_tick), .evt_sec(dac_smp_sec), .evt_frac(dac_smp_frac), .phase(dac_smp_phase));
  period_tick_gen #(.STEP_LOG2(STEP_LOG2)) u_dac_dma (
    .clk, .rst_n, .en(timing_ok && dac_cfg_valid && cfg.dac_dma_en), .sec, .frac,
    .period_m1(setup[S_DAC_DMA_PER]), .delay_m1(setup[S_DAC_DMA_DLY]),
    .tick(dac_dma_tick), .evt_sec(dac_dma_sec), .evt_frac(dac_dma_frac), .phase(dac_dma_phase));

  assign adc_sample = adc_smp_tick;
  assign dac_sample = dac_smp_tick;

  // ------------------------------------------------------------ ADC DMA
  logic      adc_desc_valid, dac_desc_valid;
  dma_desc_t adc_desc, dac_desc;
  logic [MAX_LOG2_BUFS-1:0] adc_buf_idx, dac_buf_idx;
  logic [1:0] adc_busy, dac_busy;

  dma_buf_addr #(.MAX_LOG2_BUFS(MAX_LOG2_BUFS)) u_adc_addr (
    .clk, .rst_n, .tick(adc_dma_tick), .phase(adc_dma_phase), .log2_per(l2_adc_dma),
    .log2_bufs(cfg.adc_log2_bufs), .chan(adc_chan),
    .desc_valid(adc_desc_valid), .desc(adc_desc), .buf_idx(adc_buf_idx));

  dma_chan_ctrl u_adc_dma_ctl (
    .clk, .rst_n, .enable(cfg.adc_dma_en), .irq_en(cfg.adc_irq_en),
    .desc_valid(adc_desc_valid), .desc(adc_desc),
    .eng_ready(adc_dma_ready), .eng_done(adc_dma_done),
    .deadline(adc_desc_valid), .deadline_ch(~adc_desc.ch),
    .req_valid(adc_dma_req_valid), .req(adc_dma_req), .busy(adc_busy),
    .err_ready(adc_err_ready), .err_missing(adc_err_missing),
    .running(adc_dma_running), .done_irq(irq_adc_dma_done));

  logic [31:0] status_word;
  assign status_word = {2'b00, dac_sticky,
                        wd_monitor, 4'b0000, dac_data_valid, dac_dma_running, dac_running,
                        4'b0000, adc_sticky,
                        timing_ok, 4'b0000, adc_data_valid, adc_dma_running, adc_running};

  adc_frame_builder #(.N_CH(N_ADC), .LANES(LANES), .BUF_BYTES(ADC_BUF_BYTES)) u_adc_buf (
    .clk, .rst_n, .smp_tick(adc_smp_tick), .smp_sec(adc_smp_sec), .smp_frac(adc_smp_frac),
    .smp_per_m1(setup[S_ADC_SMP_PER]), .dma_dly_m1(setup[S_ADC_DMA_DLY]),
    .log2_dma_per(l2_adc_dma), .log2_smp_per(l2_adc_smp),
    .ts_disable(cfg.adc_ts_disable), .status_word,
    .adc_valid, .adc_data, .adc_ovf, .data_valid(adc_data_valid),
    .rd_en(adc_rd_en), .rd_half(adc_rd_half), .rd_row(adc_rd_row),
    .rd_len(adc_chan[adc_rd_half].len[27:0]), .rd_data(adc_rd_data));

  // ------------------------------------------------------------ DAC DMA
  logic       conv_start, conv_half;
  logic [31:0] dac_raw [LANES];

  dma_buf_addr #(.MAX_LOG2_BUFS(MAX_LOG2_BUFS)) u_dac_addr (
    .clk, .rst_n, .tick(dac_dma_tick), .phase(dac_dma_phase), .log2_per(l2_dac_dma),
    .log2_bufs(cfg.dac_log2_bufs), .chan(dac_chan),
    .desc_valid(dac_desc_valid), .desc(dac_desc), .buf_idx(dac_buf_idx));

  dma_chan_ctrl u_dac_dma_ctl (
    .clk, .rst_n, .enable(cfg.dac_dma_en), .irq_en(cfg.dac_irq_en),
    .desc_valid(dac_desc_valid), .desc(dac_desc),
    .eng_ready(dac_dma_ready), .eng_done(dac_dma_done),
    .deadline(conv_start), .deadline_ch(conv_half),
    .req_valid(dac_dma_req_valid), .req(dac_dma_req), .busy(dac_busy),
    .err_ready(dac_err_ready), .err_missing(dac_err_missing),
    .running(dac_dma_running), .done_irq(irq_dac_dma_done));

  dac_frame_reader #(.N_CH(N_DAC), .LANES(LANES), .BUF_BYTES(DAC_BUF_BYTES)) u_dac_buf (
    .clk, .rst_n, .wr_en(dac_wr_en), .wr_half(dac_wr_half), .wr_row(dac_wr_row),
    .wr_data(dac_wr_data), .conv_en(dac_running), .smp_tick(dac_smp_tick),
    .smp_sec(dac_smp_sec), .smp_frac(dac_smp_frac), .smp_per_m1(setup[S_DAC_SMP_PER]),
    .smp_dly_m1(setup[S_DAC_SMP_DLY]), .dma_dly_m1(setup[S_DAC_DMA_DLY]),
    .log2_dma_per(l2_dac_dma), .log2_smp_per(l2_dac_smp),
    .ts_disable(cfg.dac_ts_disable), .ts_ignore(cfg.dac_ts_ignore),
    .dac_valid, .dac_data(dac_raw), .data_valid(dac_data_valid),
    .conv_start, .conv_half, .ts_err(dac_err_ts));

  for (genvar l = 0; l < LANES; l++) begin : g_dac_lim
    range_limit #(.IN_W(32), .OUT_W(28)) u_lim (
      .din(dac_raw[l]), .dout(dac_data[l]), .ovf(dac_ovf[l]));
  end

  // ------------------------------------------------------------ filters
  coef_mem #(.MEM_BYTES(COEF_BYTES), .LOG2_CYCLES(LOG2_CYCLES)) u_coef (
    .clk, .host_wr(coef_wr), .host_rd(coef_rd), .host_word(coef_addr[12:2]),
    .host_wdata(bar_wdata), .host_rdata(coef_rdata),
    .flt_rd, .flt_sel(filt_sel[7:0]), .flt_cycle, .flt_coef);

  // ------------------------------------------------------------ watchdog
  watchdog #(.TIMEOUT_CLKS(WD_TIMEOUT)) u_wd (
    .clk, .rst_n, .host_wr(wd_write), .trigger(wd_trigger), .monitor(wd_monitor));
endmodule
