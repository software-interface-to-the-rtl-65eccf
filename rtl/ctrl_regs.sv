// ctrl_regs: control and monitor registers (BAR0 0x0000-0x0FFF).
//
// All registers are 32 bits wide.  Reads of unassigned addresses return
// zero; writes to unassigned or read-only addresses are dropped.
//
//   0x000  GPS fraction (2^-32 s); reading it latches the GPS seconds
//   0x004  GPS seconds latched by the last read of 0x000
//   0x008  global status, bit 31 = timing OK
//   0x00C  firmware release (non-zero)
//   0x010  sampling status; error bits are sticky and cleared by the read
//   0x014  sampling configuration (see conv_pkg::conv_cfg_t)
//   0x018  ADC / 0x01C DAC late-or-missing DMA error counter; a write clears
//   0x020-0x03C  ADC/DAC DMA and sampling period and delay (value - 1)
//   0x040-0x07C  read-only converter description (CONV_DESC)
//   0x080  filter configuration (read-only), 0x090 filter selection
//   0x0C0-0x0DC  ADC DMA channels 0/1: address lo/hi, length, offset
//   0x0E0-0x0FC  DAC DMA channels 0/1: address lo/hi, length, offset
//   0x130  timing configuration, 0x134 node address, 0x138 timing status,
//   0x140  board ID, 0x144 software ID, 0x148 VCXO control voltage
//   0x180  board configuration, 0x184 XADC configuration
//   0x188-0x1B4  board, XADC and supply monitor words (inputs)
//   0x1F8  ADC VCXO control voltage, 0x1FC watchdog (write toggles)
//
// The map and bit positions follow the board's register description.  The
// sticky bits capture error pulses from the DMA supervisors; a pulse that
// arrives on the clock of the clearing read is kept.  The error counters
// count missing-data errors of either channel.  The contents of the
// read-only description words are parameters whose defaults describe this
// design's configuration.  In the status register, bits 23 and 7 mirror the
// watchdog monitor and timing OK as specified.
//
// Timing: rdata is valid one clock after rd; writes take effect on the
// clock after wr.
module ctrl_regs
  import conv_pkg::*;
#(
  parameter logic [31:0] FW_RELEASE  = 32'h0000_0001,
  parameter logic [31:0] CONV_DESC [16] = '{default: 32'h0},
  parameter logic [31:0] FILT_CFG    = 32'h0000_0046,
  parameter logic [2:0]  LINK_VER    = 3'd1,
  parameter logic [31:0] BOARD_ID    = 32'h0000_0001,
  parameter logic [31:0] SW_ID       = 32'h0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  // host access
  input  logic        wr,
  input  logic        rd,
  input  logic [11:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // time
  input  logic [31:0] sec,
  input  logic [31:0] frac,
  input  logic        timing_ok,
  // state of the sampling logic
  input  logic        adc_dma_running,
  input  logic        adc_running,
  input  logic        adc_cfg_valid,
  input  logic        dac_dma_running,
  input  logic        dac_running,
  input  logic        dac_cfg_valid,
  input  logic [1:0]  adc_err_ready,
  input  logic [1:0]  adc_err_missing,
  input  logic [1:0]  dac_err_ready,
  input  logic [1:0]  dac_err_missing,
  input  logic [1:0]  dac_err_ts,
  // monitors
  input  logic [31:0] node_addr,
  input  logic [15:0] vcxo_ctrl,
  input  logic [31:0] mon [12],
  input  logic [15:0] adc_vcxo_ctrl,
  input  logic        wd_trigger,
  input  logic        wd_monitor,
  // settings
  output conv_cfg_t   cfg,
  output logic [31:0] setup [8],
  output dma_chan_t   adc_chan [2],
  output dma_chan_t   dac_chan [2],
  output logic [31:0] filt_sel,
  output logic [31:0] timing_cfg,
  output logic [31:0] board_cfg,
  output logic [31:0] xadc_cfg,
  output logic        wd_write,
  output logic [3:0]  adc_err_sticky,   // {missing[1:0], ready[1:0]}
  output logic [5:0]  dac_err_sticky    // {ts[1:0], missing[1:0], ready[1:0]}
);
  logic [31:0] sec_latch;
  logic [31:0] adc_ecnt, dac_ecnt;
  logic [31:0] dma_regs [16];
  logic [31:0] rd_val;

  logic [3:0] adc_new;
  logic [5:0] dac_new;
  assign adc_new = {adc_err_missing, adc_err_ready};
  assign dac_new = {dac_err_ts, dac_err_missing, dac_err_ready};

  for (genvar c = 0; c < 2; c++) begin : g_chan
    assign adc_chan[c] = '{addr:   {dma_regs[4*c+1], dma_regs[4*c]},
                           len:    {4'h0, dma_regs[4*c+2][27:0]},
                           offset: dma_regs[4*c+3]};
    assign dac_chan[c] = '{addr:   {dma_regs[8+4*c+1], dma_regs[8+4*c]},
                           len:    {4'h0, dma_regs[8+4*c+2][27:0]},
                           offset: dma_regs[8+4*c+3]};
  end

  logic [31:0] status_word;
  assign status_word = {2'b00, dac_err_sticky, wd_monitor, 4'b0000,
                        dac_cfg_valid, dac_running, dac_dma_running,
                        4'b0000, adc_err_sticky, timing_ok, 4'b0000,
                        adc_cfg_valid, adc_running, adc_dma_running};

  always_comb begin
    rd_val = '0;
    if (addr >= R_SETUP && addr < R_CONVDESC)
      rd_val = setup[addr[4:2]];
    else if (addr >= R_CONVDESC && addr < R_FILTCFG)
      rd_val = CONV_DESC[addr[5:2]];
    else if (addr >= R_DMA && addr < 12'h100)
      rd_val = dma_regs[addr[5:2]];
    else if (addr >= R_MON && addr < 12'h1B8)
      rd_val = mon[4'((addr - R_MON) >> 2)];
    else begin
      unique case (addr)
        R_FRAC:     rd_val = frac;
        R_GPSSEC:   rd_val = sec_latch;
        R_GSTAT:    rd_val = {timing_ok, 31'b0};
        R_FWREL:    rd_val = FW_RELEASE;
        R_STATUS:   rd_val = status_word;
        R_CONFIG:   rd_val = cfg;
        R_ADC_ECNT: rd_val = adc_ecnt;
        R_DAC_ECNT: rd_val = dac_ecnt;
        R_FILTCFG:  rd_val = FILT_CFG;
        R_FILTSEL:  rd_val = filt_sel;
        R_ATCFG:    rd_val = timing_cfg;
        R_NODE:     rd_val = node_addr;
        R_ATSTAT:   rd_val = {5'b0, LINK_VER, 2'b00, 1'b1, 21'b0};
        R_BOARDID:  rd_val = BOARD_ID;
        R_SWID:     rd_val = SW_ID;
        R_VCXO:     rd_val = {16'h0, vcxo_ctrl};
        R_BOARDCFG: rd_val = board_cfg;
        R_XADCCFG:  rd_val = xadc_cfg;
        R_ADCVCXO:  rd_val = {16'h0, adc_vcxo_ctrl};
        R_WDOG:     rd_val = {30'b0, wd_monitor, wd_trigger};
        default:    rd_val = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata          <= '0;
      sec_latch      <= '0;
      cfg            <= '0;
      adc_ecnt       <= '0;
      dac_ecnt       <= '0;
      filt_sel       <= '0;
      timing_cfg     <= '0;
      board_cfg      <= '0;
      xadc_cfg       <= '0;
      wd_write       <= 1'b0;
      adc_err_sticky <= '0;
      dac_err_sticky <= '0;
      for (int i = 0; i < 8; i++)  setup[i]    <= '0;
      for (int i = 0; i < 16; i++) dma_regs[i] <= '0;
    end else begin
      wd_write <= 1'b0;
      // ---- reads
      if (rd) begin
        rdata <= rd_val;
        if (addr == R_FRAC) sec_latch <= sec;
      end
      // ---- sticky errors, cleared by reading the status register
      if (rd && addr == R_STATUS) begin
        adc_err_sticky <= adc_new;
        dac_err_sticky <= dac_new;
      end else begin
        adc_err_sticky <= adc_err_sticky | adc_new;
        dac_err_sticky <= dac_err_sticky | dac_new;
      end
      // ---- error counters
      if (wr && addr == R_ADC_ECNT)   adc_ecnt <= '0;
      else if (adc_err_missing != 0)  adc_ecnt <= adc_ecnt + 32'd1;
      if (wr && addr == R_DAC_ECNT)   dac_ecnt <= '0;
      else if (dac_err_missing != 0)  dac_ecnt <= dac_ecnt + 32'd1;
      // ---- writes
      if (wr) begin
        if (addr >= R_SETUP && addr < R_CONVDESC) setup[addr[4:2]] <= wdata;
        if (addr >= R_DMA && addr < 12'h100)      dma_regs[addr[5:2]] <= wdata;
        unique case (addr)
          R_CONFIG:   cfg        <= wdata;
          R_FILTSEL:  filt_sel   <= wdata;
          R_ATCFG:    timing_cfg <= wdata;
          R_BOARDCFG: board_cfg  <= wdata;
          R_XADCCFG:  xadc_cfg   <= wdata;
          R_WDOG:     wd_write   <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd));
endmodule
