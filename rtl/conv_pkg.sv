// conv_pkg: types and constants shared by the converter-board interface.
//
// Holds the host bus request type used on BAR0 (single 32-bit reads and
// writes, read data one clock later), the register offsets of the control
// block, the bit layout of the sampling configuration register and the
// helper functions that turn a "period - 1" register value into its base-2
// logarithm.  The register offsets and bit positions follow the board's
// register map; the bus signalling itself is this design's choice.
package conv_pkg;

  // ---------------------------------------------------------------- bus
  localparam int unsigned BAR_AW = 15;  // 32 kB BAR0 region

  typedef struct packed {
    logic              wr;     // one-cycle write strobe
    logic              rd;     // one-cycle read strobe, data next cycle
    logic [BAR_AW-1:0] addr;   // byte address, 32-bit aligned
    logic [31:0]       wdata;
  } bar_req_t;

  // ----------------------------------------------------- register offsets
  localparam logic [11:0] R_FRAC      = 12'h000;
  localparam logic [11:0] R_GPSSEC    = 12'h004;
  localparam logic [11:0] R_GSTAT     = 12'h008;
  localparam logic [11:0] R_FWREL     = 12'h00C;
  localparam logic [11:0] R_STATUS    = 12'h010;
  localparam logic [11:0] R_CONFIG    = 12'h014;
  localparam logic [11:0] R_ADC_ECNT  = 12'h018;
  localparam logic [11:0] R_DAC_ECNT  = 12'h01C;
  localparam logic [11:0] R_SETUP     = 12'h020;  // 8 words, 0x020..0x03C
  localparam logic [11:0] R_CONVDESC  = 12'h040;  // read-only, 0x040..0x07C
  localparam logic [11:0] R_FILTCFG   = 12'h080;
  localparam logic [11:0] R_FILTSEL   = 12'h090;
  localparam logic [11:0] R_DMA       = 12'h0C0;  // 16 words, 0x0C0..0x0FC
  localparam logic [11:0] R_ATCFG     = 12'h130;
  localparam logic [11:0] R_NODE      = 12'h134;
  localparam logic [11:0] R_ATSTAT    = 12'h138;
  localparam logic [11:0] R_BOARDID   = 12'h140;
  localparam logic [11:0] R_SWID      = 12'h144;
  localparam logic [11:0] R_VCXO      = 12'h148;
  localparam logic [11:0] R_BOARDCFG  = 12'h180;
  localparam logic [11:0] R_XADCCFG   = 12'h184;
  localparam logic [11:0] R_MON       = 12'h188;  // 12 words, 0x188..0x1B4
  localparam logic [11:0] R_ADCVCXO   = 12'h1F8;
  localparam logic [11:0] R_WDOG      = 12'h1FC;

  // Sampling setup words (index into the 8 words at 0x020).
  localparam int unsigned S_ADC_DMA_PER = 0, S_ADC_DMA_DLY = 1,
                          S_ADC_SMP_DLY = 2, S_ADC_SMP_PER = 3,
                          S_DAC_DMA_PER = 4, S_DAC_DMA_DLY = 5,
                          S_DAC_SMP_DLY = 6, S_DAC_SMP_PER = 7;

  // ------------------------------------------- configuration register 0x014
  typedef struct packed {
    logic [7:0] dac_log2_bufs;   // 31:24
    logic       dac_irq_en;      // 23
    logic [2:0] unused22_20;     // 22:20
    logic       dac_ts_ignore;   // 19
    logic       dac_ts_disable;  // 18
    logic       dac_conv_disable;// 17
    logic       dac_dma_en;      // 16
    logic [7:0] adc_log2_bufs;   // 15:8
    logic       adc_irq_en;      // 7
    logic [3:0] unused6_3;       // 6:3
    logic       adc_ts_disable;  // 2
    logic       adc_conv_disable;// 1
    logic       adc_dma_en;      // 0
  } conv_cfg_t;

  // One DMA channel as set up by four registers.
  typedef struct packed {
    logic [63:0] addr;
    logic [31:0] len;
    logic [31:0] offset;
  } dma_chan_t;

  // A request handed to the DMA engine.
  typedef struct packed {
    logic        ch;     // 0 = even ticks, 1 = odd ticks
    logic [63:0] addr;   // host address of the buffer
    logic [27:0] len;    // bytes
  } dma_desc_t;

  // Error pulses of one direction.
  typedef struct packed {
    logic [1:0] ts;      // DAC only: time stamp mismatch per channel
    logic [1:0] missing; // transfer not finished in time per channel
    logic [1:0] ready;   // engine not ready at the DMA tick per channel
  } dma_err_t;

  // ---------------------------------------------------------- helpers
  // log2 of (period_m1 + 1) for a period that is a power of two: the
  // number of one bits of period_m1.
  function automatic logic [5:0] log2_period(input logic [31:0] period_m1);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < 32; i++) n += 6'(period_m1[i]);
    return n;
  endfunction

  // True when period_m1 has the form 2^k - 1.
  function automatic logic is_pow2_m1(input logic [31:0] period_m1);
    return ((period_m1 + 32'd1) & period_m1) == 32'd0;
  endfunction

endpackage
