// coef_mem: filter coefficient memory.
//
// An 8 kB memory (MEM_BYTES) of 64-bit filter coefficients.  The host reads
// and writes it as 32-bit words through BAR0 (offset 0x4000 of the board's
// region); word 2i is the low half and word 2i+1 the high half of
// coefficient i.  The filter engine reads one 64-bit coefficient per clock.
// A filter uses 2^LOG2_CYCLES coefficients (one per filter cycle) and the
// memory holds 2^LOG2_FILTERS such filters back to back, each aligned to
// its own size, so coefficient c of filter f is at index f*2^LOG2_CYCLES+c.
// The filter selection byte picks f; its unused upper bits are ignored.
//
// The 64-bit coefficient width, cycles-times-8-bytes sizing and the example
// configuration (64 cycles, 16 filters in 8 kB) follow the board
// description; the low-half-first word order is this design's choice.
//
// Timing: host read data and filter coefficients are valid one clock after
// their requests.
module coef_mem #(
  parameter int unsigned MEM_BYTES     = 8192,
  parameter int unsigned LOG2_CYCLES   = 6,
  localparam int unsigned WORDS        = MEM_BYTES / 8,
  localparam int unsigned LOG2_FILTERS = $clog2(WORDS) - LOG2_CYCLES,
  localparam int unsigned AW           = $clog2(WORDS)
) (
  input  logic                   clk,
  // host side
  input  logic                   host_wr,
  input  logic                   host_rd,
  input  logic [AW:0]            host_word,   // 32-bit word index
  input  logic [31:0]            host_wdata,
  output logic [31:0]            host_rdata,
  // filter side
  input  logic                   flt_rd,
  input  logic [7:0]             flt_sel,
  input  logic [LOG2_CYCLES-1:0] flt_cycle,
  output logic [63:0]            flt_coef
);
  logic [31:0] lo [WORDS];
  logic [31:0] hi [WORDS];

  logic [AW-1:0] host_idx, flt_idx;
  assign host_idx = host_word[AW:1];
  assign flt_idx  = AW'({flt_sel[LOG2_FILTERS-1:0], flt_cycle});

  always_ff @(posedge clk) begin
    if (host_wr && !host_word[0]) lo[host_idx] <= host_wdata;
    if (host_wr &&  host_word[0]) hi[host_idx] <= host_wdata;
    if (host_rd) host_rdata <= host_word[0] ? hi[host_idx] : lo[host_idx];
    if (flt_rd)  flt_coef   <= {hi[flt_idx], lo[flt_idx]};
  end
endmodule
