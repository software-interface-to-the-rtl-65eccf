// bar0_decoder: BAR0 address map of the converter board.
//
// The board's 32 kB BAR0 region is split into four blocks: control and
// monitor registers at 0x0000 (4 kB), converter diagnostics at 0x1000
// (4 kB), the flash programmer at 0x2000 (8 kB) and the filter coefficient
// memory at 0x4000 (8 kB).  0x6000-0x7FFF is unassigned.  Every access is a
// single 32-bit read or write.  The decoder forwards the strobes to the one
// block the address falls into, together with the address local to that
// block, and returns that block's read data.  Reads of unassigned addresses
// return zero and writes there are dropped, as the board specifies.
//
// Timing: each block returns read data one clock after its read strobe;
// rvalid/rdata follow req.rd by one clock.
module bar0_decoder
  import conv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bar_req_t    req,
  output logic        rvalid,
  output logic [31:0] rdata,
  // control and monitor registers
  output logic        ctrl_wr, ctrl_rd,
  output logic [11:0] ctrl_addr,
  input  logic [31:0] ctrl_rdata,
  // converter diagnostics
  output logic        diag_wr, diag_rd,
  output logic [11:0] diag_addr,
  input  logic [31:0] diag_rdata,
  // flash programmer
  output logic        flash_wr, flash_rd,
  output logic [12:0] flash_addr,
  input  logic [31:0] flash_rdata,
  // filter coefficient memory
  output logic        coef_wr, coef_rd,
  output logic [12:0] coef_addr,
  input  logic [31:0] coef_rdata,
  output logic [31:0] wdata
);
  typedef enum logic [2:0] {REG_NONE, REG_CTRL, REG_DIAG, REG_FLASH, REG_COEF} region_e;

  region_e region, rd_region;

  always_comb begin
    unique case (req.addr[14:12])
      3'd0:       region = REG_CTRL;
      3'd1:       region = REG_DIAG;
      3'd2, 3'd3: region = REG_FLASH;
      3'd4, 3'd5: region = REG_COEF;
      default:    region = REG_NONE;
    endcase
  end

  assign ctrl_wr    = req.wr && region == REG_CTRL;
  assign ctrl_rd    = req.rd && region == REG_CTRL;
  assign diag_wr    = req.wr && region == REG_DIAG;
  assign diag_rd    = req.rd && region == REG_DIAG;
  assign flash_wr   = req.wr && region == REG_FLASH;
  assign flash_rd   = req.rd && region == REG_FLASH;
  assign coef_wr    = req.wr && region == REG_COEF;
  assign coef_rd    = req.rd && region == REG_COEF;
  assign ctrl_addr  = {req.addr[11:2], 2'b00};
  assign diag_addr  = {req.addr[11:2], 2'b00};
  assign flash_addr = {req.addr[12:2], 2'b00};
  assign coef_addr  = {req.addr[12:2], 2'b00};
  assign wdata      = req.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid    <= 1'b0;
      rd_region <= REG_NONE;
    end else begin
      rvalid    <= req.rd;
      rd_region <= region;
    end
  end

  always_comb begin
    unique case (rd_region)
      REG_CTRL:  rdata = ctrl_rdata;
      REG_DIAG:  rdata = diag_rdata;
      REG_FLASH: rdata = flash_rdata;
      REG_COEF:  rdata = coef_rdata;
      default:   rdata = '0;
    endcase
  end

  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(req.wr && req.rd));
endmodule
