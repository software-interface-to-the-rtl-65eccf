// tb_conv_top_single: second end-to-end run of the converter interface at
// its default size, with the simplest buffer arrangement.
//
// ADC: sampling and DMA at 2^16 Hz, samples on the PPS (delay 0xFFFFFFFF),
// DMA delay 0x3FF, and a converter that delivers each set 15 clocks after
// the sampling tick -- the board description's first example.  Both ADC
// DMA channels point at the same 192-byte host buffer with N = 0 (single
// buffering: 128 bytes of samples, 48 bytes of dummy words, 16-byte stamp
// block).  The modelled DMA engine starts reading two clocks after each
// request, so every transfer shows whether a 0x400 delay is enough for a
// 15-clock converter.
//
// DAC: 2^16 Hz conversion and DMA, DMA on the PPS, conversion half-way, but
// with bit 0 of the sampling delay written as 0 so that one more DMA period
// lies between a transfer and the conversion of its data.  Each set is
// compared at the converter with the host data of the DMA tick one period
// earlier.
//
// After the clean run the status register and both error counters must
// show no error.  Counted: ADC transfers per channel, sample sets, dummy
// words, stamps, DAC sets converted a period after their transfer.
module tb_conv_top_single;
  import conv_pkg::*;
  localparam int LANES = 4, NA = 32, AROWS = 8, DROWS = 4;
  localparam longint unsigned PD = 64'h1_0000, DD_A = 64'h400, SD_D = 64'h8000;
  localparam int ALEN = 192, DLEN = 80;
  localparam logic [63:0] A_BASE = 64'h0000_0003_0000_0000, D_BASE = 64'h0000_0004_0000_0000;

  logic clk = 0, rst_n = 0;
  always #7.45 clk = ~clk;   // ~67 MHz

  bar_req_t bar_req = '0;
  logic bar_rvalid;
  logic [31:0] bar_rdata, bar_wdata;
  logic pps = 0;
  logic [31:0] gps_sec_in = 0, node_addr = 32'h1100_0000;
  logic timing_ok;
  logic [15:0] vcxo_ctrl = 16'h8000, adc_vcxo_ctrl = 16'h8000;
  logic [31:0] mon [12];
  logic diag_wr, diag_rd, flash_wr, flash_rd;
  logic [11:0] diag_addr;
  logic [12:0] flash_addr;
  logic [31:0] diag_rdata = 0, flash_rdata = 0;
  logic adc_sample, adc_valid = 0;
  logic [31:0] adc_data [LANES];
  logic [LANES-1:0] adc_ovf = 0;
  logic dac_sample, dac_valid;
  logic [31:0] dac_data [LANES];
  logic [LANES-1:0] dac_ovf;
  logic adc_dma_req_valid, dac_dma_req_valid;
  dma_desc_t adc_dma_req, dac_dma_req;
  logic [1:0] adc_dma_ready = 2'b11, adc_dma_done = 0, dac_dma_ready = 2'b11, dac_dma_done = 0;
  logic adc_rd_en = 0, adc_rd_half = 0;
  logic [8:0] adc_rd_row = 0;
  logic [127:0] adc_rd_data;
  logic dac_wr_en = 0, dac_wr_half = 0;
  logic [8:0] dac_wr_row = 0;
  logic [127:0] dac_wr_data = 0;
  logic [31:0] filt_sel;
  logic flt_rd = 0;
  logic [5:0] flt_cycle = 0;
  logic [63:0] flt_coef;
  logic irq_adc_dma_done, irq_dac_dma_done, wd_trigger;

  conv_top dut (.*);

  int checks = 0, failures = 0;
  int n_xfer[2] = '{0, 0}, n_sets = 0, n_dummy = 0, n_stamp = 0, n_dac_sets = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  function automatic longint unsigned now();
    return {dut.sec, dut.frac};
  endfunction

  task automatic bar_wr(input logic [14:0] a, input logic [31:0] d);
    @(negedge clk); bar_req = '{wr: 1, rd: 0, addr: a, wdata: d};
    @(negedge clk); bar_req = '0;
  endtask
  task automatic bar_rd(input logic [14:0] a, output logic [31:0] d);
    @(negedge clk); bar_req = '{wr: 0, rd: 1, addr: a, wdata: 0};
    @(negedge clk); bar_req = '0; d = bar_rdata;
    chk(bar_rvalid, "read response");
  endtask

  // ------------------------------------------------------------ ADC model
  function automatic logic [31:0] adc_val(longint unsigned t, int c);
    return 32'(t >> 16) * 32'h0001_0007 + 32'(c * 3);
  endfunction

  // the set is complete 15 clocks after the sampling tick
  always @(posedge clk) begin
    if (rst_n && adc_sample) begin
      automatic longint unsigned t = now() & ~(PD - 1);
      fork
        begin
          repeat (15 - AROWS) @(negedge clk);
          for (int b = 0; b < AROWS; b++) begin
            adc_valid = 1;
            for (int l = 0; l < LANES; l++) adc_data[l] = adc_val(t, b * 4 + l);
            adc_ovf = (b == 4) ? 4'b0010 : 4'b0000;   // channel 17 always limited
            @(negedge clk);
          end
          adc_valid = 0; adc_ovf = 0;
        end
      join_none
    end
  end

  // ------------------------------------------------------------ DMA engine
  logic [31:0] host [longint unsigned];
  bit checking = 0;

  task automatic adc_transfer(input dma_desc_t d, input longint unsigned tk);
    longint unsigned t0;
    bit ok;
    logic [31:0] st;
    repeat (2) @(negedge clk);
    for (int r = 0; r < int'(d.len) / 16; r++) begin
      adc_rd_en = 1; adc_rd_half = d.ch; adc_rd_row = 9'(r);
      @(negedge clk);
      for (int w = 0; w < 4; w++) host[d.addr + 64'(r * 16 + w * 4)] = adc_rd_data[w*32 +: 32];
    end
    adc_rd_en = 0;
    adc_dma_done[d.ch] = 1; @(negedge clk); adc_dma_done = 0;
    if (!checking) return;
    t0 = tk - DD_A;                       // the sample on the preceding PPS grid point
    chk(d.addr == A_BASE && 32'(d.len) == ALEN, $sformatf("single buffer descriptor %h %0d", d.addr, d.len));
    chk(d.ch == 1'((tk >> 16) & 1), "even/odd channel");
    ok = 1;
    for (int c = 0; c < NA; c++) if (host[A_BASE + 64'(c * 4)] !== adc_val(t0, c)) ok = 0;
    chk(ok, $sformatf("ADC set at %h", t0)); n_sets++;
    for (int w = 32; w < 44; w++) begin
      chk(host[A_BASE + 64'(w * 4)] == 0, "dummy word"); n_dummy++;
    end
    chk(host[A_BASE + 176] == t0[31:0] && host[A_BASE + 180] == t0[63:32], "time stamp");
    st = host[A_BASE + 184];
    chk(st[7] && st[2:0] == 3'b111 && st[15:8] == 0, $sformatf("status word %h", st));
    chk(host[A_BASE + 188] == 32'h0002_0000, "overflow word");
    n_stamp++;
    n_xfer[d.ch]++;
  endtask

  always @(posedge clk) begin
    if (rst_n && adc_dma_req_valid) begin
      automatic dma_desc_t d = adc_dma_req;
      automatic longint unsigned tk = ((now() - DD_A) & ~(PD - 1)) + DD_A;
      fork adc_transfer(d, tk); join_none
    end
  end

  // DAC host data sent at DMA tick k, converted one DMA period later
  function automatic logic [31:0] dac_val(longint unsigned k, int c);
    return 32'((k & 64'hFFFF) << 8) | 32'(c);   // within the 28-bit range
  endfunction

  task automatic dac_transfer(input dma_desc_t d, input longint unsigned tk);
    longint unsigned k, stamp;
    k = tk >> 16;
    stamp = (tk + PD + SD_D) & ~(PD - 1);   // bits below the sampling period are zero
    repeat (5) @(negedge clk);
    for (int r = 0; r <= DROWS; r++) begin
      dac_wr_en = 1; dac_wr_half = d.ch; dac_wr_row = 9'(r);
      if (r < DROWS)
        for (int l = 0; l < 4; l++) dac_wr_data[l*32 +: 32] = dac_val(k, r * 4 + l);
      else dac_wr_data = {64'h0, stamp[63:32], stamp[31:0]};
      @(negedge clk);
    end
    dac_wr_en = 0;
    dac_dma_done[d.ch] = 1; @(negedge clk); dac_dma_done = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && dac_dma_req_valid) begin
      automatic dma_desc_t d = dac_dma_req;
      automatic longint unsigned tk = now() & ~(PD - 1);
      if (checking) chk(d.addr == D_BASE + 64'(d.ch) * DLEN && 32'(d.len) == DLEN, "DAC descriptor");
      fork dac_transfer(d, tk); join_none
    end
  end

  always @(posedge clk) begin
    if (dac_sample && checking) begin
      automatic longint unsigned m = (now() - SD_D) >> 16;
      fork
        begin
          automatic bit ok = 1;
          @(negedge clk); @(negedge clk);
          for (int b = 0; b < DROWS; b++) begin
            for (int l = 0; l < 4; l++)
              if (!dac_valid || dac_data[l] != dac_val(m - 1, b * 4 + l)) ok = 0;
            @(negedge clk);
          end
          chk(ok, $sformatf("DAC set of window %0d from the transfer one period earlier", m));
          n_dac_sets++;
        end
      join_none
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #1_600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    for (int i = 0; i < 12; i++) mon[i] = 0;
    for (int l = 0; l < LANES; l++) adc_data[l] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // both ADC channels on one buffer, DAC double buffered
    bar_wr(15'h00C0, A_BASE[31:0]); bar_wr(15'h00C4, A_BASE[63:32]);
    bar_wr(15'h00C8, ALEN);         bar_wr(15'h00CC, 0);
    bar_wr(15'h00D0, A_BASE[31:0]); bar_wr(15'h00D4, A_BASE[63:32]);
    bar_wr(15'h00D8, ALEN);         bar_wr(15'h00DC, 0);
    bar_wr(15'h00E0, D_BASE[31:0]);        bar_wr(15'h00E4, D_BASE[63:32]);
    bar_wr(15'h00E8, DLEN);                bar_wr(15'h00EC, 0);
    bar_wr(15'h00F0, D_BASE[31:0] + DLEN); bar_wr(15'h00F4, D_BASE[63:32]);
    bar_wr(15'h00F8, DLEN);                bar_wr(15'h00FC, 0);
    bar_wr(15'h0020, 32'h0000_FFFF); bar_wr(15'h0024, 32'h0000_03FF);
    bar_wr(15'h0028, 32'hFFFF_FFFF); bar_wr(15'h002C, 32'h0000_FFFF);
    bar_wr(15'h0030, 32'h0000_FFFF); bar_wr(15'h0034, 32'hFFFF_FFFF);
    bar_wr(15'h0038, 32'h0000_7FFE); bar_wr(15'h003C, 32'h0000_FFFF);
    bar_rd(15'h0010, st);
    chk(st[2] && st[18], "sampling configurations valid");
    // two aligned PPS
    @(negedge clk); pps = 1; gps_sec_in = 1_400_000_000; @(negedge clk); pps = 0;
    repeat ((1 << 26) - 1) @(negedge clk);
    pps = 1; gps_sec_in = 1_400_000_001; @(negedge clk); pps = 0;
    @(negedge clk);
    chk(timing_ok, "timing OK after aligned PPS");
    // enable ADC and DAC DMA, N = 0, no interrupts
    bar_wr(15'h0014, 32'h0001_0001);
    repeat (4 * 1024) @(negedge clk);
    bar_rd(15'h0010, st);                  // clear start-up errors
    bar_wr(15'h0018, 0); bar_wr(15'h001C, 0);
    checking = 1;
    repeat (12 * 1024) @(negedge clk);
    bar_rd(15'h0010, st);
    chk(st[15:8] == 0 && st[31:24] == 0, $sformatf("no errors in a clean run: %h", st));
    chk(st[1:0] == 2'b11 && st[17:16] == 2'b11, "ADC and DAC running");
    bar_rd(15'h0018, st); chk(st == 0, "ADC error counter");
    bar_rd(15'h001C, st); chk(st == 0, "DAC error counter");
    checking = 0;
    repeat (64) @(negedge clk);
    chk(n_xfer[0] >= 4 && n_xfer[1] >= 4, "transfers on both channels into one buffer");
    chk(n_sets >= 8 && n_dummy > 0 && n_stamp >= 8, "sets, dummy words, stamps");
    chk(n_dac_sets >= 8, "DAC sets with the extra DMA period");
    $display("mechanisms: xfer=%0d/%0d sets=%0d dummy=%0d stamps=%0d dac_sets=%0d",
             n_xfer[0], n_xfer[1], n_sets, n_dummy, n_stamp, n_dac_sets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
