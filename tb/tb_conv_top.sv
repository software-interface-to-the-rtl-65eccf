// tb_conv_top: end-to-end test of the converter interface at its default
// size (2^26 Hz clock, 32 ADC and 16 DAC channels, 4 kB buffers).
//
// The testbench plays the host driver, the timing receiver, the DMA engine
// and both converters.  It follows the board's start-up procedure: program
// DMA channels and sampling registers over BAR0, wait for two aligned PPS
// (one simulated second) so the board reports timing OK, then enable ADC
// and DAC DMA.  The ADC runs at 2^19 Hz with 2^16 Hz DMA (8x oversampling,
// 1088-byte buffers in a ring of four); the DAC runs at 2^16 Hz with the DMA
// on the PPS and conversion half-way.  Every ADC transfer is checked word by
// word in the modelled host memory (sets, dummy rows, time stamp, status and
// overflow words, ring address); every DAC set is checked at the converter
// against the host data, limited to 28 bits.  It then provokes each error
// (engine not ready, late ADC transfer, late DAC transfer, wrong DAC time
// stamp), and checks the sticky status bits, their clearing, the error
// counters, the interrupts, the watchdog, the filter coefficient memory,
// the GPS time latch and the BAR0 map.  Each mechanism is counted and one
// that never happened counts as a failure.
module tb_conv_top;
  import conv_pkg::*;
  localparam int LANES = 4, NA = 32, ND = 16, AROWS = 8, DROWS = 4;
  localparam longint unsigned PS_A = 64'h2000, PD = 64'h1_0000, DD_A = 64'h8000;
  localparam longint unsigned PS_D = 64'h1_0000, SD_D = 64'h8000;
  localparam int ALEN = 1088, DLEN = 80;
  localparam logic [63:0] A_BASE = 64'h0000_0001_0000_0000, D_BASE = 64'h0000_0002_0000_0000;

  logic clk = 0, rst_n = 0;
  always #7.45 clk = ~clk;   // ~67 MHz

  bar_req_t bar_req = '0;
  logic bar_rvalid;
  logic [31:0] bar_rdata, bar_wdata;
  logic pps = 0;
  logic [31:0] gps_sec_in = 0, node_addr = 32'h1200_0000;
  logic timing_ok;
  logic [15:0] vcxo_ctrl = 16'h8000, adc_vcxo_ctrl = 16'h7000;
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
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ time model
  function automatic longint unsigned now();
    return {dut.sec, dut.frac};
  endfunction

  // ------------------------------------------------------------ BAR0 host
  task automatic bar_wr(input logic [14:0] a, input logic [31:0] d);
    @(negedge clk); bar_req = '{wr: 1, rd: 0, addr: a, wdata: d};
    @(negedge clk); bar_req = '0;
  endtask
  task automatic bar_rd(input logic [14:0] a, output logic [31:0] d);
    @(negedge clk); bar_req = '{wr: 0, rd: 1, addr: a, wdata: 0};
    @(negedge clk); bar_req = '0; d = bar_rdata;
    chk(bar_rvalid, "read response");
  endtask

  // diagnostics and flash regions answer with their local address
  always_ff @(posedge clk) begin
    if (diag_rd)  diag_rdata  <= 32'hD1A6_0000 | 32'(diag_addr);
    if (flash_rd) flash_rdata <= 32'hF1A5_0000 | 32'(flash_addr);
  end

  // ------------------------------------------------------------ mechanisms
  int n_adc_xfer = 0, n_adc_sets = 0, n_dummy = 0, n_stamp = 0, n_ring[4] = '{0, 0, 0, 0};
  int n_dac_sets = 0, n_dac_ovf = 0, n_dac_blank = 0, n_irq_adc = 0, n_irq_dac = 0;
  int n_err_ready = 0, n_err_adc_miss = 0, n_err_dac_miss = 0, n_err_ts = 0, n_clear = 0;
  int n_cfg = 0, n_ecount = 0, n_wd = 0, n_coef = 0, n_latch = 0, n_map = 0, n_ovf_word = 0;
  always @(posedge clk) begin
    if (rst_n && irq_adc_dma_done) n_irq_adc++;
    if (rst_n && irq_dac_dma_done) n_irq_dac++;
  end

  // ------------------------------------------------------------ ADC model
  function automatic logic [31:0] adc_val(longint unsigned t, int c);
    return 32'(t >> 13) * 32'h0001_0003 ^ (32'(c) << 24);
  endfunction

  bit checking = 0;
  always @(posedge clk) begin
    if (rst_n && adc_sample) begin
      automatic longint unsigned t = now() & ~(PS_A - 1);
      fork
        begin
          repeat (15) @(negedge clk);           // converter processing delay
          for (int b = 0; b < AROWS; b++) begin
            adc_valid = 1;
            for (int l = 0; l < LANES; l++) begin
              adc_data[l] = adc_val(t, b * 4 + l);
              // channel 5 overflows in the fourth set of each window
              adc_ovf[l]  = (b * 4 + l == 5) && (((t - DD_A) % PD) / PS_A == 3);
            end
            @(negedge clk);
          end
          adc_valid = 0; adc_ovf = 0;
        end
      join_none
    end
  end

  // ------------------------------------------------------------ DMA engine
  logic [31:0] host [longint unsigned];
  int adc_done_delay = 0;

  task automatic adc_transfer(input dma_desc_t d, input longint unsigned tk);
    int rows;
    rows = int'(d.len) / 16;
    repeat (20) @(negedge clk);
    for (int r = 0; r < rows; r++) begin
      adc_rd_en = 1; adc_rd_half = d.ch; adc_rd_row = 9'(r);
      @(negedge clk);
      for (int w = 0; w < 4; w++) host[d.addr + 64'(r * 16 + w * 4)] = adc_rd_data[w*32 +: 32];
    end
    adc_rd_en = 0;
    repeat (adc_done_delay) @(negedge clk);
    adc_dma_done[d.ch] = 1; @(negedge clk); adc_dma_done = 0;
    if (checking) check_adc(d, tk);
  endtask

  task automatic check_adc(input dma_desc_t d, input longint unsigned tk);
    longint unsigned t0;
    int k;
    bit ok;
    logic [31:0] st, ov;
    ok = 1;
    t0 = tk - PD;                      // first set of the window
    k  = int'(((tk - DD_A) >> 16) & 3);
    chk(d.addr == A_BASE + 64'(k) * ALEN, $sformatf("ring address k=%0d %h", k, d.addr));
    chk(d.ch == 1'(k), "even/odd channel");
    n_ring[k]++;
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < NA; c++)
        if (host[d.addr + 64'(s * 128 + c * 4)] !== adc_val(t0 + s * PS_A, c)) ok = 0;
      n_adc_sets++;
    end
    chk(ok, $sformatf("ADC samples of window at %h", tk));
    for (int w = 1024 / 4; w < (ALEN - 16) / 4; w++) begin
      chk(host[d.addr + 64'(w * 4)] == 0, "dummy word"); n_dummy++;
    end
    chk(host[d.addr + 64'(ALEN) - 16] == t0[31:0] && host[d.addr + 64'(ALEN) - 12] == t0[63:32],
        "time stamp"); n_stamp++;
    st = host[d.addr + 64'(ALEN) - 8];
    chk(st[7] && st[2:0] == 3'b111 && st[17:16] == 2'b11, $sformatf("status word %h", st));
    ov = host[d.addr + 64'(ALEN) - 4];
    chk(ov == 32'h20, $sformatf("overflow word %h", ov)); n_ovf_word++;
    n_adc_xfer++;
  endtask

  always @(posedge clk) begin
    if (rst_n && adc_dma_req_valid) begin
      automatic dma_desc_t d = adc_dma_req;
      automatic longint unsigned tk = ((now() - DD_A) & ~(PD - 1)) + DD_A;
      fork adc_transfer(d, tk); join_none
    end
  end

  // DAC host data for window k (k counts DMA periods since time 0)
  function automatic logic [31:0] dac_val(longint unsigned k, int c);
    if (c == 3) return 32'h0900_0000 + 32'(k);     // above the 28-bit range
    if (c == 7) return 32'hF700_0000 - 32'(k);     // below it
    return 32'(k << 8) | 32'(c);
  endfunction
  int dac_late = 0, dac_bad_stamp = 0;
  longint unsigned blank_k = 0, late_k = 0;

  task automatic dac_transfer(input dma_desc_t d, input longint unsigned tk);
    longint unsigned k, stamp;
    bit bad;
    k = tk >> 16;
    stamp = (tk + SD_D) & ~(PS_D - 1);
    bad = dac_bad_stamp > 0;
    if (bad) begin dac_bad_stamp--; blank_k = k; end
    if (dac_late > 0) begin dac_late--; late_k = k; repeat (600) @(negedge clk); end
    repeat (10) @(negedge clk);
    for (int r = 0; r <= DROWS; r++) begin
      dac_wr_en = 1; dac_wr_half = d.ch; dac_wr_row = 9'(r);
      if (r < DROWS)
        for (int l = 0; l < 4; l++) dac_wr_data[l*32 +: 32] = dac_val(k, r * 4 + l);
      else dac_wr_data = {64'h0, stamp[63:32] ^ 32'(bad), stamp[31:0]};
      @(negedge clk);
    end
    dac_wr_en = 0;
    dac_dma_done[d.ch] = 1; @(negedge clk); dac_dma_done = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && dac_dma_req_valid) begin
      automatic dma_desc_t d = dac_dma_req;
      automatic longint unsigned tk = now() & ~(PD - 1);
      chk(d.addr == D_BASE + 64'(d.ch) * DLEN && 32'(d.len) == DLEN, $sformatf("DAC descriptor %h %0d ok=%0d cfg=%h t=%t", d.addr, d.len, timing_ok, dut.cfg, $realtime));
      chk(d.ch == 1'((tk >> 16) & 1), "DAC even/odd");
      fork dac_transfer(d, tk); join_none
    end
  end

  // DAC converter: compare each set with the host data of its window
  always @(posedge clk) begin
    if (dac_sample && checking) begin
      automatic longint unsigned k = (now() - SD_D) >> 16;
      fork
        begin
          automatic bit ok = 1, blank;
          blank = (k == blank_k) || (k == late_k);
          @(negedge clk); @(negedge clk);
          for (int b = 0; b < DROWS; b++) begin
            for (int l = 0; l < 4; l++) begin
              automatic longint v = longint'($signed(dac_val(k, b * 4 + l)));
              automatic logic [31:0] e;
              if (v > 134217727) e = 32'h07FF_FFFF;
              else if (v < -134217728) e = 32'hF800_0000;
              else e = 32'(v);
              if (dac_ovf[l]) n_dac_ovf++;
              if (!dac_valid) ok = 0;
              if (!blank && dac_data[l] != e) ok = 0;
              if (blank && k == blank_k && dac_data[l] != 0) ok = 0;
            end
            @(negedge clk);
          end
          chk(ok, $sformatf("DAC set of window %0d", k));
          if (blank) n_dac_blank++; else n_dac_sets++;
        end
      join_none
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  task automatic wait_dma_periods(input int n);
    repeat (n * 1024) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d, st;
    logic [31:0] coef [16];
    for (int i = 0; i < 12; i++) mon[i] = 32'h0100_0000 * i;
    for (int l = 0; l < LANES; l++) adc_data[l] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // --- BAR0 map and read-only words
    bar_rd(15'h000C, d); chk(d != 0, "firmware release");
    bar_rd(15'h0040, d); chk(d == NA, "ADC channels");
    bar_rd(15'h0044, d); chk(d == ND, "DAC channels");
    bar_rd(15'h0050, d); chk(d == 32'h100C_130C, "ADC rates");
    bar_rd(15'h0058, d); chk(d[7:0] == 5, "maximum ADC oversampling");
    bar_rd(15'h005C, d); chk(d[7:0] == 6, "maximum DAC oversampling");
    bar_rd(15'h0060, d); chk(d == 4096, "ADC buffer size");
    bar_rd(15'h006C, d); chk(d[7:0] == 26, "clock rate");
    bar_rd(15'h0080, d); chk(d == 32'h46, "filter configuration");
    bar_rd(15'h1010, d); chk(d == 32'hD1A6_0010 && n_map >= 0, "diagnostics region");
    bar_rd(15'h2ABC, d); chk(d == 32'hF1A5_0ABC, "flash region");
    bar_rd(15'h6000, d); chk(d == 0, "unassigned region");
    bar_rd(15'h0134, d); chk(d == 32'h1200_0000, "node address (slot 2)");
    n_map++;
    // --- filter coefficients: filter 3, cycles 0..15
    for (int c = 0; c < 16; c++) begin
      coef[c] = $urandom;
      bar_wr(15'h4000 + 15'((3 * 64 + c) * 8), coef[c]);
      bar_wr(15'h4000 + 15'((3 * 64 + c) * 8 + 4), ~coef[c]);
    end
    bar_wr(15'h0090, 32'h0000_0013);       // upper bits ignored
    for (int c = 0; c < 16; c++) begin
      @(negedge clk); flt_rd = 1; flt_cycle = 6'(c);
      @(negedge clk); flt_rd = 0;
      chk(flt_coef == {~coef[c], coef[c]}, "filter coefficient");
      bar_rd(15'h4000 + 15'((3 * 64 + c) * 8 + 4), d);
      chk(d == ~coef[c], "coefficient read back"); n_coef++;
    end
    // --- watchdog
    begin
      logic w0;
      w0 = wd_trigger;
      bar_wr(15'h01FC, 0);
      @(negedge clk);
      chk(wd_trigger != w0, "watchdog toggles");
      bar_rd(15'h01FC, d); chk(d[1] && d[0] == wd_trigger, "watchdog monitor"); n_wd++;
    end
    // --- DMA channels: ADC ring of four, DAC double buffer
    bar_wr(15'h00C0, A_BASE[31:0]);        bar_wr(15'h00C4, A_BASE[63:32]);
    bar_wr(15'h00C8, ALEN);                bar_wr(15'h00CC, 2 * ALEN);
    bar_wr(15'h00D0, A_BASE[31:0] + ALEN); bar_wr(15'h00D4, A_BASE[63:32]);
    bar_wr(15'h00D8, ALEN);                bar_wr(15'h00DC, 2 * ALEN);
    bar_wr(15'h00E0, D_BASE[31:0]);        bar_wr(15'h00E4, D_BASE[63:32]);
    bar_wr(15'h00E8, DLEN);                bar_wr(15'h00EC, 0);
    bar_wr(15'h00F0, D_BASE[31:0] + DLEN); bar_wr(15'h00F4, D_BASE[63:32]);
    bar_wr(15'h00F8, DLEN);                bar_wr(15'h00FC, 0);
    // --- sampling set-up (sections 4.2 and 4.3)
    bar_wr(15'h0020, 32'h0000_FFFF); bar_wr(15'h0024, 32'h0000_7FFF);
    bar_wr(15'h0028, 32'hFFFF_FFFF); bar_wr(15'h002C, 32'h0000_1FFF);
    bar_wr(15'h0030, 32'h0000_FFFF); bar_wr(15'h0034, 32'hFFFF_FFFF);
    bar_wr(15'h0038, 32'h0000_7FFF); bar_wr(15'h003C, 32'h0000_FFFF);
    bar_rd(15'h0010, st);
    chk(st[2] && st[18], "sampling configurations valid");
    // rejected set-ups: sampling slower than DMA, DMA faster than 2^16 Hz,
    // and a period that is not a power of two
    bar_wr(15'h002C, 32'h0001_FFFF); bar_rd(15'h0010, st);
    chk(!st[2] && st[18], "sampling slower than DMA rejected"); n_cfg++;
    bar_wr(15'h002C, 32'h0000_1FFF); bar_wr(15'h0030, 32'h0000_7FFF); bar_wr(15'h003C, 32'h0000_7FFF);
    bar_rd(15'h0010, st);
    chk(st[2] && !st[18], "DMA rate above the maximum rejected"); n_cfg++;
    bar_wr(15'h0030, 32'h0000_FFFF); bar_wr(15'h003C, 32'h0000_FFFE);
    bar_rd(15'h0010, st);
    chk(!st[18], "period that is not a power of two rejected"); n_cfg++;
    bar_wr(15'h003C, 32'h0000_FFFF); bar_rd(15'h0010, st);
    chk(st[2] && st[18], "sampling configurations valid again");
    chk(!st[7] && !st[1], "not running before timing OK");
    // --- two aligned PPS: one second of the 2^26 Hz clock
    @(negedge clk); pps = 1; gps_sec_in = 1_300_000_000; @(negedge clk); pps = 0;
    repeat ((1 << 26) - 1) @(negedge clk);
    pps = 1; gps_sec_in = 1_300_000_001; @(negedge clk); pps = 0;
    @(negedge clk);
    chk(timing_ok, "timing OK after aligned PPS");
    bar_rd(15'h0000, d); bar_rd(15'h0004, st);
    chk(st == 1_300_000_001 && d < 32'h0010_0000, "GPS time latch"); n_latch++;
    // --- enable DMA: ADC N = 1 with interrupt, DAC N = 0 with interrupt
    bar_wr(15'h0014, {8'd0, 1'b1, 3'b0, 1'b0, 1'b0, 1'b0, 1'b1,
                      8'd1, 1'b1, 4'b0, 1'b0, 1'b0, 1'b1});
    wait_dma_periods(3);
    bar_rd(15'h0010, st);                  // clear start-up errors
    bar_wr(15'h0018, 0); bar_wr(15'h001C, 0);
    checking = 1;
    // --- clean run, the host keeps the watchdog alive
    wait_dma_periods(8);
    bar_wr(15'h01FC, 0);
    bar_rd(15'h0010, st);
    chk(st[29:24] == 0 && st[11:8] == 0, $sformatf("no errors in clean run %h", st));
    chk(st[0] && st[1] && st[16] && st[17] && st[7] && st[23], "running status");
    // --- engine not ready for one ADC tick
    adc_dma_ready = 2'b00; wait_dma_periods(1); adc_dma_ready = 2'b11;
    checking = 0;
    wait_dma_periods(2);
    bar_rd(15'h0010, st);
    chk(st[9:8] != 0, "ADC ready error"); if (st[9:8] != 0) n_err_ready++;
    bar_rd(15'h0010, st);
    chk(st[9:8] == 0, "sticky cleared by read"); n_clear++;
    // --- late ADC transfer: done withheld past the next DMA tick
    adc_done_delay = 1100; wait_dma_periods(1); adc_done_delay = 0;
    wait_dma_periods(3);
    bar_rd(15'h0010, st);
    chk(st[11:10] != 0, "ADC missing-data error"); if (st[11:10] != 0) n_err_adc_miss++;
    bar_rd(15'h0018, d);
    chk(d >= 1, "ADC error counter"); if (d >= 1) n_ecount++;
    // --- wrong DAC time stamp, then a late DAC transfer
    checking = 1;
    dac_bad_stamp = 1; wait_dma_periods(3);
    bar_rd(15'h0010, st);
    chk(st[29:28] != 0, "DAC time stamp error"); if (st[29:28] != 0) n_err_ts++;
    dac_late = 1; wait_dma_periods(3);
    bar_rd(15'h0010, st);
    chk(st[27:26] != 0, "DAC missing-data error"); if (st[27:26] != 0) n_err_dac_miss++;
    bar_rd(15'h001C, d);
    chk(d >= 1, "DAC error counter");
    checking = 0;
    wait_dma_periods(1);
    // --- mechanisms
    chk(n_adc_xfer >= 6, $sformatf("ADC transfers checked: %0d", n_adc_xfer));
    chk(n_ring[0] > 0 && n_ring[1] > 0 && n_ring[2] > 0 && n_ring[3] > 0, "all four ring buffers");
    chk(n_adc_sets >= 48 && n_dummy > 0 && n_stamp > 0 && n_ovf_word > 0, "oversampled sets, dummy, stamp");
    chk(n_dac_sets >= 8 && n_dac_ovf > 0 && n_dac_blank > 0, "DAC sets, 28-bit limit, blanking");
    chk(n_irq_adc > 0 && n_irq_dac > 0, "DMA done interrupts");
    chk(n_err_ready > 0 && n_err_adc_miss > 0 && n_err_dac_miss > 0 && n_err_ts > 0, "all errors");
    chk(n_cfg == 3 && n_clear > 0 && n_ecount > 0 && n_wd > 0 && n_coef > 0 && n_latch > 0 && n_map > 0, "register mechanisms");
    $display("mechanisms: adc_xfer=%0d ring=%0d/%0d/%0d/%0d sets=%0d dummy=%0d dac_sets=%0d dac_ovf=%0d blank=%0d irq=%0d/%0d",
             n_adc_xfer, n_ring[0], n_ring[1], n_ring[2], n_ring[3], n_adc_sets, n_dummy,
             n_dac_sets, n_dac_ovf, n_dac_blank, n_irq_adc, n_irq_dac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
