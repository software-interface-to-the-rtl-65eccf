// tb_adc_frame_builder: feeds sample sets through the ADC DMA buffer and
// reads every transfer back as the DMA engine would, comparing each row with
// an independent model of the host buffer layout: sample sets in order,
// dummy lanes for a channel count that is not a multiple of four, dummy rows
// up to the cache-line length, and the time stamp / status / overflow block
// in the last row.  Configurations: the single-sample 144 -> 192 byte
// buffer, 8x oversampling (1088 bytes), 32x oversampling that fills a
// whole buffer half (4160 bytes), all with the DMA delays of the
// document's examples, and a run with the time stamp disabled.  Samples
// arrive in beats with random gaps.
module tb_adc_frame_builder;
  localparam int NC = 30, LANES = 4, BUF = 4096, ROWS = (NC + 3) / 4;
  localparam int BROWS = BUF / 16, RW = $clog2(BROWS);
  logic clk = 0, rst_n = 0;
  logic smp_tick = 0, ts_disable = 0, adc_valid = 0, data_valid, rd_en = 0, rd_half = 0;
  logic [31:0] smp_sec = 0, smp_frac = 0, smp_per_m1 = 0, dma_dly_m1 = 0, status_word = 0;
  logic [5:0] log2_dma_per = 16, log2_smp_per = 16;
  logic [31:0] adc_data [LANES];
  logic [LANES-1:0] adc_ovf = 0;
  logic [RW:0] rd_row = 0;
  logic [27:0] rd_len = 0;
  logic [127:0] rd_data;
  int checks = 0, failures = 0, stamps = 0, dummies = 0;
  always #5 clk = ~clk;

  adc_frame_builder #(.N_CH(NC), .LANES(LANES), .BUF_BYTES(BUF)) dut (.*);

  logic [127:0] model [2][BROWS];
  logic [31:0]  m_sec [2], m_frac [2], m_ovf [2];

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reads a whole transfer of `len` bytes from half h and compares it.
  task automatic read_back(input bit h, input int len, input int data_rows);
    logic [31:0] st;
    st = $urandom; status_word = st;
    rd_len = 28'(len);
    for (int r = 0; r < len / 16; r++) begin
      logic [127:0] exp;
      rd_en = 1; rd_half = h; rd_row = (RW+1)'(r);
      @(negedge clk); rd_en = 0;
      if (r < data_rows) exp = model[h][r];
      else if (r == len / 16 - 1 && !ts_disable) begin
        exp = {m_ovf[h], st, m_sec[h], m_frac[h]}; stamps++;
      end else begin
        exp = '0; dummies++;
      end
      chk(rd_data == exp, $sformatf("half %0d row %0d: %h vs %h", h, r, rd_data, exp));
    end
  endtask

  // Runs `nwin` DMA windows of samples for the given set-up.
  task automatic run(input int lp_s, input int lp_d, input logic [31:0] ds_m1,
                     input logic [31:0] dd_m1, input int len, input int nwin);
    longint unsigned ps, pd, ds, dd, t, t0;
    longint k, kprev;
    int os, slot, row;
    bit h;
    ps = 1 << lp_s; pd = 1 << lp_d; os = 1 << (lp_d - lp_s);
    ds = (longint'(ds_m1) + 1) & 64'hFFFF_FFFF; dd = (longint'(dd_m1) + 1) & 64'hFFFF_FFFF;
    smp_per_m1 = 32'(ps - 1); dma_dly_m1 = dd_m1;
    log2_smp_per = 6'(lp_s); log2_dma_per = 6'(lp_d);
    // first sampling time at or after 5 s - 3 DMA periods
    t0 = (64'd5 << 32) - 3 * pd;
    t0 = t0 + ((ps - ((t0 - ds) % ps)) % ps);
    kprev = -1;
    for (int j = 0; j < nwin * os + 1; j++) begin
      t = t0 + j * ps;
      k = longint'((t - dd) >> lp_d) + 1;     // DMA tick that sends it
      if (kprev >= 0 && k != kprev && j > os) read_back(kprev[0], len, os * ROWS);
      kprev = k;
      if (j == nwin * os) break;
      h = k[0];
      slot = int'(((t - dd) % pd) >> lp_s);
      // tick
      smp_tick = 1; smp_sec = t[63:32]; smp_frac = t[31:0];
      @(negedge clk); smp_tick = 0;
      if (slot == 0) begin
        m_sec[h] = t[63:32]; m_frac[h] = t[31:0] & ~32'(ps - 1); m_ovf[h] = 0;
      end
      for (int b = 0; b < ROWS; b++) begin
        logic [127:0] w;
        repeat ($urandom % 3) @(negedge clk);
        adc_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          adc_data[l] = $urandom;
          adc_ovf[l]  = ($urandom % 16) == 0;
          w[l*32 +: 32] = (b * 4 + l < NC) ? adc_data[l] : 32'h0;
          if (b * 4 + l < NC && adc_ovf[l]) m_ovf[h][(b * 4 + l) % 32] = 1'b1;
        end
        row = slot * ROWS + b;
        model[h][row] = w;
        @(negedge clk); adc_valid = 0;
      end
      chk(data_valid, "data valid after a full set");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LANES; l++) adc_data[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 65536 Hz sampling and DMA, samples on the PPS, DMA 0x400 later: 192 bytes
    run(16, 16, 32'hFFFF_FFFF, 32'h0000_03FF, 192, 6);
    // 8x oversampling, DMA half-way: 1088 bytes
    run(13, 16, 32'hFFFF_FFFF, 32'h0000_7FFF, 1088, 5);
    // 32x oversampling fills a whole half; the stamp row lies beyond it
    run(11, 16, 32'hFFFF_FFFF, 32'h0000_7FFF, 4160, 3);
    // sampling delay not aligned to the period, time stamp disabled
    ts_disable = 1;
    run(14, 16, 32'h0000_0123, 32'h0000_9FFF, 576, 4);
    chk(stamps > 0 && dummies > 0, "stamp and dummy rows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
