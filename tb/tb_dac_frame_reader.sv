// tb_dac_frame_reader: acts as the DMA engine and the DAC.  For each DMA
// window it writes the sets and the time stamp row into the buffer half of
// the window's parity, then issues the conversion ticks and compares the
// played-out rows with the model.  Covered: the document's 65536 Hz example
// (DMA on the PPS, conversion half-way), 4x oversampling, the extra DMA
// period selected by bit 0 of the sampling delay, time stamp errors with the
// data blanked, ignored and with time stamps disabled, and the conv_start
// deadline reported for each window.
module tb_dac_frame_reader;
  localparam int NC = 16, LANES = 4, BUF = 4096, ROWS = NC / 4;
  localparam int BROWS = BUF / 16, RW = $clog2(BROWS);
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_half = 0, conv_en = 1, smp_tick = 0, ts_disable = 0, ts_ignore = 0;
  logic [RW:0] wr_row = 0;
  logic [127:0] wr_data = 0;
  logic [31:0] smp_sec = 0, smp_frac = 0, smp_per_m1 = 0, smp_dly_m1 = 0, dma_dly_m1 = 0;
  logic [5:0] log2_dma_per = 16, log2_smp_per = 16;
  logic dac_valid, data_valid, conv_start, conv_half;
  logic [31:0] dac_data [LANES];
  logic [1:0] ts_err;
  int checks = 0, failures = 0, n_ts_err = 0, n_start = 0;
  always #5 clk = ~clk;

  dac_frame_reader #(.N_CH(NC), .LANES(LANES), .BUF_BYTES(BUF)) dut (.*);

  logic [127:0] model [2][BROWS];
  bit bad [2];

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_window(input bit h, input int os, input longint unsigned ts,
                              input bit corrupt);
    for (int r = 0; r <= os * ROWS; r++) begin
      logic [127:0] w;
      w = {$urandom, $urandom, $urandom, $urandom};
      if (r == os * ROWS) w = {64'h0, ts[63:32] ^ 32'(corrupt), ts[31:0]};
      else model[h][r] = w;
      wr_en = 1; wr_half = h; wr_row = (RW+1)'(r); wr_data = w;
      @(negedge clk);
    end
    wr_en = 0;
    bad[h] = corrupt;
  endtask

  task automatic run(input int lp_s, input int lp_d, input logic [31:0] sd_m1,
                     input logic [31:0] dd_m1, input int nconv, input int corrupt_every);
    longint unsigned ps, pd, sd, dd, t, t0;
    longint kk, klast;
    int os, slot, extra, win;
    bit h, exp_bad;
    ps = 1 << lp_s; pd = 1 << lp_d; os = 1 << (lp_d - lp_s);
    sd = (longint'(sd_m1 | 32'd1) + 1) & 64'hFFFF_FFFF;
    dd = (longint'(dd_m1) + 1) & 64'hFFFF_FFFF;
    extra = sd_m1[0] ? 0 : 1;
    smp_per_m1 = 32'(ps - 1); smp_dly_m1 = sd_m1; dma_dly_m1 = dd_m1;
    log2_smp_per = 6'(lp_s); log2_dma_per = 6'(lp_d);
    t0 = (64'd9 << 32) - 2 * pd + dd;                 // a DMA tick
    t0 = t0 + ((ps - ((t0 - sd) % ps)) % ps);         // first conversion after it
    klast = -100; win = 0; exp_bad = 0;
    for (int m = 0; m < nconv; m++) begin
      t = t0 + m * ps;
      kk = longint'((t - dd) >> lp_d) - extra;
      slot = int'(((t - dd) % pd) >> lp_s);
      h = kk[0];
      if (kk != klast) begin
        if (slot != 0) continue;                     // start on a full window
        win++;
        write_window(h, os, {t[63:32], t[31:0] & ~32'(ps - 1)},
                     corrupt_every != 0 && win % corrupt_every == 0);
        klast = kk;
      end
      smp_tick = 1; smp_sec = t[63:32]; smp_frac = t[31:0];
      @(negedge clk); smp_tick = 0;
      if (slot == 0) begin
        n_start++;
        chk(conv_start && conv_half == h, "deadline at the first set of a window");
        if (!ts_disable && bad[h]) begin
          n_ts_err++;
          chk(ts_err == (2'b01 << h), "time stamp error flagged");
        end else chk(ts_err == 0, "no time stamp error");
        exp_bad = !ts_disable && !ts_ignore && bad[h];
      end else chk(!conv_start, "no deadline inside a window");
      @(negedge clk);
      for (int b = 0; b < ROWS; b++) begin
        chk(dac_valid, "beat valid");
        for (int l = 0; l < LANES; l++)
          chk(dac_data[l] == (exp_bad ? 32'h0 : model[h][slot * ROWS + b][l*32 +: 32]),
              $sformatf("t=%h slot %0d beat %0d lane %0d", t, slot, b, l));
        chk(data_valid == !exp_bad, "DAC data valid status");
        @(negedge clk);
      end
      chk(!dac_valid, "set ends");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // DMA on the PPS, conversion half-way, no extra period
    run(16, 16, 32'h0000_7FFF, 32'hFFFF_FFFF, 12, 0);
    // the same with the extra DMA period (bit 0 of the sampling delay cleared)
    run(16, 16, 32'h0000_7FFE, 32'hFFFF_FFFF, 12, 0);
    // 4x oversampling, every third window with a wrong stamp
    run(14, 16, 32'h0000_1FFF, 32'h0000_0FFF, 60, 3);
    ts_ignore = 1;
    run(14, 16, 32'h0000_1FFE, 32'h0000_0FFF, 40, 2);
    ts_ignore = 0; ts_disable = 1;
    run(15, 16, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 20, 2);
    chk(n_ts_err > 0 && n_start > 0, "error and deadline cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
