// tb_ctrl_regs: host-side test of the control register block: read/write of
// every read-write register, read-only and unassigned addresses, the GPS
// seconds latch, clear-on-read sticky error bits (including an error that
// arrives on the clearing read), the late/missing DMA error counters, the
// watchdog write strobe and the DMA channel fields derived from the
// registers.
module tb_ctrl_regs;
  import conv_pkg::*;
  localparam logic [31:0] DESC [16] = '{32'h40, 32'h44, 32'h48, 32'h4C, 32'h50, 32'h54,
      32'h58, 32'h5C, 32'h60, 32'h64, 32'h68, 32'h6C, 32'h70, 32'h74, 32'h78, 32'h7C};
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [11:0] addr = 0;
  logic [31:0] wdata = 0, rdata, sec = 0, frac = 0;
  logic timing_ok = 1;
  logic adc_dma_running = 1, adc_running = 0, adc_cfg_valid = 1;
  logic dac_dma_running = 0, dac_running = 1, dac_cfg_valid = 0;
  logic [1:0] adc_err_ready = 0, adc_err_missing = 0, dac_err_ready = 0, dac_err_missing = 0, dac_err_ts = 0;
  logic [31:0] node_addr = 32'h1300_0000, mon [12];
  logic [15:0] vcxo_ctrl = 16'h1234, adc_vcxo_ctrl = 16'h5678;
  logic wd_trigger = 1, wd_monitor = 1;
  conv_cfg_t cfg;
  logic [31:0] setup [8];
  dma_chan_t adc_chan [2];
  dma_chan_t dac_chan [2];
  logic [31:0] filt_sel, timing_cfg, board_cfg, xadc_cfg;
  logic wd_write;
  logic [3:0] adc_err_sticky;
  logic [5:0] dac_err_sticky;
  int checks = 0, failures = 0, wd_writes = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (wd_write) wd_writes++;

  ctrl_regs #(.CONV_DESC(DESC), .FILT_CFG(32'h0000_0046)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr32(input logic [11:0] a, input logic [31:0] d);
    addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  task automatic rd32(input logic [11:0] a, output logic [31:0] d);
    addr = a; rd = 1; @(negedge clk); rd = 0; d = rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, model [1024];
    logic [11:0] rw_addrs [$];
    for (int i = 0; i < 12; i++) mon[i] = 32'hA000_0000 + i;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // read-write registers
    rw_addrs = '{12'h014, 12'h020, 12'h024, 12'h028, 12'h02C, 12'h030, 12'h034, 12'h038,
                 12'h03C, 12'h090, 12'h130, 12'h180, 12'h184};
    for (int i = 0; i < 16; i++) rw_addrs.push_back(12'h0C0 + 12'(4 * i));
    foreach (rw_addrs[i]) begin
      rd32(rw_addrs[i], d);
      chk(d == 0, $sformatf("reset value of %h", rw_addrs[i]));
    end
    foreach (rw_addrs[i]) begin
      model[rw_addrs[i] >> 2] = $urandom;
      wr32(rw_addrs[i], model[rw_addrs[i] >> 2]);
    end
    foreach (rw_addrs[i]) begin
      rd32(rw_addrs[i], d);
      chk(d == model[rw_addrs[i] >> 2], $sformatf("read back %h", rw_addrs[i]));
    end
    chk(cfg == model[5] && setup[7] == model[15] && filt_sel == model[36], "outputs follow registers");
    for (int c = 0; c < 2; c++) begin
      chk(adc_chan[c].addr == {model[48 + 4*c + 1], model[48 + 4*c]}, "ADC address");
      chk(adc_chan[c].len == {4'h0, model[48 + 4*c + 2][27:0]}, "ADC length 28 bits");
      chk(dac_chan[c].offset == model[56 + 4*c + 3], "DAC offset");
    end
    // read-only and unassigned
    for (int i = 0; i < 16; i++) begin
      wr32(12'h040 + 12'(4 * i), 32'hFFFF_FFFF);
      rd32(12'h040 + 12'(4 * i), d);
      chk(d == DESC[i], "read-only description");
    end
    rd32(12'h080, d); chk(d == 32'h46, "filter configuration");
    for (int i = 0; i < 50; i++) begin
      logic [11:0] a;
      a = 12'h200 + 12'(4 * ($urandom % 384));
      wr32(a, $urandom); rd32(a, d);
      chk(d == 0, "unassigned reads zero");
    end
    rd32(12'h13C, d); chk(d == 0, "0x13C unused");
    rd32(12'h00C, d); chk(d != 0, "firmware release non-zero");
    rd32(12'h008, d); chk(d == 32'h8000_0000, "global status timing OK");
    rd32(12'h134, d); chk(d == node_addr, "node address");
    rd32(12'h138, d); chk(d[21] && d[26:24] == 3'd1 && d[20:0] == 0, "timing status");
    rd32(12'h148, d); chk(d == 32'h1234, "VCXO");
    rd32(12'h1F8, d); chk(d == 32'h5678, "ADC VCXO");
    for (int i = 0; i < 12; i++) begin
      rd32(12'h188 + 12'(4 * i), d); chk(d == 32'hA000_0000 + i, "monitor words");
    end
    // time latch
    frac = 32'h1111_2222; sec = 32'd100;
    rd32(12'h000, d); chk(d == 32'h1111_2222, "fraction");
    sec = 32'd101;
    rd32(12'h004, d); chk(d == 32'd100, "seconds latched by fraction read");
    rd32(12'h000, d); rd32(12'h004, d); chk(d == 32'd101, "relatch");
    // sticky errors
    rd32(12'h010, d);
    chk(d == {2'b0, 6'b0, 1'b1, 4'b0, 1'b0, 1'b1, 1'b0, 4'b0, 4'b0, 1'b1, 4'b0, 1'b1, 1'b0, 1'b1},
        $sformatf("status without errors %h", d));
    adc_err_ready = 2'b01; dac_err_ts = 2'b10; @(negedge clk);
    adc_err_ready = 0; dac_err_ts = 0;
    adc_err_missing = 2'b10; @(negedge clk); adc_err_missing = 0;
    repeat (3) @(negedge clk);
    chk(adc_err_sticky == 4'b1001 && dac_err_sticky == 6'b100000, "sticky outputs");
    rd32(12'h010, d);
    chk(d[11:8] == 4'b1001 && d[29:24] == 6'b100000, "sticky bits readable");
    rd32(12'h010, d);
    chk(d[11:8] == 0 && d[29:24] == 0, "cleared by read");
    // error on the clearing read is kept
    dac_err_missing = 2'b01; dac_err_ready = 2'b10; wdata = 0;
    addr = 12'h010; rd = 1; @(negedge clk); rd = 0; dac_err_missing = 0; dac_err_ready = 0;
    rd32(12'h010, d);
    chk(d[29:24] == 6'b000110, "error during clearing read kept");
    // error counters
    for (int i = 0; i < 7; i++) begin adc_err_missing = 2'b11; @(negedge clk); end
    adc_err_missing = 0;
    for (int i = 0; i < 3; i++) begin dac_err_missing = 2'b01; @(negedge clk); dac_err_missing = 0; @(negedge clk); end
    dac_err_missing = 0;
    rd32(12'h018, d); chk(d == 8, $sformatf("ADC error count %0d", d));
    rd32(12'h01C, d); chk(d == 4, $sformatf("DAC error count %0d", d));
    wr32(12'h018, 32'h5); rd32(12'h018, d); chk(d == 0, "ADC counter cleared by write");
    rd32(12'h01C, d); chk(d == 4, "DAC counter kept");
    // watchdog
    wd_writes = 0;
    wr32(12'h1FC, 32'h0); wr32(12'h1FC, 32'h0); @(negedge clk);
    chk(wd_writes == 2, "watchdog strobes");
    rd32(12'h1FC, d); chk(d == 32'h3, "watchdog readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
