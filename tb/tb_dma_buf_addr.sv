// tb_dma_buf_addr: checks the host buffer chosen for each DMA tick.  First
// the three arrangements of the buffer examples (single buffer, double
// buffer, four-buffer ring with N = 1 and offset = 2 x length) are walked
// tick by tick against the expected addresses; then random channel set-ups,
// periods, buffer counts (including counts above the supported maximum) and
// tick counts are compared with a reference formula.
module tb_dma_buf_addr;
  import conv_pkg::*;
  localparam int MAXB = 4;
  logic clk = 0, rst_n = 0, tick = 0, desc_valid;
  logic [31:0] phase = 0;
  logic [5:0]  log2_per = 16;
  logic [7:0]  log2_bufs = 0;
  dma_chan_t   chan [2];
  dma_desc_t   desc;
  logic [MAXB-1:0] buf_idx;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_buf_addr #(.MAX_LOG2_BUFS(MAXB)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_tick(input logic [31:0] k, output dma_desc_t d);
    phase = k << log2_per; tick = 1;
    @(negedge clk); tick = 0;
    chk(desc_valid, "descriptor follows tick");
    d = desc;
    @(negedge clk);
    chk(!desc_valid, "one descriptor per tick");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dma_desc_t d;
    logic [63:0] A;
    logic [31:0] L;
    chan[0] = '0; chan[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    A = 64'h0000_0012_3450_0000; L = 32'd192;
    // single buffer: both channels at the same address
    chan[0] = '{addr: A, len: L, offset: 0}; chan[1] = chan[0]; log2_bufs = 0;
    for (int k = 0; k < 6; k++) begin
      do_tick(k, d);
      chk(d.addr == A && d.ch == k[0] && d.len == 28'(L), "single buffer");
    end
    // double buffer: second channel one buffer higher
    chan[1].addr = A + L;
    for (int k = 0; k < 6; k++) begin
      do_tick(k, d);
      chk(d.addr == A + (k % 2) * L && d.ch == k[0], "double buffer");
    end
    // ring of four: N = 1, offset twice the length
    chan[0].offset = 2 * L; chan[1].offset = 2 * L; log2_bufs = 1;
    for (int k = 0; k < 12; k++) begin
      do_tick(k, d);
      chk(d.addr == A + (k % 4) * L, $sformatf("ring tick %0d addr %h", k, d.addr));
    end
    // random
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] k, idx;
      int nb;
      for (int c = 0; c < 2; c++)
        chan[c] = '{addr: {$urandom, $urandom}, len: $urandom, offset: $urandom};
      log2_per  = 6'(6 + $urandom % 20);
      log2_bufs = 8'($urandom % 7);
      k = $urandom >> log2_per;
      do_tick(k, d);
      nb = (log2_bufs > MAXB) ? MAXB : log2_bufs;
      idx = (k >> 1) & ((1 << nb) - 1);
      chk(d.ch == k[0], "channel");
      chk(d.addr == chan[k[0]].addr + 64'(idx) * 64'(chan[k[0]].offset), "address");
      chk(d.len == chan[k[0]].len[27:0], "length");
      chk(32'(buf_idx) == idx, "buffer index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
