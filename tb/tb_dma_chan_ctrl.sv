// tb_dma_chan_ctrl: drives descriptors, engine ready/done and deadlines at
// random and compares every output with a cycle-level reference: a request
// is passed on only when the DMA is enabled and the engine is ready for the
// channel, a not-ready engine flags a ready error, a deadline on a channel
// still busy flags a missing-data error, running follows enable and the
// first request, and done interrupts follow the enable bit.
module tb_dma_chan_ctrl;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 0, irq_en = 0, desc_valid = 0, deadline = 0, deadline_ch = 0;
  dma_desc_t desc = '0, req;
  logic [1:0] eng_ready = 0, eng_done = 0, busy, err_ready, err_missing;
  logic req_valid, running, done_irq;
  int checks = 0, failures = 0;
  int n_ready_err = 0, n_missing = 0, n_req = 0;
  always #5 clk = ~clk;

  dma_chan_ctrl dut (.*);

  // reference
  logic [1:0] m_busy, m_er, m_em;
  logic m_rv, m_run, m_irq;
  dma_desc_t m_req;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_busy = 0; m_run = 0; m_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic iss;
      // random stimulus, done only for busy channels
      enable      = ($urandom % 50) != 0;
      irq_en      = $urandom % 2;
      desc_valid  = ($urandom % 4) == 0;
      desc        = '{ch: 1'($urandom), addr: {$urandom, $urandom}, len: 28'($urandom)};
      eng_ready   = 2'($urandom) | 2'($urandom);
      eng_done    = busy & 2'($urandom) & 2'($urandom);
      deadline    = ($urandom % 5) == 0;
      deadline_ch = 1'($urandom);
      // reference next state
      iss   = desc_valid && enable && eng_ready[desc.ch];
      m_rv  = iss;
      m_er  = '0; m_em = '0;
      if (desc_valid && enable && !eng_ready[desc.ch]) m_er[desc.ch] = 1;
      if (deadline && enable && m_busy[deadline_ch]) m_em[deadline_ch] = 1;
      m_irq = irq_en && eng_done != 0;
      if (iss) m_req = desc;
      for (int c = 0; c < 2; c++)
        if (eng_done[c]) m_busy[c] = 0; else if (iss && desc.ch == 1'(c)) m_busy[c] = 1;
      if (!enable) m_run = 0; else if (iss) m_run = 1;
      @(negedge clk);
      chk(req_valid == m_rv && (!m_rv || req == m_req), "request");
      chk(busy == m_busy, "busy");
      chk(err_ready == m_er && err_missing == m_em, "errors");
      chk(running == m_run && done_irq == m_irq, "running/irq");
      n_ready_err += (m_er != 0); n_missing += (m_em != 0); n_req += m_rv;
    end
    chk(n_ready_err > 0 && n_missing > 0 && n_req > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
