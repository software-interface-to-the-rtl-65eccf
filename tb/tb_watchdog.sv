// tb_watchdog: host writes toggle the trigger; the monitor stays high for
// exactly TIMEOUT_CLKS clocks after the last write and then drops.
module tb_watchdog;
  localparam int T = 20;
  logic clk = 0, rst_n = 0, host_wr = 0, trigger, monitor;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  watchdog #(.TIMEOUT_CLKS(T)) dut (.clk, .rst_n, .host_wr, .trigger, .monitor);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_trig;
    exp_trig = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(!monitor && !trigger, "idle after reset");
    for (int n = 0; n < 6; n++) begin
      host_wr = 1; @(posedge clk); #1; host_wr = 0;
      exp_trig = !exp_trig;
      chk(trigger == exp_trig, "trigger toggles");
      chk(monitor, "monitor high after write");
      // the monitor must stay high for T clocks
      for (int c = 1; c < T; c++) begin
        @(posedge clk); #1;
        chk(monitor, $sformatf("monitor held at %0d", c));
      end
      if (n % 2 == 1) begin
        @(posedge clk); #1;
        chk(!monitor, "monitor drops after timeout");
        repeat (5) @(posedge clk); #1;
        chk(!monitor && trigger == exp_trig, "stays down, trigger kept");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
