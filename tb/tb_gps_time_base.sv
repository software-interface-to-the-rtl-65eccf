// tb_gps_time_base: runs the time base at a reduced clock (2^10 Hz, so a
// second is 1024 clocks) and checks against an independent count: the
// fraction advances by 2^22 per clock, the seconds load from the PPS,
// seconds increment on the wrap, timing OK rises on the second aligned
// PPS, falls when a PPS comes early and falls when a PPS is missing.
module tb_gps_time_base;
  localparam int L2 = 10, CPS = 1 << L2;
  logic clk = 0, rst_n = 0, pps = 0, timing_ok;
  logic [31:0] sec_in = 0, sec, frac;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gps_time_base #(.LOG2_CLK_HZ(L2)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (sec=%0d frac=%h ok=%0d)", what, sec, frac, timing_ok); end
  endtask

  task automatic give_pps(input logic [31:0] s);
    pps = 1; sec_in = s; @(negedge clk); pps = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    give_pps(1000);
    chk(sec == 1000 && frac == 0, "loaded by first PPS");
    chk(!timing_ok, "first PPS is not yet a lock");
    t = 1000 * 64'(CPS);
    for (int s = 0; s < 3; s++) begin
      for (int c = 1; c < CPS; c++) begin
        @(negedge clk); t++;
        chk({sec, frac} == 64'(t) << (32 - L2), "time counts");
      end
      give_pps(32'(1001 + s)); t++;
      chk(sec == 32'(1001 + s) && frac == 0, "second boundary");
      chk(timing_ok, "locked on aligned PPS");
    end
    // early PPS
    repeat (300) @(negedge clk);
    give_pps(2000);
    chk(!timing_ok && sec == 2000 && frac == 0, "early PPS drops lock and reloads");
    repeat (CPS - 1) @(negedge clk);
    give_pps(2001);
    chk(timing_ok, "relocked");
    // missing PPS: free-running wrap drops lock but keeps counting
    repeat (CPS) @(negedge clk);
    chk(!timing_ok && sec == 2002 && frac == 0, "missing PPS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
