// tb_period_tick_gen: drives the GPS fraction as the time base does (2^6
// per clock) and checks, for the settings of the document's examples and
// for random power-of-two periods and random delays, that a tick is given
// exactly on the first clock at or after each event time
// (t - delay) mod period == 0, with the exact event time and phase, and
// that the number of ticks per interval is period/step.
module tb_period_tick_gen;
  localparam int SL = 6;
  logic clk = 0, rst_n = 0, en = 0, tick;
  logic [31:0] sec = 0, frac = 0, period_m1 = 0, delay_m1 = 0;
  logic [31:0] evt_sec, evt_frac, phase;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  period_tick_gen #(.STEP_LOG2(SL)) dut (.*);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs `clocks` clocks from fraction f0 and checks each clock.
  task automatic run(input logic [31:0] per_m1, input logic [31:0] dly_m1,
                     input logic [31:0] f0, input int clocks);
    longint unsigned dly, per, t, e;
    int ticks, exp_ticks;
    period_m1 = per_m1; delay_m1 = dly_m1; en = 1;
    per = longint'(per_m1) + 1; dly = (longint'(dly_m1) + 1) & 64'hFFFF_FFFF;
    sec = 7; frac = f0; ticks = 0; exp_ticks = 0;
    @(negedge clk);
    for (int c = 0; c < clocks; c++) begin
      t = {sec, frac};
      // last event time <= t
      e = t - ((t - dly) % per);
      @(negedge clk);
      frac = frac + (1 << SL); if (frac == 0) sec++;
      if (t - e < (1 << SL)) begin
        exp_ticks++;
        chk(tick, $sformatf("tick expected at t=%h", t));
        chk({evt_sec, evt_frac} == 64'(e), $sformatf("event time %h vs %h", {evt_sec, evt_frac}, e));
        chk((phase & per_m1) == 0 && phase == 32'(e - dly), "phase");
      end else begin
        chk(!tick, $sformatf("no tick at t=%h", t));
      end
      if (tick) ticks++;
    end
    chk(ticks == exp_ticks, "tick count");
    chk(exp_ticks >= clocks / int'(per >> SL) - 1, "rate");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // section 4.1: sampling at 65536 Hz aligned to the PPS, DMA 0x3FF later
    run(32'h0000_FFFF, 32'hFFFF_FFFF, 32'hFFFF_0000, 3000);
    run(32'h0000_FFFF, 32'h0000_03FF, 32'hFFFF_0000, 3000);
    // section 4.2: sampling at 2^19 Hz, DMA delay half a period
    run(32'h0000_1FFF, 32'hFFFF_FFFF, 32'hFFFF_F000, 2000);
    run(32'h0000_FFFF, 32'h0000_7FFF, 32'hFFFF_0000, 3000);
    // random periods and delays, including delays beyond one period
    for (int n = 0; n < 20; n++) begin
      int lp;
      lp = SL + $urandom % 8;
      run(32'((64'd1 << lp) - 1), $urandom, $urandom, 600);
    end
    en = 0; @(negedge clk); @(negedge clk);
    chk(!tick, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
