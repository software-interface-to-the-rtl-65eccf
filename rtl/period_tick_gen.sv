// period_tick_gen: sampling or DMA tick generator.
//
// The board describes each periodic event (ADC sampling, ADC DMA, DAC
// conversion, DAC DMA) by two registers in units of 2^-32 s, each holding
// the value minus one: a period, which must be a power of two, and a delay
// relative to the second.  An event happens at every time t with
// (t - delay) mod period == 0; delays larger than the period are therefore
// taken modulo the period.  A register value of 0xFFFFFFFF for the delay
// means no delay, i.e. events aligned with the 1 PPS.
//
// The GPS fraction advances by 2^STEP_LOG2 per clock, so an event time
// usually falls between clocks.  The tick is given for the first clock whose
// time is at or after the event (the event lies in (frac-step, frac]), and
// the exact event time (seconds and fraction) is reported with it.  `phase` is the event time
// minus the delay; bits above log2(period) count events since the second.
//
// Timing: tick, evt_* and phase are registered, one clock after the time
// inputs.  Periods shorter than one clock give a tick on every clock.
module period_tick_gen #(
  parameter int unsigned STEP_LOG2 = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] sec,
  input  logic [31:0] frac,
  input  logic [31:0] period_m1,
  input  logic [31:0] delay_m1,
  output logic        tick,
  output logic [31:0] evt_sec,
  output logic [31:0] evt_frac,
  output logic [31:0] phase
);
  logic [31:0] raw_phase, past;
  logic        hit;

  always_comb begin
    raw_phase = frac - (delay_m1 + 32'd1);
    past      = raw_phase & period_m1;       // time since the event
    hit       = en && (past < (32'd1 << STEP_LOG2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= 1'b0;
      evt_sec  <= '0;
      evt_frac <= '0;
      phase    <= '0;
    end else begin
      tick <= hit;
      if (hit) begin
        evt_frac <= frac - past;
        evt_sec  <= sec - 32'(frac < past);
        phase    <= raw_phase - past;
      end
    end
  end
endmodule
