// gps_time_base: GPS time of the converter board.
//
// Keeps the current GPS time as 32-bit seconds and a 32-bit fraction in
// units of 2^-32 s.  Every clock of the 2^LOG2_CLK_HZ Hz board clock adds
// 2^(32-LOG2_CLK_HZ) to the fraction (64 for the board's 2^26 Hz clock), so
// the fraction wraps exactly once per second.  A one-clock pulse on `pps`
// marks the start of a second: the next clock reads {sec_in, 0}.
//
// `timing_ok` is set when a PPS arrives exactly where the free-running
// fraction would have wrapped and cleared when a PPS arrives anywhere else
// or the fraction wraps without one.  The fixed-point time format and the
// 2^26 Hz clock follow the board description; the recovery of PPS and
// seconds from the backplane timing signal happens outside this module, and
// the lock rule is this design's choice.
//
// Timing: sec/frac are registers; sec_in is sampled with pps.
module gps_time_base #(
  parameter int unsigned LOG2_CLK_HZ = 26
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pps,        // start of a second (one clock)
  input  logic [31:0] sec_in,     // GPS seconds of the second that starts
  output logic [31:0] sec,
  output logic [31:0] frac,
  output logic        timing_ok
);
  localparam logic [31:0] STEP = 32'd1 << (32 - LOG2_CLK_HZ);

  logic wrap_due;  // the free-running fraction wraps on this clock
  assign wrap_due = (frac == (32'd0 - STEP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec       <= '0;
      frac      <= '0;
      timing_ok <= 1'b0;
    end else if (pps) begin
      sec       <= sec_in;
      frac      <= '0;
      timing_ok <= wrap_due;
    end else begin
      frac <= frac + STEP;
      if (wrap_due) begin
        sec       <= sec + 32'd1;
        timing_ok <= 1'b0;
      end
    end
  end
endmodule
