// watchdog: host-driven watchdog trigger and monitor.
//
// Every host write to the watchdog register toggles the trigger bit, which
// is driven to the adapter board and from there to the anti-aliasing /
// anti-imaging chassis.  The monitor bit is high while the trigger has
// toggled within the last TIMEOUT_CLKS clocks, i.e. while the host software
// keeps the watchdog alive; it is also reported in the DAC status.  The
// register bits (0: trigger readback, 1: monitor) follow the board
// description; the retriggerable timeout that defines the monitor, and its
// default length of one second of the 2^26 Hz clock, are this design's
// choice.
//
// Timing: trigger and monitor change on the clock after the write.
module watchdog #(
  parameter int unsigned TIMEOUT_CLKS = 1 << 26
) (
  input  logic clk,
  input  logic rst_n,
  input  logic host_wr,
  output logic trigger,
  output logic monitor
);
  localparam int unsigned CW = $clog2(TIMEOUT_CLKS + 1);
  logic [CW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trigger <= 1'b0;
      left    <= '0;
    end else if (host_wr) begin
      trigger <= ~trigger;
      left    <= CW'(TIMEOUT_CLKS);
    end else if (left != 0) begin
      left    <= left - 1'b1;
    end
  end
  assign monitor = (left != 0);
endmodule
