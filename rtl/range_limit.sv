// range_limit: signed saturation with overflow flag.
//
// Limits a signed IN_W-bit value to the signed OUT_W-bit range
// [-2^(OUT_W-1), 2^(OUT_W-1)-1] and raises `ovf` when it had to.  The board
// uses this twice: filter outputs, computed with a few extra bits, are
// limited to 32 bits, and DAC inputs are limited to the converter's 28 bits,
// with the overflow reported in the status read back by the host.  The
// result is returned sign-extended to IN_W bits.  Purely combinational.
module range_limit #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 28
) (
  input  logic [IN_W-1:0] din,
  output logic [IN_W-1:0] dout,
  output logic            ovf
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((64'sd1 <<< (OUT_W - 1)) - 64'sd1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    if ($signed(din) > MAXV) begin
      dout = MAXV; ovf = 1'b1;
    end else if ($signed(din) < MINV) begin
      dout = MINV; ovf = 1'b1;
    end else begin
      dout = din;  ovf = 1'b0;
    end
  end
endmodule
