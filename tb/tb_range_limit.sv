// tb_range_limit: checks the 32-to-28-bit saturation used on the DAC path
// against a reference computed with 64-bit integers, on corner values and
// random values of all magnitudes.
module tb_range_limit;
  logic [31:0] din, dout;
  logic        ovf;
  int checks = 0, failures = 0;

  range_limit #(.IN_W(32), .OUT_W(28)) dut (.din, .dout, .ovf);

  task automatic try(input logic [31:0] v);
    longint sv, ev;
    bit eo;
    din = v;
    #1;
    sv = longint'($signed(v));
    eo = 0; ev = sv;
    if (sv > 134217727)  begin ev = 134217727;  eo = 1; end
    if (sv < -134217728) begin ev = -134217728; eo = 1; end
    checks++;
    if (longint'($signed(dout)) != ev || ovf != eo) begin
      failures++;
      $display("FAIL in=%h out=%h ovf=%0d exp=%0d/%0d", v, dout, ovf, ev, eo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0); try(32'h07FF_FFFF); try(32'h0800_0000); try(32'hF800_0000);
    try(32'hF7FF_FFFF); try(32'h7FFF_FFFF); try(32'h8000_0000); try(32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) try($urandom >> ($urandom % 32));
    for (int i = 0; i < 2000; i++) try(-($urandom >> ($urandom % 32)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
