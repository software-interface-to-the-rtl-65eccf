// tb_coef_mem: fills the coefficient memory through the 32-bit host port,
// reads it back, and reads 64-bit coefficients through the filter port for
// several filter selections, checking the (selection, cycle) addressing and
// that unused selection bits are ignored.
module tb_coef_mem;
  localparam int BYTES = 8192, L2C = 6, WORDS = BYTES / 8, NF = WORDS >> L2C;
  logic clk = 0;
  logic host_wr = 0, host_rd = 0, flt_rd = 0;
  logic [10:0] host_word = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic [7:0]  flt_sel = '0;
  logic [L2C-1:0] flt_cycle = '0;
  logic [63:0] flt_coef;
  logic [31:0] model [2*WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  coef_mem #(.MEM_BYTES(BYTES), .LOG2_CYCLES(L2C)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 * WORDS; i++) begin
      model[i] = $urandom;
      @(negedge clk);
      host_wr = 1; host_word = 11'(i); host_wdata = model[i];
    end
    @(negedge clk); host_wr = 0;
    for (int n = 0; n < 300; n++) begin
      int i;
      i = $urandom % (2 * WORDS);
      host_rd = 1; host_word = 11'(i);
      @(negedge clk); host_rd = 0;
      checks++;
      if (host_rdata !== model[i]) begin
        failures++; $display("FAIL host word %0d: %h vs %h", i, host_rdata, model[i]);
      end
    end
    for (int n = 0; n < 300; n++) begin
      int f, c, idx;
      f = $urandom % NF; c = $urandom % (1 << L2C);
      flt_rd = 1; flt_sel = 8'(f + NF * ($urandom % 16)); flt_cycle = L2C'(c);
      @(negedge clk); flt_rd = 0;
      idx = f * (1 << L2C) + c;
      checks++;
      if (flt_coef !== {model[2*idx+1], model[2*idx]}) begin
        failures++; $display("FAIL filter %0d cycle %0d: %h", f, c, flt_coef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
