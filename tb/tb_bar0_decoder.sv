// tb_bar0_decoder: random single-word reads and writes over the whole 32 kB
// window.  Each block is modelled as a one-clock-latency slave whose read
// data encodes its identity and local address; the test checks that exactly
// the right block sees each strobe with the right local address, that read
// data comes back one clock later from that block, and that the unassigned
// range 0x6000-0x7FFF reads as zero and receives no write.
module tb_bar0_decoder;
  import conv_pkg::*;
  logic clk = 0, rst_n = 0;
  bar_req_t req;
  logic rvalid;
  logic [31:0] rdata, wdata;
  logic ctrl_wr, ctrl_rd, diag_wr, diag_rd, flash_wr, flash_rd, coef_wr, coef_rd;
  logic [11:0] ctrl_addr, diag_addr;
  logic [12:0] flash_addr, coef_addr;
  logic [31:0] ctrl_rdata, diag_rdata, flash_rdata, coef_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bar0_decoder dut (.*);

  always_ff @(posedge clk) begin
    if (ctrl_rd)  ctrl_rdata  <= 32'hC000_0000 | 32'(ctrl_addr);
    if (diag_rd)  diag_rdata  <= 32'hD000_0000 | 32'(diag_addr);
    if (flash_rd) flash_rdata <= 32'hF000_0000 | 32'(flash_addr);
    if (coef_rd)  coef_rdata  <= 32'hE000_0000 | 32'(coef_addr);
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [14:0] a;
      logic [31:0] exp;
      logic [3:0]  exp_sel;
      bit is_wr;
      a = 15'($urandom) & 15'h7FFC;
      is_wr = $urandom % 2;
      req = '{wr: is_wr, rd: !is_wr, addr: a, wdata: $urandom};
      unique case (a[14:12])
        3'd0:       begin exp_sel = 4'b0001; exp = 32'hC000_0000 | 32'(a[11:0]); end
        3'd1:       begin exp_sel = 4'b0010; exp = 32'hD000_0000 | 32'(a[11:0]); end
        3'd2, 3'd3: begin exp_sel = 4'b0100; exp = 32'hF000_0000 | 32'(a[12:0]); end
        3'd4, 3'd5: begin exp_sel = 4'b1000; exp = 32'hE000_0000 | 32'(a[12:0]); end
        default:    begin exp_sel = 4'b0000; exp = 32'h0; end
      endcase
      #1;
      if (is_wr) begin
        chk({coef_wr, flash_wr, diag_wr, ctrl_wr} == exp_sel && !(ctrl_rd|diag_rd|flash_rd|coef_rd),
            $sformatf("write strobes for %h", a));
        chk(wdata == req.wdata, "write data forwarded");
      end else begin
        chk({coef_rd, flash_rd, diag_rd, ctrl_rd} == exp_sel && !(ctrl_wr|diag_wr|flash_wr|coef_wr),
            $sformatf("read strobes for %h", a));
      end
      chk(ctrl_addr == a[11:0] && diag_addr == a[11:0] && flash_addr == a[12:0]
          && coef_addr == a[12:0], "local address");
      @(negedge clk);
      req = '0;
      if (!is_wr) begin
        chk(rvalid && rdata == exp, $sformatf("read data for %h: %h vs %h", a, rdata, exp));
      end else begin
        chk(!rvalid, "no read response to a write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
