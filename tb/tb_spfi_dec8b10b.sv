// tb_spfi_dec8b10b - feeds the decoder with code groups written out by hand from the
// 8B/10B tables (K28.5, K28.3, D0.0, D21.5 in both disparities) and checks byte, K flag
// and the absence of errors; then checks that an invalid code group is flagged as a
// code error and that a valid group of the wrong disparity is flagged as a disparity
// error.
module tb_spfi_dec8b10b;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [39:0] code;
  word_t dout;
  logic [3:0] ce, de;
  int checks = 0, failures = 0;
  spfi_dec8b10b dut (.clk, .rst_n, .en(1'b1), .code, .dout, .code_err(ce), .disp_err(de));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    code = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // K28.5- K28.5+ K28.3- D21.5   (RD: - -> + -> - -> + -> +)
    code = {10'b0011111010, 10'b1100000101, 10'b0011110011, 10'b1010101010};
    @(posedge clk); #1;
    chk(dout.k == 4'b0111 && dout.d == {8'hB5, 8'h7C, 8'hBC, 8'hBC}, "K28.5/K28.3/D21.5");
    chk(ce == 0 && de == 0, "no errors");
    // RD is +: D0.0+ (ends +), D0.0+ again, K28.5+ (ends -), D0.0-
    code = {10'b0110001011, 10'b0110001011, 10'b1100000101, 10'b1001110100};
    @(posedge clk); #1;
    chk(dout.k == 4'b0100 && dout.d == {8'h00, 8'hBC, 8'h00, 8'h00}, "D0.0 both forms");
    chk(ce == 0 && de == 0, "no errors 2");
    // RD is -: D0.0- is fine, D0.0+ at RD- is a disparity error
    code = {10'b1001110100, 10'b0110001011, 10'b1001110100, 10'b1001110100};
    @(posedge clk); #1;
    chk(ce == 0, "no code errors in disparity case");
    chk(de[0] == 1'b0 && de[1] == 1'b1, "disparity error flagged");
    chk(dout.d[15:0] == 16'h0000 && dout.k == 0, "byte still delivered");
    // an all-zero group is no code at all
    code = {10'b0000000000, 10'b1001110100, 10'b0110001011, 10'b1001110100};
    @(posedge clk); #1;
    chk(ce[0] == 1'b1, "code error flagged");
    chk(ce[3:1] == 3'b000, "valid groups not flagged as code errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
