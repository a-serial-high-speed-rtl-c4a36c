// tb_spfi_enc8b10b - checks the encoder against code groups taken from the 8B/10B
// tables (K28.5, D0.0, D10.2, D21.5, D17.7 and D11.7 with their alternate forms), checks
// that the running digital sum of the produced bit stream stays within +-3 and that no
// code word is unbalanced by more than 2, and decodes random words back.
module tb_spfi_enc8b10b;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t din, dout;
  logic [39:0] code;
  logic [3:0] ce, de;
  int checks = 0, failures = 0;

  spfi_enc8b10b dut (.clk, .rst_n, .en(1'b1), .din, .code);
  spfi_dec8b10b u_dec (.clk, .rst_n, .en(1'b1), .code, .dout, .code_err(ce), .disp_err(de));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int rds = 0;
  word_t hist [$];
  initial begin
    din = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // starting at RD-: K28.5 D0.0 D10.2 D21.5
    din = '{k: 4'b0001, d: {8'hB5, 8'h4A, 8'h00, 8'hBC}};
    @(posedge clk); #1;
    chk(code[39:30] == 10'b0011111010, "K28.5 RD-");
    chk(code[29:20] == 10'b0110001011, "D0.0 RD+");
    chk(code[19:10] == 10'b0101010101, "D10.2");
    chk(code[9:0]   == 10'b1010101010, "D21.5");
    // the first word ends at RD+: D11.7 needs the alternate form there, D17.7 (at RD-)
    // as well, then D0.0 at RD+ and D11.7 at RD+ again
    din = '{k: 4'b0000, d: {8'hEB, 8'h00, 8'hF1, 8'hEB}};
    @(posedge clk); #1;
    chk(code[39:30] == 10'b1101001000, "D11.7 RD+ (A7)");
    chk(code[29:20] == 10'b1000110111, "D17.7 RD- (A7)");
    chk(code[19:10] == 10'b0110001011, "D0.0 RD+");
    chk(code[9:0]   == 10'b1101001000, "D11.7 RD+ again");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      word_t w;
      w.d = $urandom;
      w.k = 4'b0000;
      if ($urandom % 4 == 0) begin w.k[0] = 1; w.d[7:0] = ($urandom % 2) ? 8'hBC : 8'h7C; end
      din = w; hist.push_back(w);
      @(posedge clk); #1;
      for (int s = 0; s < 4; s++) begin
        int ones;
        ones = $countones(code[39 - 10*s -: 10]);
        chk(ones >= 4 && ones <= 6, "symbol balance");
        for (int b = 9; b >= 0; b--) rds += code[39 - 10*s - (9 - b)] ? 1 : -1;
        chk(rds >= -3 && rds <= 3, "running digital sum");
      end
      if (hist.size() > 1) begin
        word_t e;
        e = hist.pop_front();
        chk(dout == e && ce == 0 && de == 0, "decode of encoded word");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
