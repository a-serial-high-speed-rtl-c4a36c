// tb_spfi_crc16 - checks the frame CRC block against the published check value of
// CRC-16/CCITT-FALSE ("123456789" -> 0x29B1) and against a bit-serial reference
// computed in the testbench for random frames of random length.
module tb_spfi_crc16;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, en;
  logic [31:0] data;
  logic [1:0]  first;
  logic [15:0] crc, crc_next;
  int checks = 0, failures = 0;

  spfi_crc16 dut (.*);

  function automatic logic [15:0] ref_bits(logic [15:0] c, logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ b[i];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  task automatic feed(logic s, logic [31:0] d, logic [1:0] f);
    start = s; en = !s; data = d; first = f;
    @(posedge clk); #1;
    start = 0; en = 0;
  endtask

  initial begin
    start = 0; en = 0; data = '0; first = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    feed(1, {"3", "2", "1", 8'h7C}, 2'd1);
    feed(0, {"7", "6", "5", "4"}, 2'd0);
    feed(0, {"9", "8", 16'h0}, 2'd2);
    checks++; if (crc !== 16'h29B1) begin failures++; $display("FAIL check value %h", crc); end
    for (int t = 0; t < 50; t++) begin
      logic [15:0] r;
      logic [31:0] w;
      int n;
      n = 1 + $urandom % 20;
      w = $urandom;
      r = 16'hFFFF;
      for (int b = 1; b < 4; b++) r = ref_bits(r, w[8*b +: 8]);
      feed(1, w, 2'd1);
      for (int i = 0; i < n; i++) begin
        w = $urandom;
        for (int b = 0; b < 4; b++) r = ref_bits(r, w[8*b +: 8]);
        data = w; en = 1; first = 0; #1;
        checks++; if (crc_next !== r) begin failures++; $display("FAIL crc_next"); end
        @(posedge clk); #1; en = 0;
      end
      checks++; if (crc !== r) begin failures++; $display("FAIL frame %0d: %h vs %h", t, crc, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
