// tb_spfi_scrambler - scrambles random frames with one instance and de-scrambles with
// a second, checking the round trip, that the output really differs from the input,
// and the first mask word against a bit-serial model of x^16+x^5+x^4+x^3+1 seeded
// with all ones, written independently here.
module tb_spfi_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed, en;
  logic [31:0] din, mid, dout;
  int checks = 0, failures = 0, differ = 0;

  spfi_scrambler u_s (.clk, .rst_n, .seed, .en, .din(din), .dout(mid));
  spfi_scrambler u_d (.clk, .rst_n, .seed, .en, .din(mid), .dout(dout));

  logic [15:0] lfsr;
  function automatic logic [31:0] ref_mask(inout logic [15:0] s);
    logic [31:0] m;
    for (int i = 0; i < 32; i++) begin
      m[i] = s[15];
      s = {s[14:0], s[15] ^ s[4] ^ s[3] ^ s[2]};
    end
    return m;
  endfunction

  initial begin
    seed = 0; en = 0; din = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk); seed = 1; en = 0;
      @(negedge clk); seed = 0;
      lfsr = 16'hFFFF;
      for (int w = 0; w < 1 + $urandom % 30; w++) begin
        logic [31:0] m;
        din = $urandom; en = 1; #1;
        m = ref_mask(lfsr);
        checks++; if (mid !== (din ^ m)) begin failures++; $display("FAIL mask f%0d w%0d", f, w); end
        checks++; if (dout !== din) begin failures++; $display("FAIL roundtrip"); end
        if (mid != din) differ++;
        @(negedge clk);
      end
      en = 0;
    end
    checks++; if (differ == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
