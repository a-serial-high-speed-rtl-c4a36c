// tb_spfi_error_inject - off: the stream passes untouched; one-shot: exactly the next
// word after arming is XORed with the mask; periodic: one word in every `period`,
// exactly `count` times, at the right spacing.
module tb_spfi_error_inject;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] mode; logic arm, inj;
  logic [39:0] mask, din, dout;
  logic [15:0] period, count, n;
  spfi_error_inject dut (.clk, .rst_n, .mode, .arm, .mask, .period, .count, .din, .dout,
    .injected(inj), .n_injected(n));
  int cyc = 0, hits = 0, last = -1, bad_gap = 0, diff = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    din <= {$urandom, 8'($urandom)};
    if (dout != din) begin
      diff++;
      if ((dout ^ din) != mask || !inj) begin failures++; $display("FAIL damage not the mask"); end
      if (mode == 2) begin
        if (last >= 0 && cyc - last != int'(period)) bad_gap++;
        last = cyc;
      end
    end
  end
  initial begin
    mode = 0; arm = 0; mask = 40'h00_0100_0001; period = 16'd37; count = 16'd10; din = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (200) @(posedge clk);
    checks++; if (diff != 0) begin failures++; $display("FAIL damage while off"); end
    #1 mode = 1; arm = 1; @(posedge clk); #1 arm = 0;
    repeat (100) @(posedge clk);
    checks++; if (diff != 1 || n != 1) begin failures++; $display("FAIL one-shot %0d", diff); end
    #1 mode = 0; @(posedge clk); #1 diff = 0;
    // the count includes the earlier one-shot: 9 more periodic hits
    mode = 2;
    repeat (37 * 15) @(posedge clk);
    checks++; if (diff != 9 || n != 10) begin failures++; $display("FAIL periodic count %0d %0d", diff, n); end
    checks++; if (bad_gap != 0) begin failures++; $display("FAIL periodic spacing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
