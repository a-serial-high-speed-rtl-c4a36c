// tb_spfi_pkt_gen - the generator must write packets of pkt_len words with values
// seed, seed+step, ... and EOP on the last word, wait `gap` cycles between packets,
// hold off while the buffer is full, stop after num_pkts packets, and stop on request.
module tb_spfi_pkt_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, stop, full, wr, busy;
  logic [31:0] seed, step, num, sent;
  logic [15:0] len, gap;
  logic [32:0] wd;
  spfi_pkt_gen dut (.clk, .rst_n, .start, .stop, .seed, .step, .pkt_len(len), .gap,
    .num_pkts(num), .full, .wr, .wdata(wd), .busy, .pkts_sent(sent));
  logic [31:0] expv; int nw = 0, np = 0, idle_run = 0, min_gap = 1 << 30;
  always @(posedge clk) full <= rst_n && ($urandom % 5 == 0);
  // checked half a cycle before the edge that takes the word
  always @(negedge clk) if (rst_n) begin
    if (wr) begin
      checks++;
      if (full) begin failures++; $display("FAIL write while full"); end
      if (wd[31:0] != expv || wd[32] != (nw % int'(len) == int'(len) - 1)) begin
        failures++; $display("FAIL word %0d: %h", nw, wd);
      end
      expv = expv + step;
      if (wd[32]) np++;
      if (nw % int'(len) == 0 && nw > 0 && idle_run < min_gap) min_gap = idle_run;
      nw++; idle_run = 0;
    end else idle_run++;
  end
  initial begin
    start = 0; stop = 0; full = 0; seed = 32'hFFFF_FFF0; step = 32'd7; len = 16'd9; gap = 16'd5;
    num = 32'd20;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    expv = seed;
    start = 1; @(posedge clk); #1 start = 0;
    wait (!busy);
    repeat (10) @(posedge clk);
    checks++; if (np != 20 || sent != 20 || nw != 180) begin failures++; $display("FAIL count %0d %0d", np, nw); end
    checks++; if (min_gap < 5) begin failures++; $display("FAIL gap %0d", min_gap); end
    // endless run, stopped by request
    #1 num = 0; gap = 0; nw = 0; np = 0; expv = seed;
    start = 1; @(posedge clk); #1 start = 0;
    repeat (500) @(posedge clk);
    #1 stop = 1; @(posedge clk); #1 stop = 0;
    checks++; if (busy) begin failures++; $display("FAIL stop"); end
    checks++; if (np < 30) begin failures++; $display("FAIL endless run %0d", np); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
