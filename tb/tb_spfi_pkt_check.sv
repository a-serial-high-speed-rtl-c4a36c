// tb_spfi_pkt_check - the consumer reads a buffer filled with correct packets
// (no errors counted), then packets with one damaged value (two data errors, since the
// consumer follows the received values: the damaged word and the one after) and one
// with a misplaced EOP (one frame error); it counts words and packets.
module tb_spfi_pkt_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, en, empty, rd;
  logic [32:0] rdata;
  logic [31:0] words, pkts;
  logic [15:0] derr, ferr;
  spfi_pkt_check dut (.clk, .rst_n, .start, .enable(en), .seed(32'd100), .step(32'd3),
    .pkt_len(16'd8), .empty, .rdata, .rd, .words, .pkts, .data_errors(derr), .frame_errors(ferr));
  logic [32:0] q [$];
  function automatic void show();
    empty = (q.size() == 0);
    rdata = empty ? '0 : q[0];
  endfunction
  // the consumer takes the head word at the clock edge; the queue moves on just after
  always @(posedge clk) begin
    logic r;
    r = rd && !empty;
    #1 if (r) void'(q.pop_front());
    show();
  end
  task automatic put(int n, int bad_at, int eop_at);
    logic [31:0] v;
    v = 100;
    for (int i = 0; i < n; i++) begin
      q.push_back({(i % 8 == 7) != (i == eop_at), (i == bad_at) ? ~v : v});
      v += 3;
    end
    show();
  endtask
  initial begin
    start = 0; en = 0; show();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    put(80, -1, -1);
    start = 1; en = 1; @(posedge clk); #1 start = 0;
    wait (q.size() == 0); repeat (5) @(posedge clk);
    checks++; if (words != 80 || pkts != 10 || derr != 0 || ferr != 0) begin
      failures++; $display("FAIL clean %0d %0d %0d %0d", words, pkts, derr, ferr); end
    en = 0; @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; en = 1;
    put(16, 3, -1);
    wait (q.size() == 0); repeat (5) @(posedge clk);
    checks++; if (derr != 2 || ferr != 0) begin failures++; $display("FAIL data error %0d %0d", derr, ferr); end
    en = 0; @(posedge clk); #1 start = 1; @(posedge clk); #1 start = 0; en = 1;
    put(16, -1, 4);
    wait (q.size() == 0); repeat (5) @(posedge clk);
    checks++; if (ferr == 0) begin failures++; $display("FAIL frame error %0d %0d", derr, ferr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
