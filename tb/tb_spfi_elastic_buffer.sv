`timescale 1ps/1ps
// tb_spfi_elastic_buffer - writer and reader on clocks 1 % apart, first with a faster
// reader (buffer runs low: head SKIPs must be repeated), then with a slower reader
// (buffer runs high: SKIPs must be dropped on the write side). A SKIP follows every
// 20 words. Every non-SKIP word must reach the reader exactly once and in order,
// and the buffer must never overflow.
module tb_spfi_elastic_buffer;
  import spfi_pkg::*;
  int whalf = 5000, rhalf = 4950;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;
  int checks = 0, failures = 0;

  word_t wr_word, rd_word;
  logic  wr_en, rd_valid, rd_err, sdrop, srep;
  spfi_elastic_buffer #(.DEPTH(16)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_word, .wr_err(1'b0), .skip_dropped(sdrop),
    .rclk, .rrst_n(rst_n), .rd_valid, .rd_word, .rd_err, .skip_repeated(srep));

  int wn = 0, expect_n = 0, drops = 0, reps = 0, ndata = 0;
  always @(posedge wclk) if (rst_n) begin
    wn <= wn + 1;
    if (sdrop) drops++;
    checks++;
    if (dut.full) begin failures++; $display("FAIL overflow"); end
  end
  assign wr_en   = rst_n;
  assign wr_word = (wn % 21 == 20) ? lane_word(LW_SKIP) : word_t'{k: 4'h0, d: 32'(wn)};

  always @(posedge rclk) if (rst_n) begin
    if (srep) reps++;
    if (rd_valid && !is_lane_word(rd_word, LW_SKIP)) begin
      checks++;
      if (rd_word.d != 32'(expect_n)) begin
        failures++; $display("FAIL got %0d expected %0d", rd_word.d, expect_n);
      end
      expect_n = int'(rd_word.d) + 1;
      if (expect_n % 21 == 20) expect_n++;
      ndata++;
    end
  end

  initial begin
    repeat (4) @(posedge wclk); @(negedge wclk); rst_n = 1;
    repeat (20000) @(posedge wclk);
    checks++; if (reps == 0) begin failures++; $display("FAIL no SKIP repeated with a fast reader"); end
    $display("fast reader: repeated %0d dropped %0d", reps, drops);
    checks++; if (reps <= drops) begin failures++; $display("FAIL fast reader: more drops than repeats"); end
    rhalf = 5050; reps = 0; drops = 0;
    repeat (20000) @(posedge wclk);
    checks++; if (drops == 0) begin failures++; $display("FAIL no SKIP dropped with a slow reader"); end
    $display("slow reader: repeated %0d dropped %0d", reps, drops);
    checks++; if (drops <= reps) begin failures++; $display("FAIL slow reader: more repeats than drops"); end
    checks++; if (ndata < 30000) begin failures++; $display("FAIL too few words %0d", ndata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge wclk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
