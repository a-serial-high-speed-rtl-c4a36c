// tb_spfi_async_fifo - dual-clock FIFO with unrelated write and read clocks. Plain
// mode: random writes and reads, order and content checked against a queue, full and
// empty never violated. Commit mode: frames of random length are written and then
// either committed (reader must get them) or rolled back (reader must never see them),
// and the reader must see nothing of a frame before its commit.
module tb_spfi_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  int checks = 0, failures = 0;

  // ---------------- plain FIFO ----------------
  logic wr, rd, full, empty, c1, r1;
  logic [32:0] wd, rdat;
  logic [8:0]  free, cnt;
  spfi_async_fifo #(.WIDTH(33), .DEPTH(256), .COMMIT_MODE(1'b0)) u_p (
    .wclk, .wrst_n(rst_n), .wr_en(wr), .wr_data(wd), .commit(c1), .rollback(r1), .full,
    .wr_free(free), .rclk, .rrst_n(rst_n), .rd_en(rd), .rd_data(rdat), .empty, .rd_count(cnt));
  logic [32:0] q [$];
  int n_wr = 0, n_rd = 0, saw_full = 0;
  assign c1 = 0; assign r1 = 0;

  always @(posedge wclk) if (rst_n) begin
    if (wr && !full) q.push_back(wd);
    if (full) saw_full++;
    wr <= (n_wr < 3000) && ($urandom % 3 != 0);
    wd <= $urandom;
    if (wr && !full) n_wr++;
  end
  always @(posedge rclk) if (rst_n) begin
    if (rd && !empty) begin
      checks++;
      if (q.size() == 0 || rdat !== q[0]) begin failures++; $display("FAIL plain data"); end
      else void'(q.pop_front());
      n_rd++;
    end
    rd <= (n_wr > 200) ? ($urandom % 4 != 0) : 1'b0;   // let it fill up first
  end

  // ---------------- commit mode ----------------
  logic wr2, rd2, full2, empty2, cm, rb;
  logic [32:0] wd2, rd2d;
  logic [5:0]  free2, cnt2;
  spfi_async_fifo #(.WIDTH(33), .DEPTH(32), .COMMIT_MODE(1'b1)) u_c (
    .wclk, .wrst_n(rst_n), .wr_en(wr2), .wr_data(wd2), .commit(cm), .rollback(rb), .full(full2),
    .wr_free(free2), .rclk, .rrst_n(rst_n), .rd_en(rd2), .rd_data(rd2d), .empty(empty2), .rd_count(cnt2));
  logic [32:0] q2 [$];
  int committed = 0, dropped = 0, n2 = 0;
  initial begin
    wr2 = 0; cm = 0; rb = 0; wd2 = 0;
    wait (rst_n);
    for (int f = 0; f < 60; f++) begin
      int len;
      logic keep;
      logic [32:0] fr [$];
      len = 1 + $urandom % 12;
      keep = ($urandom % 3 != 0);
      fr.delete();
      for (int i = 0; i < len; i++) begin
        @(negedge wclk);
        while (full2) @(negedge wclk);
        wr2 = 1; wd2 = {1'b0, 16'(f), 16'(i)}; fr.push_back(wd2);
        @(negedge wclk); wr2 = 0;
      end
      // nothing of the frame may be visible yet
      repeat (30) @(negedge wclk);
      checks++; if (cnt2 != 6'(q2.size())) begin failures++; $display("FAIL early visibility %0d %0d", cnt2, q2.size()); end
      @(negedge wclk);
      if (keep) begin cm = 1; foreach (fr[i]) q2.push_back(fr[i]); committed++; end
      else begin rb = 1; dropped++; end
      @(negedge wclk); cm = 0; rb = 0;
    end
  end
  always @(posedge rclk) if (rst_n) begin
    if (rd2 && !empty2) begin
      checks++;
      if (q2.size() == 0 || rd2d !== q2[0]) begin failures++; $display("FAIL commit data %h", rd2d); end
      else void'(q2.pop_front());
      n2++;
    end
    rd2 <= ($urandom % 8 == 0);
  end

  initial begin
    wr = 0; rd = 0; rd2 = 0;
    repeat (3) @(posedge wclk); rst_n = 1;
    wait (n_rd == 3000);
    wait (committed + dropped == 60);
    repeat (2000) @(posedge rclk);
    checks++; if (saw_full == 0) begin failures++; $display("FAIL full never seen"); end
    checks++; if (q2.size() != 0) begin failures++; $display("FAIL committed words missing"); end
    checks++; if (dropped == 0 || committed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge wclk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
