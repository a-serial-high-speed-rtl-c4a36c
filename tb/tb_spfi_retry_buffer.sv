// tb_spfi_retry_buffer - frames of known content are written; an ACK releases frames
// up to its sequence number; a NACK makes the buffer replay, at the next frame
// boundary, every frame from the NACKed one on, word for word; without any ACK, a
// replay of the oldest frame starts TIMEOUT cycles (plus the few cycles of write and
// hand-over) after the first frame was written; no
// space is offered while SLOTS frames are outstanding.
module tb_spfi_retry_buffer;
  import spfi_pkg::*;
  localparam int TMO = 200, SL = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  logic we, sof, sok, av, nv, bnd, rv, rr, rs, idle;
  word_t ww, rw;
  logic [7:0] nseq, aseq, nkseq;
  spfi_retry_buffer #(.DEPTH(256), .SLOTS(SL), .MAX_FRAME(16), .TIMEOUT(TMO)) dut (.clk, .rst_n,
    .wr_en(we), .wr_sof(sof), .wr_word(ww), .next_seq(nseq), .space_ok(sok), .ack_valid(av),
    .ack_seq(aseq), .nack_valid(nv), .nack_seq(nkseq), .boundary(bnd), .replay_valid(rv),
    .replay_word(rw), .replay_ready(rr), .replay_start(rs), .idle);

  // frame f has 3 + f % 5 words: {f, i}
  function automatic int flen(int f); return 3 + f % 5; endfunction
  task automatic write_frame(int f);
    for (int i = 0; i < flen(f); i++) begin
      @(negedge clk); we = 1; sof = (i == 0); ww = word_t'{k: 4'h0, d: {16'(f), 16'(i)}};
    end
    @(negedge clk); we = 0; sof = 0;
  endtask
  task automatic ack(int s);
    @(negedge clk); av = 1; aseq = 8'(s); @(negedge clk); av = 0;
  endtask
  task automatic nack(int s);
    @(negedge clk); nv = 1; nkseq = 8'(s); @(negedge clk); nv = 0;
  endtask
  // collect a replay and check it covers frames first..last
  task automatic expect_replay(int first, int last, string s);
    int f, i, t;
    f = first; i = 0; t = 0;
    while (!rv && t < 1000) begin @(negedge clk); t++; end
    while (rv) begin
      checks++;
      if (rw.d != {16'(f), 16'(i)}) begin failures++; $display("FAIL %s: %h expected %0d/%0d", s, rw.d, f, i); end
      i++;
      if (i == flen(f)) begin i = 0; f++; end
      @(negedge clk);
    end
    chk(f == last + 1 && i == 0, $sformatf("%s: replay ended at frame %0d", s, f));
  endtask

  int nrs = 0, cyc = 0, c0 = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rs) nrs++;
  assign rr = 1'b1;

  initial begin
    we = 0; sof = 0; ww = '0; av = 0; nv = 0; aseq = 0; nkseq = 0; bnd = 1;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    chk(idle && sok && nseq == 0, "empty after reset");
    for (int f = 0; f < 5; f++) write_frame(f);
    chk(nseq == 5 && !idle, "5 frames outstanding");
    ack(1);
    #1 chk(!idle, "frames 2..4 outstanding");
    nack(3);
    expect_replay(3, 4, "NACK replay");
    chk(nrs == 1, "one replay start");
    ack(4);
    #1 chk(idle, "all acknowledged");
    // timeout: frames 5, 6 never acknowledged
    c0 = cyc;
    write_frame(5); write_frame(6);
    begin
      int t;
      while (!rs && cyc - c0 < 5 * TMO) @(negedge clk);
      t = cyc - c0;
      chk(rs, "timeout replay");
      chk(t >= TMO && t <= TMO + 5, $sformatf("timeout after %0d cycles", t));
    end
    expect_replay(5, 6, "timeout replay");
    ack(6);
    // space: SLOTS frames outstanding leave no room
    for (int f = 7; f < 7 + SL; f++) write_frame(f);
    #1 chk(!sok, "no space with SLOTS frames outstanding");
    ack(7 + SL - 1);
    #1 chk(sok && idle, "space again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
