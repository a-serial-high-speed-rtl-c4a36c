// tb_spfi_word_sync - an 8B/10B stream of lane words and data, shifted by an
// arbitrary number of bits, must be locked onto within a few words and then come out
// aligned with a fixed delay. Done for several offsets. Then: 7 decoder errors in
// one 256-word window keep the lock, 8 lose it, and the lock comes back.
module tb_spfi_word_sync;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [39:0] raw, aligned;
  logic err_in, synced;
  spfi_word_sync #(.LOSE_ERRS(8)) dut (.clk, .rst_n, .raw, .err_in, .aligned, .synced);

  logic rd = 0;
  logic [39:0] hist [$];
  logic [79:0] pair;
  int off = 0, n = 0;

  function automatic logic [40:0] enc_word(word_t w, logic r);
    logic [39:0] c;
    logic [10:0] e;
    for (int i = 0; i < 4; i++) begin
      e = enc8b10b(w.d[8*i +: 8], w.k[i], r);
      c[39 - 10*i -: 10] = e[9:0];
      r = e[10];
    end
    return {r, c};
  endfunction

  task automatic step();
    word_t w;
    logic [40:0] e;
    w = (n % 4 == 0) ? lane_word(LW_IDLE) : word_t'{k: 4'h0, d: $urandom};
    e = enc_word(w, rd);
    rd = e[40];
    pair = {pair[39:0], e[39:0]};
    hist.push_front(e[39:0]);
    if (hist.size() > 8) void'(hist.pop_back());
    raw = pair[79 - off -: 40];
    n++;
    @(posedge clk); #1;
  endtask

  task automatic check_lock(int o);
    int t, d;
    off = o;
    t = 0;
    while (!synced && t < 40) begin step(); t++; end
    checks++; if (!synced) begin failures++; $display("FAIL no lock at offset %0d", o); end
    // the output must match the input stream at one fixed delay for 100 words
    begin
      int hits [8];
      foreach (hits[i]) hits[i] = 0;
      for (int k = 0; k < 100; k++) begin
        step();
        for (int i = 0; i < hist.size(); i++) if (aligned == hist[i]) hits[i]++;
      end
      d = -1;
      foreach (hits[i]) if (hits[i] == 100) d = i;
      checks++;
      if (d < 0) begin failures++; $display("FAIL offset %0d not aligned", o); end
    end
  endtask

  initial begin
    raw = '0; err_in = 0; pair = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check_lock(0);
    for (int i = 0; i < 5; i++) begin
      int o;
      o = (i == 0) ? 13 : (i == 1) ? 27 : (i == 2) ? 39 : (i == 3) ? 1 : 20;
      rst_n = 0; @(posedge clk); #1 rst_n = 1;
      check_lock(o);
    end
    // 7 errors inside one window: lock kept
    for (int i = 0; i < 7; i++) begin err_in = 1; step(); err_in = 0; step(); end
    checks++; if (!synced) begin failures++; $display("FAIL lost lock after 7 errors"); end
    repeat (300) step();
    checks++; if (!synced) begin failures++; $display("FAIL lost lock"); end
    // 8 errors inside one window: lock lost
    for (int i = 0; i < 8; i++) begin err_in = 1; step(); err_in = 0; step(); end
    checks++; if (synced) begin failures++; $display("FAIL lock kept after 8 errors"); end
    repeat (20) step();
    checks++; if (!synced) begin failures++; $display("FAIL no relock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
