// tb_spfi_rolling_memory - small memory (64 words, 16 after the trigger). Transmit
// and receive streams are counters; the trigger word appears in the chosen stream.
// After the interrupt the whole memory is read back: it must hold the last 64 words of
// each stream, with the trigger word 17 places from the newest. Also checks a
// transmit-side trigger and that nothing is recorded before arming.
module tb_spfi_rolling_memory;
  import spfi_pkg::*;
  localparam int D = 64, P = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic arm, trx, irq, rec, sel, txv, rxv;
  word_t tw, txw, rxw, rdd;
  logic [5:0] ra;
  spfi_rolling_memory #(.DEPTH(D), .POST_TRIGGER(P)) dut (.clk, .rst_n, .arm, .trig_rx(trx),
    .trig_word(tw), .tx_valid(txv), .tx_word(txw), .rx_valid(rxv), .rx_word(rxw), .irq,
    .recording(rec), .rd_sel_rx(sel), .rd_addr(ra), .rd_data(rdd));
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  int n = 0;
  always @(posedge clk) if (rst_n && !irq) begin
    n <= n + 1;
  end
  assign txw = word_t'{k: 4'h0, d: 32'(n)};
  assign rxw = word_t'{k: 4'h0, d: 32'h8000_0000 | 32'(n / 2)};
  assign txv = 1'b1;
  assign rxv = n[0];            // receive words arrive every other cycle

  task automatic run(bit on_rx, int trig_n);
    @(negedge clk);
    trx = on_rx;
    tw  = on_rx ? word_t'{k: 4'h0, d: 32'h8000_0000 | 32'(trig_n / 2)} : word_t'{k: 4'h0, d: 32'(trig_n)};
    arm = 1; @(negedge clk); arm = 0;
    begin
      int t = 0;
      while (!irq && t < 2000) begin @(posedge clk); t++; end
    end
    chk(irq && !rec, "interrupt, recording stopped");
    for (int s = 0; s < 2; s++) begin
      word_t prev;
      sel = s[0];
      for (int a = 0; a < D; a++) begin
        @(negedge clk); ra = 6'(a); @(negedge clk);
        if (a > 0) chk(rdd.d == prev.d + 1, $sformatf("stream %0d in order at %0d", s, a));
        if (a == D - P - 1 && s == int'(on_rx)) chk(rdd == tw, "trigger word in its place");
        prev = rdd;
      end
    end
  endtask

  initial begin
    arm = 0; trx = 0; tw = '0; sel = 0; ra = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (10) @(posedge clk);
    chk(!rec && !irq, "idle before arming");
    run(1'b1, 300);
    // keep going from where the counters stopped
    @(negedge clk); run(1'b0, n + 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
