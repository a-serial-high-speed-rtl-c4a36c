// tb_spfi_lane_tx - lane words while the lane is not active, data words passed
// through with ready/valid when it is, IDLE when there is nothing to send, and a SKIP
// every SKIP_INTERVAL words exactly, for a short interval and for the default of 5000.
module tb_spfi_lane_tx;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic active, dl_valid, dl_ready, skip_a, skip_b, rdy_b;
  lane_word_e sel;
  word_t dl_word, tx_a, tx_b;
  spfi_lane_tx #(.SKIP_INTERVAL(50)) u_a (.clk, .rst_n, .active, .lane_sel(sel), .dl_valid,
    .dl_word, .dl_ready, .tx_word(tx_a), .skip_sent(skip_a));
  spfi_lane_tx u_b (.clk, .rst_n, .active(1'b1), .lane_sel(LW_IDLE), .dl_valid(1'b0),
    .dl_word('0), .dl_ready(rdy_b), .tx_word(tx_b), .skip_sent(skip_b));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int cyc = 0, last_a = -1, last_b = -1, nskip_a = 0, nskip_b = 0, sent = 0, got = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (skip_a) begin
      chk(is_lane_word(tx_a, LW_SKIP), "SKIP word");
      if (last_a >= 0) chk(cyc - last_a == 50, "SKIP interval 50");
      last_a = cyc; nskip_a++;
    end
    if (skip_b) begin
      chk(is_lane_word(tx_b, LW_SKIP) && !rdy_b, "SKIP word (default)");
      if (last_b >= 0) chk(cyc - last_b == 5000, "SKIP interval 5000");
      last_b = cyc; nskip_b++;
    end
    if (active && !skip_a) begin
      if (dl_valid) begin
        chk(dl_ready && tx_a == dl_word, "data passed");
        got++;
      end else chk(is_lane_word(tx_a, LW_IDLE), "IDLE when nothing to send");
    end
    if (!active && !skip_a) chk(tx_a == lane_word(sel), "lane word");
  end

  initial begin
    active = 0; dl_valid = 0; dl_word = '0; sel = LW_INIT1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      sel = lane_word_e'(i + 1);
      repeat (30) @(posedge clk);
      #1;
    end
    active = 1;
    repeat (12000) begin
      @(negedge clk);
      dl_valid = ($urandom % 3 != 0);
      dl_word = word_t'{k: 4'h0, d: $urandom};
    end
    chk(nskip_a > 200 && nskip_b >= 2, "SKIPs sent");
    chk(got > 7000, "data words sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
