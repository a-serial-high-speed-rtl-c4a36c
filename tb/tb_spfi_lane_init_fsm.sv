// tb_spfi_lane_init_fsm - two state machines joined through a 3-cycle channel that
// turns each side's transmitted lane word into the other side's receive events.
// Checks: start-up through STARTED, CONNECTING and CONNECTED to ACTIVE on both sides
// with at least MIN_INIT3 INIT3 words sent; a STARTED lane with a silent far end
// gives up after exactly TIMEOUT cycles; standby disables both ends; lane_start
// brings both back (the far end by auto start); loss of sync on one side while active
// gives a reinit pulse and a fresh start.
module tb_spfi_lane_init_fsm;
  import spfi_pkg::*;
  localparam int TMO = 300, WAITC = 20, MIN3 = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start [2], auto [2], stby [2], sync [2], act [2], reinit [2];
  lane_state_e st [2];
  lane_word_e  tw [2];
  lane_word_e  pipe [2][3];
  logic        cut;                       // far-end silence
  int          n_init3 [2];

  for (genvar i = 0; i < 2; i++) begin : g
    lane_word_e rw;
    assign rw = pipe[1-i][2];
    spfi_lane_init_fsm #(.WAIT_CYCLES(WAITC), .TIMEOUT(TMO), .MIN_INIT3(MIN3)) u (
      .clk, .rst_n, .lane_start(start[i]), .auto_start(auto[i]), .lane_standby(stby[i]),
      .synced(sync[i]), .rx_init1(!cut && rw == LW_INIT1), .rx_init2(!cut && rw == LW_INIT2),
      .rx_init3(!cut && rw == LW_INIT3), .rx_standby(!cut && rw == LW_STANDBY),
      .rx_other(!cut && rw == LW_IDLE), .rx_any(!cut), .state(st[i]), .tx_word(tw[i]),
      .active(act[i]), .reinit(reinit[i]));
    always @(posedge clk) begin
      pipe[i][0] <= tw[i]; pipe[i][1] <= pipe[i][0]; pipe[i][2] <= pipe[i][1];
      if (st[i] == LS_CONNECTED) n_init3[i]++;
      else if (st[i] != LS_ACTIVE) n_init3[i] = 0;
    end
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // each side must pass through the handshake states in order
  int seen [2][8];
  always @(posedge clk) for (int i = 0; i < 2; i++) seen[i][int'(st[i])]++;

  task automatic wait_both_active(int limit, string s);
    int t = 0;
    while (!(act[0] && act[1]) && t < limit) begin @(posedge clk); t++; end
    chk(act[0] && act[1], s);
  endtask

  int rcnt = 0;
  always @(posedge clk) if (reinit[0] || reinit[1]) rcnt++;

  initial begin
    for (int i = 0; i < 2; i++) begin start[i] = 0; auto[i] = 1; stby[i] = 0; sync[i] = 1; end
    cut = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // side 0 starts, side 1 follows by auto start
    start[0] = 1; @(posedge clk); #1 start[0] = 0;
    wait_both_active(2000, "both active after start");
    for (int i = 0; i < 2; i++) begin
      chk(seen[i][LS_STARTED] > 0 && seen[i][LS_CONNECTING] > 0 && seen[i][LS_CONNECTED] > 0,
          "handshake states visited");
      chk(n_init3[i] >= MIN3, "enough INIT3 sent");
    end
    repeat (50) @(posedge clk);
    chk(act[0] && act[1], "stays active");

    // standby from side 1: both disabled
    #1 stby[1] = 1; @(posedge clk); #1 stby[1] = 0;
    repeat (40) @(posedge clk);
    chk(st[0] == LS_DISABLED && st[1] == LS_DISABLED, "standby disables both ends");

    // far end silent: side 0 gives up after TIMEOUT cycles in STARTED
    auto[1] = 0; cut = 1;
    #1 start[0] = 1; @(posedge clk); #1 start[0] = 0;
    wait (st[0] == LS_STARTED);
    begin
      int t = 0;
      while (st[0] == LS_STARTED && t < 10 * TMO) begin @(posedge clk); t++; end
      chk(st[0] == LS_WAIT, "timeout back to WAIT");
      chk(t >= TMO && t <= TMO + 2, $sformatf("STARTED timeout %0d cycles", t));
    end
    cut = 0; auto[1] = 1;
    wait_both_active(4000, "both active after restart");

    // loss of sync on side 1 while active
    repeat (20) @(posedge clk);
    #1 sync[1] = 0;
    repeat (5) @(posedge clk);
    chk(rcnt > 0, "reinit pulse on loss of sync");
    chk(!act[1], "lane left ACTIVE");
    #1 sync[1] = 1;
    wait_both_active(4000, "active again after sync returns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
