`timescale 1ps/1ps
// tb_spfi_lane_layer - two lane layers joined back to back through their 40-bit
// SerDes ports, with bit offsets of 13 and 27 and clocks 0.1 % apart. Each side sends
// a counting stream of data words whenever it may; the far end must receive every
// word once and in order. SKIPs must be sent, and dropped on one side and repeated on
// the other. Then standby from one end disables both lanes and a lane start brings
// them back.
module tb_spfi_lane_layer;
  import spfi_pkg::*;
  logic clk [2], rst_n = 0;
  initial begin clk[0] = 0; clk[1] = 0; end
  always #8000 clk[0] = ~clk[0];
  always #8008 clk[1] = ~clk[1];
  int checks = 0, failures = 0;

  logic start [2], stby [2], txv [2], txr [2], rxv [2], rxe [2], act [2], syn [2], rein [2];
  logic cerr [2], ss [2], sd [2], sr [2], tapv [2];
  word_t txw [2], rxw [2], tt [2], rt [2];
  logic [39:0] tc [2], rc [2];
  logic [79:0] pair [2];
  lane_state_e st [2];
  int sent [2], expn [2], got [2], nss [2], nsd [2], nsr [2];

  for (genvar i = 0; i < 2; i++) begin : g
    localparam int SH = (i == 0) ? 13 : 27;
    spfi_lane_layer #(.SKIP_INTERVAL(100), .EB_DEPTH(16), .WAIT_CYCLES(40), .TIMEOUT(2048)) u (
      .clk(clk[i]), .rst_n, .lane_start(start[i]), .auto_start(1'b1), .lane_standby(stby[i]),
      .dl_tx_valid(txv[i]), .dl_tx_word(txw[i]), .dl_tx_ready(txr[i]),
      .dl_rx_valid(rxv[i]), .dl_rx_word(rxw[i]), .dl_rx_err(rxe[i]),
      .tx_code(tc[i]), .rx_clk(clk[1-i]), .rx_rst_n(rst_n), .rx_code(rc[1-i]),
      .state(st[i]), .active(act[i]), .rx_synced(syn[i]), .reinit(rein[i]), .code_error(cerr[i]),
      .skip_sent(ss[i]), .skip_dropped(sd[i]), .skip_repeated(sr[i]),
      .tx_tap(tt[i]), .rx_tap_valid(tapv[i]), .rx_tap(rt[i]));
    // the line: side i's code stream, bit shifted, as seen by the other side
    always @(posedge clk[i]) pair[i] <= {pair[i][39:0], tc[i]};
    assign rc[i] = pair[i][79 - SH -: 40];
    assign txv[i] = act[i];
    assign txw[i] = word_t'{k: 4'h0, d: 32'(sent[i])};
    always @(posedge clk[i]) begin
      if (txv[i] && txr[i]) sent[i]++;
      if (ss[i]) nss[i]++;
      if (sr[i]) nsr[i]++;
      if (rxv[i]) begin
        checks++;
        if (rxe[i] || (expn[i] >= 0 && rxw[i].d != 32'(expn[i]))) begin
          failures++; $display("FAIL side %0d got %0d expected %0d", i, rxw[i].d, expn[i]);
        end
        expn[i] = int'(rxw[i].d) + 1;
        got[i]++;
      end
      if (!act[i]) expn[i] = -1;
    end
    always @(posedge clk[1-i]) if (sd[i]) nsd[i]++;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      start[i] = 0; stby[i] = 0; sent[i] = 0; expn[i] = -1; got[i] = 0;
      nss[i] = 0; nsd[i] = 0; nsr[i] = 0; pair[i] = '0;
    end
    repeat (3) @(posedge clk[0]); #1 rst_n = 1;
    #1 start[0] = 1; @(posedge clk[0]); #1 start[0] = 0;
    begin
      int t = 0;
      while (!(act[0] && act[1]) && t < 5000) begin @(posedge clk[0]); t++; end
      chk(act[0] && act[1], "both lanes active");
      $display("lanes active after %0d cycles", t);
    end
    repeat (30000) @(posedge clk[0]);
    for (int i = 0; i < 2; i++) begin
      chk(got[i] > 25000, $sformatf("side %0d received %0d words", i, got[i]));
      chk(nss[i] > 250, "SKIPs sent");
    end
    $display("SKIP dropped %0d/%0d repeated %0d/%0d", nsd[0], nsd[1], nsr[0], nsr[1]);
    chk(nsd[0] + nsd[1] > 0, "SKIPs dropped");
    chk(nsr[0] + nsr[1] > 0, "SKIPs repeated");
    chk(!rein[0] && !rein[1] && syn[0] && syn[1], "still synchronised");
    // standby and restart
    #1 stby[0] = 1; @(posedge clk[0]); #1 stby[0] = 0;
    repeat (100) @(posedge clk[0]);
    chk(st[0] == LS_DISABLED && st[1] == LS_DISABLED, "standby disables both lanes");
    #1 start[1] = 1; @(posedge clk[1]); #1 start[1] = 0;
    begin
      int t = 0, g0;
      while (!(act[0] && act[1]) && t < 5000) begin @(posedge clk[0]); t++; end
      chk(act[0] && act[1], "both lanes active again");
      g0 = got[0];
      repeat (2000) @(posedge clk[0]);
      chk(got[0] > g0 + 1500, "data flows again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk[0]); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
