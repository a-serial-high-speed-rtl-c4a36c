// tb_spfi_data_link - two data link layers joined word for word through a channel
// with a few cycles of delay that damages words: some have a data bit flipped, some
// arrive flagged as decoder errors, some are lost. The transmit side also pauses
// now and then, as it does for SKIP words. Both ends send packets on all four VCs and
// BC messages. Every packet word and BC message must arrive exactly once and in order;
// frames must have been rejected and retries must have happened.
module tb_spfi_data_link;
  import spfi_pkg::*;
  localparam int NV = 4, NW = 3000;
  logic clk = 0, hclk = 0, rst_n = 0;
  always #8 clk = ~clk;
  always #5 hclk = ~hclk;
  int checks = 0, failures = 0;

  codec_cfg_t cfg;
  vc_cfg_t    vcc [NV];
  logic [NV-1:0] ow [2], of [2], ir [2], ie [2], vfs [2];
  logic [32:0]   od [2][NV], idt [2][NV];
  logic          bw [2], bf [2], br [2], be [2];
  logic [71:0]   bd [2], bi [2];
  logic          txv [2], txr [2], rxv [2], rxe [2], ferr [2], fok [2], rst [2], bfs [2];
  word_t         txw [2], rxw [2];
  rx_state_e     rs [2];
  int sent [2][NV], recv [2][NV], bsent [2], brecv [2];
  int n_retry = 0, n_ferr = 0, n_dmg = 0, n_mixed = 0;

  for (genvar i = 0; i < 2; i++) begin : g
    spfi_data_link #(.NUM_VC(NV), .RETRY_TIMEOUT(400)) u (
      .clk, .rst_n, .cfg, .vc_cfg(vcc), .hclk, .hrst_n(rst_n),
      .out_vc_wr(ow[i]), .out_vc_data(od[i]), .out_vc_full(of[i]),
      .in_vc_rd(ir[i]), .in_vc_data(idt[i]), .in_vc_empty(ie[i]),
      .out_bc_wr(bw[i]), .out_bc_data(bd[i]), .out_bc_full(bf[i]),
      .in_bc_rd(br[i]), .in_bc_data(bi[i]), .in_bc_empty(be[i]),
      .lane_active(rst_n), .tx_valid(txv[i]), .tx_word(txw[i]), .tx_ready(txr[i]),
      .rx_valid(rxv[i]), .rx_word(rxw[i]), .rx_err(rxe[i]), .rx_state(rs[i]),
      .frame_error(ferr[i]), .frame_ok(fok[i]), .retry_start(rst[i]),
      .vc_frame_start(vfs[i]), .bc_frame_start(bfs[i]));

    // channel i: from side i to side 1-i, 4 cycles of delay, damage
    logic  pv [4]; word_t pw [4]; logic pe [4];
    int    pause;
    always @(posedge clk) begin
      pause <= (pause == 0) ? 97 + i : pause - 1;
      pv[0] <= txv[i] && txr[i]; pw[0] <= txw[i]; pe[0] <= 1'b0;
      for (int k = 1; k < 4; k++) begin pv[k] <= pv[k-1]; pw[k] <= pw[k-1]; pe[k] <= pe[k-1]; end
      if (pv[2] && rst_n && $urandom % 400 == 0) begin
        int kind;
        kind = $urandom % 3;
        n_dmg++;
        case (kind)
          0: pw[3] <= word_t'{k: pw[2].k, d: pw[2].d ^ (32'h1 << ($urandom % 32))};
          1: pe[3] <= 1'b1;
          default: pv[3] <= 1'b0;
        endcase
      end
    end
    assign txr[i] = (pause != 0);
    assign rxv[1-i] = pv[3];
    assign rxw[1-i] = pw[3];
    assign rxe[1-i] = pe[3];

    // host: packets of 20 words, word = {eop, side, vc, count}
    always @* for (int v = 0; v < NV; v++) begin
      ow[i][v] = rst_n && sent[i][v] < NW;
      od[i][v] = {sent[i][v] % 20 == 19, 4'(i), 4'(v), 24'(sent[i][v])};
      ir[i][v] = !ie[i][v];
    end
    always @* begin
      bw[i] = rst_n && bsent[i] < 30;
      bd[i] = {8'(i), 32'hB0B0_0000, 32'(bsent[i])};
      br[i] = !be[i];
    end
    always @(posedge hclk) if (rst_n) begin
      for (int v = 0; v < NV; v++) begin
        if (ow[i][v] && !of[i][v]) sent[i][v] <= sent[i][v] + 1;
        if (ir[i][v]) begin
          checks++;
          if (idt[i][v] !== {recv[i][v] % 20 == 19, 4'(1 - i), 4'(v), 24'(recv[i][v])}) begin
            failures++; $display("FAIL side %0d VC %0d word %0d: %h", i, v, recv[i][v], idt[i][v]);
          end
          recv[i][v] <= recv[i][v] + 1;
        end
      end
      if (bw[i] && !bf[i]) bsent[i] <= bsent[i] + 1;
      if (br[i]) begin
        checks++;
        if (bi[i] != {8'(1 - i), 32'hB0B0_0000, 32'(brecv[i])}) begin failures++; $display("FAIL BC %h", bi[i]); end
        brecv[i] <= brecv[i] + 1;
      end
    end
    always @(posedge clk) begin
      if (rst[i]) n_retry++;
      if (ferr[i]) n_ferr++;
    end
  end

  initial begin
    cfg = '{lane_start: 1, auto_start: 1, lane_standby: 0, scramble_en: 1, bc_bandwidth: 7'd10, slot_cycles: 16'd0};
    for (int v = 0; v < NV; v++) vcc[v] = '{prio: 4'd1, bandwidth: 7'd25, slots: '1};
    for (int i = 0; i < 2; i++) begin
      bsent[i] = 0; brecv[i] = 0;
      for (int v = 0; v < NV; v++) begin sent[i][v] = 0; recv[i][v] = 0; end
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    begin
      int t = 0;
      bit done;
      done = 0;
      while (!done && t < 200000) begin
        @(posedge clk); t++;
        done = 1;
        for (int i = 0; i < 2; i++) begin
          if (brecv[i] < 30) done = 0;
          for (int v = 0; v < NV; v++) if (recv[i][v] < NW) done = 0;
        end
      end
      $display("done after %0d cycles: %0d words damaged, %0d frames rejected, %0d retries",
               t, n_dmg, n_ferr, n_retry);
    end
    for (int i = 0; i < 2; i++) begin
      checks++; if (brecv[i] != 30) begin failures++; $display("FAIL BC count"); end
      for (int v = 0; v < NV; v++) begin
        checks++; if (recv[i][v] != NW) begin failures++; $display("FAIL side %0d VC %0d got %0d", i, v, recv[i][v]); end
      end
    end
    checks++; if (n_retry == 0) begin failures++; $display("FAIL no retry"); end
    checks++; if (n_ferr == 0) begin failures++; $display("FAIL no frame rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
