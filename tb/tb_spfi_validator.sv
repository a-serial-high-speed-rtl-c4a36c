`timescale 1ps/1fs
// tb_spfi_validator - end-to-end test of the validation system at its default
// parameters. Two validation systems stand in for the two boards of the set-up; their
// port 0s are linked, and so are their port 1s. Board B's clock runs 100 ppm slower
// than board A's, so the elastic buffers have to drop and repeat SKIP words. Every
// line is shifted by a number of bits, so each receiver must find word alignment.
//
// Port 0 link: packet generator -> packet consumer in both directions on VC 0, first
//   clean (the data rate is checked against one word per clock), then with bit errors
//   injected into both transmit streams. Retries must repair every damaged frame: the
//   consumers must see no data or framing error.
// Port 1 link: host traffic from this bench on VC 1..3, with every word checked at the
//   far end. It covers BC messages both ways, priority (VC 1 above VC 2), bandwidth
//   shares (75/25), flow control (far end stops reading VC 3, the sender must stall),
//   and the rolling memory (trigger on a received BC word, interrupt, read-back).
// Each mechanism is counted; any mechanism that never happened counts as a failure.
module tb_spfi_validator;
  import spfi_pkg::*;
  localparam int NV = 4;

  logic clk [2], hclk = 0, rst_n = 0;
  initial begin clk[0] = 0; clk[1] = 0; end
  always #8000    clk[0] = ~clk[0];       // 62.5 MHz
  always #8000.8  clk[1] = ~clk[1];       // 100 ppm slower
  always #5000    hclk = ~hclk;           // host side
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ---------------- the two systems ----------------
  logic          mwe [2][2];
  logic [7:0]    maddr [2][2];
  logic [31:0]   mwd [2][2], mrd [2][2];
  logic [NV-1:0] ovw [2][2], ovf [2][2], ivr [2][2], ive [2][2];
  logic [32:0]   ovd [2][2][NV], ivd [2][2][NV];
  logic          obw [2][2], obf [2][2], ibr [2][2], ibe [2][2];
  logic [71:0]   obd [2][2], ibd [2][2];
  gen_ctrl_t     gc [2][2];
  gen_stat_t     gs [2][2];
  chk_ctrl_t     cc [2][2];
  chk_stat_t     cs [2][2];
  inj_ctrl_t     itx [2][2], irx [2][2];
  logic [15:0]   itxn [2][2], irxn [2][2];
  rm_ctrl_t      rmc [2][2];
  logic          rmi [2][2];
  word_t         rmd [2][2];
  logic [39:0]   txc [2][2], rxc [2][2];
  logic          rxclk [2][2], rxrst [2][2];
  logic          e_retry [2][2], e_ferr [2][2], e_ss [2][2], e_sd [2][2], e_sr [2][2], e_bc [2][2];
  logic [NV-1:0] e_vc [2][2];

  for (genvar s = 0; s < 2; s++) begin : g_sys
    spfi_validator u (
      .clk(clk[s]), .rst_n, .hclk, .hrst_n(rst_n),
      .mgmt_we(mwe[s]), .mgmt_addr(maddr[s]), .mgmt_wdata(mwd[s]), .mgmt_rdata(mrd[s]),
      .out_vc_wr(ovw[s]), .out_vc_data(ovd[s]), .out_vc_full(ovf[s]),
      .in_vc_rd(ivr[s]), .in_vc_data(ivd[s]), .in_vc_empty(ive[s]),
      .out_bc_wr(obw[s]), .out_bc_data(obd[s]), .out_bc_full(obf[s]),
      .in_bc_rd(ibr[s]), .in_bc_data(ibd[s]), .in_bc_empty(ibe[s]),
      .gen_ctrl(gc[s]), .gen_stat(gs[s]), .chk_ctrl(cc[s]), .chk_stat(cs[s]),
      .inj_tx_ctrl(itx[s]), .inj_rx_ctrl(irx[s]), .inj_tx_count(itxn[s]), .inj_rx_count(irxn[s]),
      .rm_ctrl(rmc[s]), .rm_irq(rmi[s]), .rm_data(rmd[s]),
      .tx_code(txc[s]), .rx_clk(rxclk[s]), .rx_rst_n(rxrst[s]), .rx_code(rxc[s]),
      .ev_retry(e_retry[s]), .ev_frame_error(e_ferr[s]), .ev_skip_sent(e_ss[s]),
      .ev_skip_dropped(e_sd[s]), .ev_skip_repeated(e_sr[s]), .ev_vc_frame(e_vc[s]),
      .ev_bc_frame(e_bc[s])
    );
    for (genvar p = 0; p < 2; p++) begin : g_line
      localparam int SH = (s == 0) ? ((p == 0) ? 13 : 7) : ((p == 0) ? 27 : 34);
      // the receiver's clock is the far transmitter's clock, recovered by the SerDes
      assign rxclk[s][p] = clk[1-s];
      assign rxrst[s][p] = rst_n;
      logic [79:0] line;
      always @(posedge clk[s]) line <= {line[39:0], txc[s][p]};
      assign rxc[1-s][p] = line[79 - SH -: 40];
    end
  end

  // ---------------- mechanism counters ----------------
  int n_retry [2], n_ferr [2], n_ss [2], n_sd [2], n_sr [2], n_bcf [2], n_vcf [2][NV];
  int cyc = 0;
  for (genvar s = 0; s < 2; s++) begin : g_cnt
    always @(posedge clk[s]) begin
      for (int p = 0; p < 2; p++) begin
        if (e_retry[s][p]) n_retry[s]++;
        if (e_ferr[s][p])  n_ferr[s]++;
        if (e_ss[s][p])    n_ss[s]++;
        if (e_sr[s][p])    n_sr[s]++;
        if (e_bc[s][p])    n_bcf[s]++;
      end
      for (int v = 0; v < NV; v++) if (e_vc[s][0][v] || e_vc[s][1][v]) n_vcf[s][v]++;
    end
    // drops happen in the receive clock, which is the other board's clock
    always @(posedge clk[1-s]) for (int p = 0; p < 2; p++) if (e_sd[s][p]) n_sd[s]++;
  end
  always @(posedge clk[0]) cyc++;

  // VC frame starts on A port 1, counted per VC while a contention window is open
  logic win_open = 0;
  int   win_frames [NV];
  always @(posedge clk[0]) if (win_open)
    for (int v = 0; v < NV; v++) if (e_vc[0][1][v]) win_frames[v]++;

  // ---------------- host traffic on port 1, A -> B ----------------
  // word = {eop, vc[7:0], count[23:0]}, packets of 32 words
  int  to_send [NV], sent_n [NV], recv_n [NV];
  logic rd_en_b [NV];
  int  fc_stall = 0;
  always @(posedge hclk) if (rst_n) begin
    for (int v = 0; v < NV; v++) begin
      if (ovw[0][1][v] && !ovf[0][1][v]) begin sent_n[v] <= sent_n[v] + 1; to_send[v] <= to_send[v] - 1; end
      if (ovf[0][1][v] && to_send[v] > 0 && !rd_en_b[v]) fc_stall++;
    end
  end
  always @* for (int v = 0; v < NV; v++) begin
    ovw[0][1][v] = (to_send[v] > 0);
    ovd[0][1][v] = {sent_n[v] % 32 == 31, 8'(v), 24'(sent_n[v])};
    ivr[1][1][v] = rd_en_b[v] && !ive[1][1][v];
  end
  always @(posedge hclk) if (rst_n) begin
    for (int v = 0; v < NV; v++) if (ivr[1][1][v]) begin
      logic [32:0] exp_w;
      exp_w = {recv_n[v] % 32 == 31, 8'(v), 24'(recv_n[v])};
      checks++;
      if (ivd[1][1][v] !== exp_w) begin
        failures++; $display("FAIL VC%0d word %0d: %h expected %h", v, recv_n[v], ivd[1][1][v], exp_w);
      end
      recv_n[v] <= recv_n[v] + 1;
    end
  end

  // ---------------- BC messages on port 1, both ways ----------------
  int bc_sent [2], bc_recv [2];
  int bc_to_send [2];
  logic [31:0] bc_tag [2];
  for (genvar s = 0; s < 2; s++) begin : g_bc
    always @* begin
      obw[s][1]   = (bc_to_send[s] > 0) && !obf[s][1];
      obd[s][1]   = {8'(s), bc_tag[s], 16'(s), 16'(bc_sent[s])};
      ibr[1-s][1] = !ibe[1-s][1];
    end
    always @(posedge hclk) if (rst_n) begin
      if (obw[s][1]) begin bc_sent[s] <= bc_sent[s] + 1; bc_to_send[s] <= bc_to_send[s] - 1; end
      if (ibr[1-s][1]) begin
        checks++;
        if (ibd[1-s][1] != {8'(s), bc_tag[s], 16'(s), 16'(bc_recv[s])}) begin
          failures++; $display("FAIL BC message %h", ibd[1-s][1]);
        end
        bc_recv[s] <= bc_recv[s] + 1;
      end
    end
  end

  // ---------------- management ----------------
  task automatic mgmt_wr(int s, int p, logic [7:0] a, logic [31:0] d);
    @(negedge clk[s]);
    mwe[s][p] = 1; maddr[s][p] = a; mwd[s][p] = d;
    @(negedge clk[s]);
    mwe[s][p] = 0; maddr[s][p] = 8'h40;
  endtask
  function automatic lane_state_e lane_of(int s, int p);
    return lane_state_e'(mrd[s][p][2:0]);
  endfunction

  task automatic wait_host_done(int limit);
    int t = 0;
    while (t < limit) begin
      bit busy;
      busy = 0;
      for (int v = 1; v < NV; v++) if (to_send[v] > 0 || recv_n[v] < sent_n[v]) busy = 1;
      if (!busy) break;
      @(posedge clk[0]); t++;
    end
  endtask

  int n_active = 0, n_prio = 0, n_bw = 0, n_rm = 0;
  real rate;

  initial begin
    for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
      mwe[s][p] = 0; maddr[s][p] = 8'h40; mwd[s][p] = 0;
      obw[s][0] = 0; obd[s][0] = '0; ibr[s][0] = 0;
      gc[s][p] = '0; cc[s][p] = '0; itx[s][p] = '0; irx[s][p] = '0; rmc[s][p] = '0;
      for (int v = 0; v < NV; v++) begin
        if (!(s == 0 && p == 1)) begin ovw[s][p][v] = 0; ovd[s][p][v] = '0; end
        if (!(s == 1 && p == 1)) ivr[s][p][v] = 0;
      end
    end
    for (int v = 0; v < NV; v++) begin to_send[v] = 0; sent_n[v] = 0; recv_n[v] = 0; rd_en_b[v] = 1; win_frames[v] = 0; end
    for (int s = 0; s < 2; s++) begin
      n_retry[s] = 0; n_ferr[s] = 0; n_ss[s] = 0; n_sd[s] = 0; n_sr[s] = 0; n_bcf[s] = 0;
      for (int v = 0; v < NV; v++) n_vcf[s][v] = 0;
      bc_sent[s] = 0; bc_recv[s] = 0; bc_to_send[s] = 0; bc_tag[s] = 32'h5EED_0000 + 32'(s);
    end
    repeat (5) @(posedge clk[0]);
    #1 rst_n = 1;

    // scrambling on at both ends; A starts its lanes, B follows on hearing them
    for (int p = 0; p < 2; p++) begin
      mgmt_wr(0, p, 8'h00, 32'b1011);
      mgmt_wr(1, p, 8'h00, 32'b1010);
    end
    begin
      int t = 0;
      while (t < 20000) begin
        bit all;
        all = 1;
        for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) if (lane_of(s, p) != LS_ACTIVE) all = 0;
        if (all) break;
        @(posedge clk[0]); t++;
      end
      for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) if (lane_of(s, p) == LS_ACTIVE) n_active++;
      $display("lanes active after %0d cycles", t);
    end

    // ---- port 0: generator -> consumer, both directions, clean line ----
    for (int s = 0; s < 2; s++) begin
      @(negedge hclk);
      cc[1-s][0] = '{start: 1, enable: 1, vc: 5'd0, seed: 32'h1000 * (s + 1), step: 32'd3, pkt_len: 16'd100};
      gc[s][0]   = '{start: 1, stop: 0, vc: 5'd0, seed: 32'h1000 * (s + 1), step: 32'd3, pkt_len: 16'd100,
                     gap: 16'd0, num_pkts: 32'd0};
      @(negedge hclk);
      cc[1-s][0].start = 0; gc[s][0].start = 0;
    end
    // port 1: some host traffic and BC messages to start with
    to_send[1] = 300; to_send[2] = 300; to_send[3] = 300;
    bc_to_send[0] = 10; bc_to_send[1] = 10;
    repeat (2000) @(posedge clk[0]);
    begin
      int w0, c0;
      w0 = cs[1][0].words; c0 = cyc;
      repeat (20000) @(posedge clk[0]);
      rate = real'(cs[1][0].words - w0) / real'(cyc - c0);
      $display("port 0 data rate %0.3f words per clock (one word per clock = 2.5 Gbit/s line rate at 62.5 MHz)", rate);
      // frames of 64 data words carry SDF + EDF and share the line with ACK/FCT words
      chk(rate > 0.85 && rate <= 1.0, "port 0 data rate");
    end
    wait_host_done(50000);

    // ---- priority: VC 1 (priority 1) against VC 2 (priority 2) ----
    mgmt_wr(0, 1, 8'h12, {17'h0, 7'd50, 4'h0, 4'd1});
    mgmt_wr(0, 1, 8'h14, {17'h0, 7'd50, 4'h0, 4'd2});
    for (int v = 0; v < NV; v++) win_frames[v] = 0;
    @(negedge hclk); to_send[1] = 3000; to_send[2] = 3000;
    win_open = 1;
    while (to_send[1] > 0) @(posedge clk[0]);
    win_open = 0;
    $display("priority window: VC1 %0d frames, VC2 %0d frames", win_frames[1], win_frames[2]);
    n_prio = win_frames[1];
    chk(win_frames[1] > 4 * win_frames[2], "higher priority VC served first");
    wait_host_done(100000);

    // ---- bandwidth: equal priority, 75 % against 25 % ----
    mgmt_wr(0, 1, 8'h12, {17'h0, 7'd75, 4'h0, 4'd1});
    mgmt_wr(0, 1, 8'h14, {17'h0, 7'd25, 4'h0, 4'd1});
    for (int v = 0; v < NV; v++) win_frames[v] = 0;
    @(negedge hclk); to_send[1] = 4000; to_send[2] = 4000;
    win_open = 1;
    // the window closes as soon as one of the two stops competing
    while (to_send[1] > 0 && to_send[2] > 0) @(posedge clk[0]);
    win_open = 0;
    $display("bandwidth window: VC1 %0d frames, VC2 %0d frames", win_frames[1], win_frames[2]);
    n_bw = win_frames[1] + win_frames[2];
    chk(win_frames[2] > 0 && win_frames[1] >= 2 * win_frames[2] && win_frames[1] <= 5 * win_frames[2],
        "bandwidth shares near 3:1");
    wait_host_done(100000);

    // ---- flow control: B stops reading VC 3 ----
    rd_en_b[3] = 0;
    @(negedge hclk); to_send[3] = 1500;
    repeat (15000) @(posedge clk[0]);
    chk(fc_stall > 0, "sender stalls while the far buffer is full");
    chk(to_send[3] > 0, "data held back at the sender");
    rd_en_b[3] = 1;
    wait_host_done(100000);
    chk(recv_n[3] == sent_n[3], "all VC 3 data delivered after the stall");

    // ---- rolling memory on A port 1: trigger on a BC word from B ----
    @(negedge clk[0]);
    rmc[0][1] = '{arm: 1, trig_rx: 1, trig_word: word_t'{k: 4'h0, d: 32'h5EED_0001}, rd_sel_rx: 1, rd_addr: '0};
    @(negedge clk[0]); rmc[0][1].arm = 0;
    repeat (200) @(posedge clk[0]);
    bc_to_send[1] = 1;
    begin
      int t = 0;
      while (!rmi[0][1] && t < 20000) begin @(posedge clk[0]); t++; end
      chk(rmi[0][1], "rolling memory interrupt");
      // the trigger word sits POST_TRIGGER + 1 words behind the final write pointer
      @(negedge clk[0]); rmc[0][1].rd_addr = 13'(8192 - 4096 - 1);
      @(negedge clk[0]); @(negedge clk[0]);
      chk(rmd[0][1] == rmc[0][1].trig_word, "trigger word recorded at its place");
      if (rmi[0][1] && rmd[0][1] == rmc[0][1].trig_word) n_rm++;
    end

    // ---- port 0 with bit errors in both directions ----
    @(negedge clk[0]);
    itx[0][0] = '{mode: 2'd2, arm: 0, mask: 40'h00_0040_0000, period: 16'd2999, count: 16'd40};
    @(negedge clk[1]);
    itx[1][0] = '{mode: 2'd2, arm: 0, mask: 40'h00_0000_2000, period: 16'd4001, count: 16'd25};
    repeat (140000) @(posedge clk[0]);
    $display("errors injected A->B %0d, B->A %0d", itxn[0][0], itxn[1][0]);
    chk(itxn[0][0] == 40 && itxn[1][0] == 25, "all errors injected");
    repeat (5000) @(posedge clk[0]);
    // stop the generators and let the consumers drain
    for (int s = 0; s < 2; s++) begin
      @(negedge hclk); gc[s][0].stop = 1; @(negedge hclk); gc[s][0].stop = 0;
    end
    repeat (5000) @(posedge clk[0]);
    for (int s = 0; s < 2; s++) begin
      $display("consumer %0d: %0d packets, %0d words, data errors %0d, frame errors %0d (generator sent %0d)",
               1 - s, cs[1-s][0].pkts, cs[1-s][0].words, cs[1-s][0].data_errors, cs[1-s][0].frame_errors,
               gs[s][0].pkts_sent);
      chk(cs[1-s][0].data_errors == 0 && cs[1-s][0].frame_errors == 0, "consumer saw clean data");
      chk(cs[1-s][0].pkts == gs[s][0].pkts_sent, "every packet delivered");
    end
    chk(bc_recv[0] == bc_sent[0] && bc_recv[1] == bc_sent[1], "all BC messages delivered");
    for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++)
      chk(lane_of(s, p) == LS_ACTIVE, "lane still active at the end");

    // ---- mechanism counts ----
    $display("mechanism counts:");
    $display("  lanes active          %0d", n_active);
    $display("  data frames A  VC0..3 %0d %0d %0d %0d", n_vcf[0][0], n_vcf[0][1], n_vcf[0][2], n_vcf[0][3]);
    $display("  data frames B  VC0    %0d", n_vcf[1][0]);
    $display("  BC frames A/B         %0d %0d", n_bcf[0], n_bcf[1]);
    $display("  retries A/B           %0d %0d", n_retry[0], n_retry[1]);
    $display("  frames rejected A/B   %0d %0d", n_ferr[0], n_ferr[1]);
    $display("  SKIP sent A/B         %0d %0d", n_ss[0], n_ss[1]);
    $display("  SKIP dropped A/B      %0d %0d", n_sd[0], n_sd[1]);
    $display("  SKIP repeated A/B     %0d %0d", n_sr[0], n_sr[1]);
    $display("  priority wins         %0d", n_prio);
    $display("  bandwidth-shared      %0d", n_bw);
    $display("  flow-control stall    %0d", fc_stall);
    $display("  rolling memory        %0d", n_rm);
    $display("  generator packets     %0d %0d", gs[0][0].pkts_sent, gs[1][0].pkts_sent);
    chk(n_active == 4, "lane initialisation");
    for (int v = 0; v < NV; v++) chk(n_vcf[0][v] > 0, $sformatf("VC %0d data frames", v));
    chk(n_vcf[1][0] > 0, "B data frames");
    chk(n_bcf[0] > 0 && n_bcf[1] > 0, "BC frames");
    chk(n_retry[0] + n_retry[1] > 0, "retries");
    chk(n_ferr[0] + n_ferr[1] > 0, "frames rejected");
    chk(n_ss[0] > 0 && n_ss[1] > 0, "SKIP sent");
    chk(n_sd[0] + n_sd[1] > 0, "SKIP dropped");
    chk(n_sr[0] + n_sr[1] > 0, "SKIP repeated");
    chk(n_prio > 0, "priority");
    chk(n_bw > 0, "bandwidth");
    chk(fc_stall > 0, "flow control");
    chk(n_rm > 0, "rolling memory");
    chk(gs[0][0].pkts_sent > 0 && gs[1][0].pkts_sent > 0, "generators");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
