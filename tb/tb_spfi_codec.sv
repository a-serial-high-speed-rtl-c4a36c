// tb_spfi_codec - two CODECs joined back to back (A transmits to B and B to A), with
// the serial stream of each direction shifted by a number of bits so that the
// receivers must find the word alignment themselves. A's host writes packets of
// incrementing words on every VC and a few broadcast messages; B's host reads them
// back and compares word by word, EOP flags included. The host clock differs from the
// CODEC clock. Checks: lane reaches ACTIVE at both ends, every word and packet
// boundary arrives in order on the right VC, every BC message arrives, SKIP words are
// sent, and the achieved throughput is plausible.
`timescale 1ns/1ps
module tb_spfi_codec;
  import spfi_pkg::*;
  localparam int NV = 4;
  localparam int NPKT = 12;

  logic clk = 0, hclk = 0, rst_n = 0;
  always #8 clk = ~clk;        // 62.5 MHz
  always #5 hclk = ~hclk;      // 100 MHz host clock

  codec_cfg_t cfg;
  vc_cfg_t    vcc [NV];
  codec_status_t st_a, st_b;

  logic [NV-1:0] a_wr, a_full, b_rd, b_empty, a_rd_x, a_empty_x, b_wr_x, b_full_x;
  logic [32:0]   a_wdata [NV];
  logic [32:0]   b_rdata [NV], a_rdata_x [NV], b_wdata_x [NV];
  logic          a_bc_wr, a_bc_full, b_bc_rd, b_bc_empty;
  logic [71:0]   a_bc_data, b_bc_data, unused_bc_a;
  logic          unused_bcf_b, unused_bce_a;
  logic [39:0]   a_tx, b_tx, a_rx, b_rx, a_prev, b_prev;
  word_t         t0, t1, t2, t3;
  logic          tv0, tv1, e0, e1, e2, e3, e4, e5, e6, e7, e8, e9;
  logic [NV-1:0] fa, fb;

  spfi_codec #(.NUM_VC(NV), .SKIP_INTERVAL(200), .RETRY_TIMEOUT(512)) u_a (
    .clk, .rst_n, .cfg, .vc_cfg(vcc), .status(st_a), .hclk, .hrst_n(rst_n),
    .out_vc_wr(a_wr), .out_vc_data(a_wdata), .out_vc_full(a_full),
    .in_vc_rd('0), .in_vc_data(a_rdata_x), .in_vc_empty(a_empty_x),
    .out_bc_wr(a_bc_wr), .out_bc_data(a_bc_data), .out_bc_full(a_bc_full),
    .in_bc_rd(1'b0), .in_bc_data(unused_bc_a), .in_bc_empty(unused_bce_a),
    .tx_code(a_tx), .rx_clk(clk), .rx_rst_n(rst_n), .rx_code(a_rx),
    .tx_tap(t0), .rx_tap_valid(tv0), .rx_tap(t1), .ev_retry(e0), .ev_frame_error(e1),
    .ev_skip_sent(e2), .ev_skip_dropped(e3), .ev_skip_repeated(e4), .ev_vc_frame(fa), .ev_bc_frame(e5)
  );
  spfi_codec #(.NUM_VC(NV), .SKIP_INTERVAL(200), .RETRY_TIMEOUT(512)) u_b (
    .clk, .rst_n, .cfg, .vc_cfg(vcc), .status(st_b), .hclk, .hrst_n(rst_n),
    .out_vc_wr('0), .out_vc_data(b_wdata_x), .out_vc_full(b_full_x),
    .in_vc_rd(b_rd), .in_vc_data(b_rdata), .in_vc_empty(b_empty),
    .out_bc_wr(1'b0), .out_bc_data('0), .out_bc_full(unused_bcf_b),
    .in_bc_rd(b_bc_rd), .in_bc_data(b_bc_data), .in_bc_empty(b_bc_empty),
    .tx_code(b_tx), .rx_clk(clk), .rx_rst_n(rst_n), .rx_code(b_rx),
    .tx_tap(t2), .rx_tap_valid(tv1), .rx_tap(t3), .ev_retry(e6), .ev_frame_error(e7),
    .ev_skip_sent(e8), .ev_skip_dropped(e9), .ev_skip_repeated(), .ev_vc_frame(fb), .ev_bc_frame()
  );

  // serial links with a bit offset: A->B shifted by 13 bits, B->A by 27
  always_ff @(posedge clk) begin a_prev <= a_tx; b_prev <= b_tx; end
  assign b_rx = 40'({a_prev, a_tx} >> 13);
  assign a_rx = 40'({b_prev, b_tx} >> 27);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- stimulus: A host ----------------
  int plen [NV][NPKT];
  int sent_words = 0;
  initial begin
    for (int v = 0; v < NV; v++) for (int p = 0; p < NPKT; p++) plen[v][p] = 1 + ($urandom % 150);
  end

  function automatic logic [31:0] pat(int v, int p, int w);
    return {8'(v), 8'(p), 16'(w)};
  endfunction

  int wr_p [NV], wr_w [NV];
  logic done_wr;
  always_ff @(posedge hclk) begin
    if (!rst_n) begin
      a_wr <= '0; done_wr <= 1'b0;
      for (int v = 0; v < NV; v++) begin wr_p[v] <= 0; wr_w[v] <= 0; a_wdata[v] <= '0; end
    end else begin
      logic d;
      d = 1'b1;
      for (int v = 0; v < NV; v++) begin
        a_wr[v] <= 1'b0;
        if (wr_p[v] < NPKT) begin
          d = 1'b0;
          if (!a_full[v] && !(a_wr[v]) && ($urandom % 4 != 0)) begin
            a_wr[v]    <= 1'b1;
            a_wdata[v] <= {wr_w[v] == plen[v][wr_p[v]] - 1, pat(v, wr_p[v], wr_w[v])};
            if (wr_w[v] == plen[v][wr_p[v]] - 1) begin wr_w[v] <= 0; wr_p[v] <= wr_p[v] + 1; end
            else wr_w[v] <= wr_w[v] + 1;
          end
        end
      end
      done_wr <= d;
    end
  end

  // BC messages
  int bc_sent = 0;
  initial begin
    a_bc_wr = 0; a_bc_data = '0;
    wait (rst_n);
    repeat (3000) @(posedge hclk);
    for (int i = 0; i < 6; i++) begin
      @(posedge hclk);
      while (a_bc_full) @(posedge hclk);
      a_bc_wr <= 1; a_bc_data <= {8'(i + 3), 32'hBC00_0000 + 32'(i), 32'h1234_0000 + 32'(i)};
      @(posedge hclk); a_bc_wr <= 0;
      bc_sent++;
      repeat (200) @(posedge hclk);
    end
  end

  // ---------------- B host: read and compare ----------------
  int rd_p [NV], rd_w [NV];
  int words_ok = 0, pkts_ok = 0, bc_ok = 0;
  always_ff @(posedge hclk) begin
    if (!rst_n) begin
      b_rd <= '0; b_bc_rd <= 1'b0;
      for (int v = 0; v < NV; v++) begin rd_p[v] <= 0; rd_w[v] <= 0; end
    end else begin
      for (int v = 0; v < NV; v++) begin
        b_rd[v] <= 1'b0;
        if (!b_empty[v] && !b_rd[v]) begin
          logic last;
          b_rd[v] <= 1'b1;
          last = (rd_w[v] == plen[v][rd_p[v]] - 1);
          checks++;
          if (b_rdata[v] != {last, pat(v, rd_p[v], rd_w[v])}) begin
            failures++;
            $display("FAIL vc%0d pkt%0d word%0d got %h", v, rd_p[v], rd_w[v], b_rdata[v]);
          end else words_ok++;
          if (last) begin rd_w[v] <= 0; rd_p[v] <= rd_p[v] + 1; pkts_ok++; end
          else rd_w[v] <= rd_w[v] + 1;
        end
      end
      b_bc_rd <= 1'b0;
      if (!b_bc_empty && !b_bc_rd) begin
        b_bc_rd <= 1'b1;
        checks++;
        if (b_bc_data != {8'(bc_ok + 3), 32'hBC00_0000 + 32'(bc_ok), 32'h1234_0000 + 32'(bc_ok)}) begin
          failures++; $display("FAIL bc %0d got %h", bc_ok, b_bc_data);
        end
        bc_ok++;
      end
    end
  end

  int skips = 0, frames = 0;
  int cyc = 0, c_first = -1, c_last = 0;
  always @(posedge clk) begin
    cyc++;
    if (e2) skips++;
    if (|fa) begin frames++; if (c_first < 0) c_first = cyc; end
  end

  // ---------------- sequence ----------------
  int total_words;
  initial begin
    cfg = '{lane_start: 1'b1, auto_start: 1'b1, lane_standby: 1'b0, scramble_en: 1'b1,
            bc_bandwidth: 7'd10, slot_cycles: 16'd0};
    for (int v = 0; v < NV; v++) vcc[v] = '{prio: 4'(1 + v / 2), bandwidth: 7'd25, slots: '1};
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (st_a.lane_state == LS_ACTIVE && st_b.lane_state == LS_ACTIVE);
    check(1, "lanes active");
    $display("lanes active after %0d cycles", cyc);
    total_words = 0;
    for (int v = 0; v < NV; v++) for (int p = 0; p < NPKT; p++) total_words += plen[v][p];
    wait (pkts_ok == NV * NPKT && bc_ok == 6);
    c_last = cyc;
    repeat (100) @(posedge clk);
    check(words_ok == total_words, "all words received");
    check(skips > 0, "SKIP words sent");
    check(st_a.crc_errors == 0 && st_b.crc_errors == 0, "no frame errors on a clean link");
    $display("words=%0d frames=%0d cycles=%0d, words/cycle=%f", total_words, frames,
             c_last - c_first, real'(total_words) / real'(c_last - c_first));
    // one word per clock is the line rate; short packets, SKIPs and FCT/ACK words cost some
    check(real'(total_words) / real'(c_last - c_first) > 0.6, "throughput");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog: pkts=%0d/%0d bc=%0d lane %s %s", pkts_ok, NV*NPKT, bc_ok, st_a.lane_state.name(), st_b.lane_state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
