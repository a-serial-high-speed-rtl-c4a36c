// tb_spfi_dl_tx - a data frame and a BC frame go through the transmit path with
// scrambling on, while ACK, NACK and FCT requests arrive at random and the link
// stalls at random. A reference model in the bench scrambles the data words (generator
// restarted at SDF) and computes the CRC-16 of each frame; the output must match it
// word for word once the control words are taken out, and every control word must
// carry its argument and a correct CRC-8.
module tb_spfi_dl_tx;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv, ir, nreq, nd, areq, ad, freq, fd, ov, ordy, scr;
  logic [7:0] nseq, aseq, farg;
  word_t iw, ow;
  spfi_dl_tx dut (.clk, .rst_n, .scramble_en(scr), .in_valid(iv), .in_word(iw), .in_ready(ir),
    .nack_req(nreq), .nack_seq(nseq), .nack_done(nd), .ack_req(areq), .ack_seq(aseq), .ack_done(ad),
    .fct_req(freq), .fct_arg(farg), .fct_done(fd), .out_valid(ov), .out_word(ow), .out_ready(ordy));

  word_t in_q [$], exp_q [$];
  int n_ctrl = 0;

  // reference: one data frame (scrambled) and one BC frame (not scrambled)
  task automatic add_frame(bit bc, int n, int seq);
    logic [15:0] crc, s;
    logic [47:0] e;
    word_t w;
    logic [7:0] t;
    w = word_t'{k: 4'b0001, d: {8'(seq), 8'(bc ? 3 : 2), 8'(bc ? DW_SBF : DW_SDF), K28_3}};
    in_q.push_back(w); exp_q.push_back(w);
    crc = crc16_word(CRC16_INIT, w.d, 1);
    s = SCR_SEED;
    for (int i = 0; i < n; i++) begin
      logic [31:0] d, sent;
      d = $urandom;
      e = scr_step(s); s = e[47:32];
      sent = bc ? d : d ^ e[31:0];
      in_q.push_back(word_t'{k: 4'h0, d: d});
      exp_q.push_back(word_t'{k: 4'h0, d: sent});
      crc = crc16_word(crc, sent, 0);
    end
    t = 8'(bc ? DW_EBF : DW_EDF_EOP);
    in_q.push_back(word_t'{k: 4'b0001, d: {16'h0, t, K28_3}});
    exp_q.push_back(word_t'{k: 4'b0001, d: {crc16_byte(crc, t), t, K28_3}});
  endtask

  assign iv = in_q.size() != 0;
  assign iw = iv ? in_q[0] : '0;
  always @(posedge clk) if (rst_n) begin
    logic take;
    take = iv && ir;
    ordy <= ($urandom % 3 != 0);
    if (nd) nreq <= 0; else if (!nreq && $urandom % 40 == 0) begin nreq <= 1; nseq <= $urandom; end
    if (ad) areq <= 0; else if (!areq && $urandom % 30 == 0) begin areq <= 1; aseq <= $urandom; end
    if (fd) freq <= 0; else if (!freq && $urandom % 50 == 0) begin freq <= 1; farg <= $urandom; end
    if (ov && ordy) begin
      logic [7:0] t;
      t = ow.d[15:8];
      checks++;
      if (is_dl_ctrl(ow) && (t == 8'(DW_ACK) || t == 8'(DW_NACK) || t == 8'(DW_FCT))) begin
        n_ctrl++;
        if (ow.d[31:24] != ctrl_crc(t, ow.d[23:16])) begin failures++; $display("FAIL control CRC %h", ow); end
      end else if (exp_q.size() == 0 || ow != exp_q[0]) begin
        failures++; $display("FAIL out %h expected %h", ow, exp_q.size() ? exp_q[0] : '0);
        if (exp_q.size()) void'(exp_q.pop_front());
      end else void'(exp_q.pop_front());
    end
    #1 if (take) void'(in_q.pop_front());
  end
  // each control word carries the argument latched when it was requested
  always @(posedge clk) if (rst_n) begin
    if (nd) begin checks++; if (dut.next_word != dl_ctrl_word(DW_NACK, nseq)) failures++; end
    if (ad) begin checks++; if (dut.next_word != dl_ctrl_word(DW_ACK, aseq)) failures++; end
    if (fd) begin checks++; if (dut.next_word != dl_ctrl_word(DW_FCT, farg)) failures++; end
  end

  initial begin
    scr = 1; nreq = 0; areq = 0; freq = 0; nseq = 0; aseq = 0; farg = 0; ordy = 0;
    for (int f = 0; f < 20; f++) add_frame(f % 4 == 3, (f % 4 == 3) ? 2 : 1 + $urandom % 64, f);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    begin
      int t = 0;
      while ((exp_q.size() != 0) && t < 20000) begin @(posedge clk); t++; end
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL words missing"); end
    checks++; if (n_ctrl < 10) begin failures++; $display("FAIL few control words %0d", n_ctrl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
