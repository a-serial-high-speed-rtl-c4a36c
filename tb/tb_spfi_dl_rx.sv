// tb_spfi_dl_rx - hand-built word streams into the receive path (scrambling on):
//   good frame         -> words written to the right VC, committed, ACK requested
//   frame with bad CRC -> rolled back, NACK(expected sequence) requested
//   the frame again    -> committed, ACK
//   the same again     -> duplicate: nothing committed, re-ACKed
//   BC frame           -> BC message written
//   ACK/NACK/FCT words -> decoded for the transmit side; one with a bad CRC-8 ignored
// and the flow-control side must request an FCT for the free space it sees.
module tb_spfi_dl_rx;
  import spfi_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic iv, ie;
  word_t iw;
  logic [NV-1:0] vwr, vcm, vrb;
  logic [32:0] vwd;
  logic [8:0] vfree [NV];
  logic bwr, rack, rnack, rfct, areq, nreq, freq, ferr, fok;
  logic [71:0] bwd;
  logic [7:0] rseq, aseq, nseq, farg;
  logic [4:0] fvc; logic [2:0] fcnt;
  rx_state_e st;
  spfi_dl_rx #(.NUM_VC(NV), .VC_DEPTH(256), .MAX_FRAME(64)) dut (.clk, .rst_n, .scramble_en(1'b1),
    .lane_active(1'b1), .in_valid(iv), .in_word(iw), .in_err(ie), .vc_wr(vwr), .vc_wdata(vwd),
    .vc_commit(vcm), .vc_rollback(vrb), .vc_full('0), .vc_free(vfree), .bc_wr(bwr), .bc_wdata(bwd),
    .bc_full(1'b0), .rx_ack(rack), .rx_nack(rnack), .rx_seq(rseq), .rx_fct(rfct), .rx_fct_vc(fvc),
    .rx_fct_cnt(fcnt), .ack_req(areq), .ack_seq(aseq), .ack_done(areq), .nack_req(nreq),
    .nack_seq(nseq), .nack_done(nreq), .fct_req(freq), .fct_arg(farg), .fct_done(freq),
    .state(st), .frame_error(ferr), .frame_ok(fok));

  // monitors
  logic [32:0] got [$];
  int commits [NV], rollbacks = 0, acks = 0, nacks = 0, bcs = 0, fcts = 0;
  int last_ack = -1, last_nack = -1, n_rx_ack = 0, n_rx_nack = 0, n_rx_fct = 0;
  logic [71:0] last_bc;
  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < NV; v++) begin
      if (vwr[v]) got.push_back(vwd);
      if (vcm[v]) commits[v]++;
      if (vrb[v]) rollbacks++;
    end
    if (areq) begin acks++; last_ack = aseq; end
    if (nreq) begin nacks++; last_nack = nseq; end
    if (freq) fcts++;
    if (bwr) begin bcs++; last_bc = bwd; end
    if (rack) n_rx_ack++;
    if (rnack) n_rx_nack++;
    if (rfct) begin n_rx_fct++; chk(fvc == 5'd2 && fcnt == 3'd5, "FCT fields"); end
  end

  task automatic send(word_t w);
    @(negedge clk); iv = 1; iw = w; @(negedge clk); iv = 0;
  endtask
  // data frame with n words d0, d0+1, ...; bad_crc spoils the CRC field
  task automatic frame(int vc, int seq, int n, logic [31:0] d0, bit bad_crc);
    logic [15:0] crc, s;
    logic [47:0] e;
    word_t w;
    w = word_t'{k: 4'b0001, d: {8'(seq), 8'(vc), 8'(DW_SDF), K28_3}};
    send(w);
    crc = crc16_word(CRC16_INIT, w.d, 1);
    s = SCR_SEED;
    for (int i = 0; i < n; i++) begin
      e = scr_step(s); s = e[47:32];
      send(word_t'{k: 4'h0, d: (d0 + 32'(i)) ^ e[31:0]});
      crc = crc16_word(crc, (d0 + 32'(i)) ^ e[31:0], 0);
    end
    crc = crc16_byte(crc, 8'(DW_EDF_EOP));
    if (bad_crc) crc = ~crc;
    send(word_t'{k: 4'b0001, d: {crc, 8'(DW_EDF_EOP), K28_3}});
    repeat (3) @(negedge clk);
  endtask

  initial begin
    iv = 0; ie = 0; iw = '0;
    for (int v = 0; v < NV; v++) begin vfree[v] = 9'd256; commits[v] = 0; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (20) @(posedge clk);
    chk(fcts >= NV, "FCTs requested for the free space");

    frame(1, 0, 5, 32'h100, 0);
    chk(commits[1] == 1 && got.size() == 5 && acks == 1 && last_ack == 0, "good frame committed and ACKed");
    foreach (got[i]) chk(got[i] == {i == 4, 32'h100 + 32'(i)}, "descrambled data, EOP on last");
    got.delete();
    frame(2, 1, 7, 32'h200, 1);
    chk(rollbacks == 1 && commits[2] == 0 && nacks == 1 && last_nack == 1, "bad CRC: rollback and NACK(1)");
    frame(2, 1, 7, 32'h200, 0);
    chk(commits[2] == 1 && acks == 2 && last_ack == 1, "replayed frame committed");
    frame(2, 1, 7, 32'h200, 0);
    chk(commits[2] == 1 && acks == 3 && last_ack == 1, "duplicate re-ACKed, not committed");
    // frame from the future (sequence 5 while 2 is expected): dropped, NACK(2)
    frame(3, 5, 3, 32'h300, 0);
    chk(commits[3] == 0 && last_nack == 2, "sequence gap: NACK(expected)");

    // BC frame (sequence 2 now expected)
    begin
      logic [15:0] crc;
      word_t w;
      w = word_t'{k: 4'b0001, d: {8'd2, 8'd9, 8'(DW_SBF), K28_3}};
      send(w); crc = crc16_word(CRC16_INIT, w.d, 1);
      send(word_t'{k: 4'h0, d: 32'hAAAA_0001}); crc = crc16_word(crc, 32'hAAAA_0001, 0);
      send(word_t'{k: 4'h0, d: 32'hBBBB_0002}); crc = crc16_word(crc, 32'hBBBB_0002, 0);
      send(word_t'{k: 4'b0001, d: {crc16_byte(crc, 8'(DW_EBF)), 8'(DW_EBF), K28_3}});
      repeat (3) @(negedge clk);
      chk(bcs == 1 && last_bc == {8'd9, 32'hBBBB_0002, 32'hAAAA_0001}, "BC message delivered");
    end

    // link control words
    send(dl_ctrl_word(DW_ACK, 8'd7));
    send(dl_ctrl_word(DW_NACK, 8'd8));
    send(dl_ctrl_word(DW_FCT, {5'd2, 3'd5}));
    begin
      word_t w;
      w = dl_ctrl_word(DW_ACK, 8'd9); w.d[31:24] = ~w.d[31:24];
      send(w);
    end
    repeat (3) @(negedge clk);
    chk(n_rx_ack == 1 && n_rx_nack == 1 && n_rx_fct == 1, "ACK/NACK/FCT decoded, bad CRC-8 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
