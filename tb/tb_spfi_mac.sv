// tb_spfi_mac - the MAC on its own, with endless packet sources on four VCs, a BC
// source, credits handed out by the bench and a link that stalls at random. The output
// stream is parsed: every data frame is SDF(vc) + 1..64 words + EDF/EDF_EOP, the words
// of each VC come out in order with EOP only at packet ends, BC frames are SBF + 2
// words + EBF. Phases: priority (a priority-2 VC never sends while a priority-1 VC
// can), bandwidth shares (75/25 gives about 3:1 words), timeslots (a VC only starts
// frames in its own slot), flow control (a VC without new credit stops after the
// credits it has) and BC frames.
module tb_spfi_mac;
  import spfi_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  vc_cfg_t vcc [NV];
  logic [15:0] slot_cycles;
  logic [NV-1:0] ve, vr, vfs;
  logic [32:0] vd [NV];
  logic be, brd, bfs, fv, ov, ordy, rbr, rbw, rbs, bnd;
  logic [71:0] bdat;
  logic [4:0] fvc; logic [2:0] fcnt;
  word_t ow, rbww;
  spfi_mac #(.NUM_VC(NV), .MAX_FRAME(64)) dut (.clk, .rst_n, .vc_cfg(vcc), .bc_bandwidth(7'd10),
    .slot_cycles, .vc_empty(ve), .vc_data(vd), .vc_rd(vr), .bc_empty(be), .bc_data(bdat), .bc_rd(brd),
    .fct_valid(fv), .fct_vc(fvc), .fct_cnt(fcnt), .rb_space_ok(1'b1), .rb_seq(8'd0),
    .rb_replay_valid(1'b0), .rb_replay_word('0), .rb_replay_ready(rbr), .rb_wr_en(rbw),
    .rb_wr_sof(rbs), .rb_wr_word(rbww), .boundary(bnd), .out_valid(ov), .out_word(ow),
    .out_ready(ordy), .vc_frame_start(vfs), .bc_frame_start(bfs));

  // sources: VC v sends packets of 7 + 20*v words
  int n_src [NV], n_out [NV], words_out [NV], frames [NV], bc_src = 0;
  logic on [NV];
  logic bc_on = 0;
  always @* for (int v = 0; v < NV; v++) begin
    ve[v] = !on[v];
    vd[v] = {n_src[v] % (7 + 20 * v) == 6 + 20 * v, 8'(v), 24'(n_src[v])};
  end
  assign be   = !bc_on;
  assign bdat = {8'd3, 32'hBC00_0000 | 32'(bc_src), 32'h0};
  always @(posedge clk) begin
    for (int v = 0; v < NV; v++) if (vr[v]) n_src[v] <= n_src[v] + 1;
    if (brd) bc_src <= bc_src + 1;
    ordy <= ($urandom % 8 != 0);
  end

  // credits: keep every VC with credit unless held back
  int  started [NV];
  logic [2:0] granted [NV];
  logic hold [NV];
  int fv_rr = 0;
  always @(posedge clk) begin
    for (int v = 0; v < NV; v++) if (vfs[v]) started[v] <= started[v] + 1;
    fv <= 1'b0;
    fv_rr <= (fv_rr + 1) % NV;
    if (!hold[fv_rr]) begin
      fv <= 1'b1; fvc <= 5'(fv_rr); fcnt <= 3'(started[fv_rr] + 3);
    end
  end

  // output parser
  typedef enum {P_IDLE, P_DATA, P_BC} pst_e;
  pst_e ps = P_IDLE;
  int cur_vc = 0, flen = 0, bclen = 0, n_bc = 0;
  int bad_slot = 0;
  always @(posedge clk) if (rst_n && ov && ordy) begin
    logic [7:0] typ;
    typ = ow.d[15:8];
    checks++;
    case (ps)
      P_IDLE:
        if (ow.k == 4'b0001 && ow.d[7:0] == K28_3 && typ == 8'(DW_SDF)) begin
          ps <= P_DATA; cur_vc = int'(ow.d[23:16]); flen = 0; frames[cur_vc]++;
        end else if (ow.k == 4'b0001 && ow.d[7:0] == K28_3 && typ == 8'(DW_SBF)) begin
          ps <= P_BC; bclen = 0;
        end else begin failures++; $display("FAIL word outside a frame %h", ow); end
      P_DATA:
        if (ow.k == 4'b0000) begin
          flen++;
          if (ow.d != {8'(cur_vc), 24'(n_out[cur_vc])} || flen > 64) begin
            failures++; $display("FAIL VC %0d data %h expected %0d", cur_vc, ow.d, n_out[cur_vc]);
          end
          n_out[cur_vc]++; words_out[cur_vc]++;
        end else begin
          logic eop_expected;
          eop_expected = (n_out[cur_vc] % (7 + 20 * cur_vc) == 0);
          if (flen == 0 || !(typ == 8'(DW_EDF) || typ == 8'(DW_EDF_EOP)) ||
              (typ == 8'(DW_EDF_EOP)) != eop_expected) begin
            failures++; $display("FAIL frame end %h after %0d words", ow, flen);
          end
          ps <= P_IDLE;
        end
      P_BC: begin
        if (bclen < 2) begin
          if (ow.k != 0) begin failures++; $display("FAIL BC word"); end
          bclen++;
        end else begin
          if (typ != 8'(DW_EBF)) begin failures++; $display("FAIL EBF"); end
          n_bc++; ps <= P_IDLE;
        end
      end
    endcase
  end
  always @(posedge clk) if (rst_n && slot_cycles != 0 && vfs[2] && dut.slot != 2) bad_slot++;

  task automatic phase(int cycles);
    for (int v = 0; v < NV; v++) begin frames[v] = 0; words_out[v] = 0; end
    repeat (cycles) @(posedge clk);
  endtask
  task automatic quiet();
    for (int v = 0; v < NV; v++) on[v] = 0;
    bc_on = 0;
    repeat (200) @(posedge clk);
    #1;
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin
      vcc[v] = '{prio: 4'd1, bandwidth: 7'd25, slots: '1};
      on[v] = 0; hold[v] = 0; n_src[v] = 0; n_out[v] = 0; started[v] = 0;
    end
    slot_cycles = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // all four VCs, equal shares: every VC gets frames
    for (int v = 0; v < NV; v++) on[v] = 1;
    phase(6000);
    for (int v = 0; v < NV; v++) chk(frames[v] > 10, $sformatf("VC %0d served", v));
    quiet();

    // priority: VC 1 at priority 1, VC 0 at priority 2
    vcc[0].prio = 2; on[0] = 1; on[1] = 1;
    phase(4000);
    $display("priority: VC0 %0d frames, VC1 %0d frames", frames[0], frames[1]);
    chk(frames[1] > 20 && frames[0] == 0, "lower priority VC waits");
    quiet();

    // bandwidth: VC 0 75 %, VC 1 25 %, equal priority
    vcc[0] = '{prio: 4'd1, bandwidth: 7'd75, slots: '1};
    vcc[1] = '{prio: 4'd1, bandwidth: 7'd25, slots: '1};
    on[0] = 1; on[1] = 1;
    phase(8000);
    $display("bandwidth: VC0 %0d words, VC1 %0d words", words_out[0], words_out[1]);
    chk(words_out[1] > 0 && words_out[0] * 10 >= words_out[1] * 25 && words_out[0] * 10 <= words_out[1] * 35,
        "75/25 shares");
    quiet();

    // timeslots: VC 2 only in slot 2, VC 3 everywhere
    slot_cycles = 16'd100;
    vcc[2].slots = 32'b0100;
    on[2] = 1; on[3] = 1;
    phase(6000);
    chk(frames[2] > 0 && bad_slot == 0, "VC 2 only starts frames in its slot");
    chk(frames[3] > frames[2], "VC 3 uses the other slots");
    quiet();
    slot_cycles = 0; vcc[2].slots = '1;

    // flow control: no new credit for VC 3
    hold[3] = 1;
    repeat (20) @(posedge clk);
    on[3] = 1;
    phase(3000);
    chk(frames[3] <= 7, "VC 3 stops without credit");
    begin
      int f;
      f = frames[3];
      repeat (1000) @(posedge clk);
      chk(frames[3] == f, "no frames without credit");
    end
    hold[3] = 0;
    phase(2000);
    chk(frames[3] > 5, "VC 3 resumes with credit");
    quiet();

    // BC frames, alone and mixed with data
    bc_on = 1;
    phase(500);
    chk(n_bc > 20, "BC frames sent");
    on[0] = 1;
    phase(3000);
    chk(frames[0] > 0, "data frames next to BC frames");
    quiet();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
