// tb_spfi_lane_rx - every lane word type raises its own event and never reaches the
// data link layer; data-link words and data are passed on only while active; words
// flagged with a decoder error raise no lane events.
module tb_spfi_lane_rx;
  import spfi_pkg::*;
  int checks = 0, failures = 0;
  logic active, v, err, i1, i2, i3, sb, oth, any, dv, de;
  word_t w, dw;
  spfi_lane_rx dut (.active, .rx_valid(v), .rx_word(w), .rx_err(err), .ev_init1(i1),
    .ev_init2(i2), .ev_init3(i3), .ev_standby(sb), .ev_other(oth), .ev_any(any),
    .dl_valid(dv), .dl_word(dw), .dl_err(de));
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    v = 1; err = 0;
    for (int a = 0; a < 2; a++) begin
      active = a[0];
      w = lane_word(LW_INIT1);   #1 chk({i1,i2,i3,sb,oth,dv} == 6'b100000, "INIT1");
      w = lane_word(LW_INIT2);   #1 chk({i1,i2,i3,sb,oth,dv} == 6'b010000, "INIT2");
      w = lane_word(LW_INIT3);   #1 chk({i1,i2,i3,sb,oth,dv} == 6'b001000, "INIT3");
      w = lane_word(LW_STANDBY); #1 chk({i1,i2,i3,sb,oth,dv} == 6'b000100, "STANDBY");
      w = lane_word(LW_IDLE);    #1 chk({i1,i2,i3,sb,oth,dv} == 6'b000010, "IDLE");
      w = lane_word(LW_SKIP);    #1 chk({i1,i2,i3,sb,oth,dv} == 6'b000000, "SKIP");
      w = dl_ctrl_word(DW_SDF, 8'h01); #1 chk({i1,i2,i3,sb,oth,dv} == {5'b00001, active}, "SDF");
      w = word_t'{k: 4'h0, d: 32'h1234_5678}; #1 chk({oth,dv} == {1'b1, active} && dw == w && any, "data");
    end
    err = 1; w = lane_word(LW_INIT1); #1 chk({i1, oth} == 2'b00 && de && any, "errored word");
    v = 0; err = 0; #1 chk({i1, oth, dv, any} == 4'b0000, "nothing valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
