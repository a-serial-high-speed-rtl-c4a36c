// tb_spfi_word_id_fsm - walks the word identification state machine through all five
// states with scripted word sequences: a plain data frame, a BC frame, a BC frame
// nested in a data frame (MIXED), aborts by a bad word and by an out-of-place word,
// and loss of the lane. Every step checks the state and the decoded strobes.
module tb_spfi_word_id_fsm;
  import spfi_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic act, v, sdf, edf, sbf, ebf, dw, bad;
  rx_state_e st;
  logic ds, dwd, de, da, bs, bw, be, ba;
  spfi_word_id_fsm dut (.clk, .rst_n, .lane_active(act), .valid(v), .w_sdf(sdf), .w_edf(edf),
    .w_sbf(sbf), .w_ebf(ebf), .w_data(dw), .w_bad(bad), .state(st), .data_start(ds),
    .data_word(dwd), .data_end(de), .data_abort(da), .bc_start(bs), .bc_word(bw),
    .bc_end(be), .bc_abort(ba));

  typedef enum {W_NONE, W_SDF, W_EDF, W_SBF, W_EBF, W_DATA, W_BAD} w_e;
  // apply one word, check strobes {ds,dwd,de,da,bs,bw,be,ba} and the state afterwards
  task automatic step(w_e w, logic [7:0] strobes, rx_state_e after, string s);
    @(negedge clk);
    v = (w != W_NONE); sdf = (w == W_SDF); edf = (w == W_EDF); sbf = (w == W_SBF);
    ebf = (w == W_EBF); dw = (w == W_DATA); bad = (w == W_BAD);
    #1;
    checks++;
    if ({ds, dwd, de, da, bs, bw, be, ba} !== strobes) begin
      failures++; $display("FAIL %s strobes %b expected %b", s, {ds, dwd, de, da, bs, bw, be, ba}, strobes);
    end
    @(posedge clk); #1;
    checks++;
    if (st != after) begin failures++; $display("FAIL %s state %s expected %s", s, st.name(), after.name()); end
  endtask

  initial begin
    act = 0; {v, sdf, edf, sbf, ebf, dw, bad} = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    checks++; if (st != RX_NO_TRAFFIC) failures++;
    act = 1;
    step(W_NONE, 8'b0000_0000, RX_IDLE,  "lane up");
    step(W_DATA, 8'b0000_0000, RX_IDLE,  "stray data ignored");
    step(W_SDF,  8'b1000_0000, RX_DATA,  "SDF");
    step(W_DATA, 8'b0100_0000, RX_DATA,  "data word");
    step(W_NONE, 8'b0000_0000, RX_DATA,  "gap");
    step(W_EDF,  8'b0010_0000, RX_IDLE,  "EDF");
    step(W_SBF,  8'b0000_1000, RX_BC,    "SBF");
    step(W_DATA, 8'b0000_0100, RX_BC,    "BC word");
    step(W_EBF,  8'b0000_0010, RX_IDLE,  "EBF");
    step(W_SDF,  8'b1000_0000, RX_DATA,  "SDF 2");
    step(W_DATA, 8'b0100_0000, RX_DATA,  "data 2");
    step(W_SBF,  8'b0000_1000, RX_MIXED, "nested SBF");
    step(W_DATA, 8'b0000_0100, RX_MIXED, "nested BC word");
    step(W_EBF,  8'b0000_0010, RX_DATA,  "nested EBF");
    step(W_DATA, 8'b0100_0000, RX_DATA,  "data after BC");
    step(W_EDF,  8'b0010_0000, RX_IDLE,  "EDF 2");
    step(W_SDF,  8'b1000_0000, RX_DATA,  "SDF 3");
    step(W_BAD,  8'b0001_0000, RX_IDLE,  "bad word aborts data");
    step(W_SBF,  8'b0000_1000, RX_BC,    "SBF 2");
    step(W_EDF,  8'b0000_0001, RX_IDLE,  "EDF aborts BC");
    step(W_SDF,  8'b1000_0000, RX_DATA,  "SDF 4");
    step(W_SDF,  8'b1001_0000, RX_DATA,  "SDF restarts");
    step(W_SBF,  8'b0000_1000, RX_MIXED, "nested SBF 2");
    step(W_BAD,  8'b0001_0001, RX_IDLE,  "bad word aborts both");
    step(W_SDF,  8'b1000_0000, RX_DATA,  "SDF 5");
    @(negedge clk); act = 0; #1;
    checks++; if (!da) begin failures++; $display("FAIL lane loss abort"); end
    @(posedge clk); #1;
    checks++; if (st != RX_NO_TRAFFIC) begin failures++; $display("FAIL NO_TRAFFIC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
