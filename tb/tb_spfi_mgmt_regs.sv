// tb_spfi_mgmt_regs - reset values, write and read-back of every configuration
// register, per-VC registers reaching the right VC, and status fields and counters
// readable at their addresses.
module tb_spfi_mgmt_regs;
  import spfi_pkg::*;
  localparam int NV = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we; logic [7:0] addr; logic [31:0] wdata, rdata;
  codec_cfg_t cfg; vc_cfg_t vcc [NV]; codec_status_t st;
  spfi_mgmt_regs #(.NUM_VC(NV)) dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .cfg,
    .vc_cfg(vcc), .status(st));
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d; @(negedge clk); we = 0;
  endtask
  // combinational read: the whole register file is copied once per check
  logic [31:0] regs [256];
  task automatic snap();
    for (int a = 0; a < 256; a++) begin addr = 8'(a); #1 regs[a] = rdata; end
  endtask
  initial begin
    we = 0; addr = 0; wdata = 0;
    st = '{lane_state: LS_ACTIVE, rx_state: RX_DATA, rx_synced: 1'b1, code_errors: 16'd11,
           crc_errors: 16'd22, retries: 16'd33, reinits: 16'd44};
    repeat (2) @(posedge clk); #1 rst_n = 1;
    #1;
    chk(cfg.auto_start && !cfg.lane_start && !cfg.scramble_en && !cfg.lane_standby, "reset ctrl");
    for (int v = 0; v < NV; v++) chk(vcc[v].prio == 1 && vcc[v].bandwidth == 25 && vcc[v].slots == '1, "reset VC");
    wr(8'h00, 32'b1001);
    #1 chk(cfg.lane_start && cfg.scramble_en && !cfg.auto_start, "ctrl write");
    snap(); chk(regs[8'h00] == 32'b1001, "ctrl read");
    wr(8'h01, 32'd17); wr(8'h02, 32'd250);
    #1 chk(cfg.bc_bandwidth == 17 && cfg.slot_cycles == 250, "bc bandwidth / slot length");
    snap();
    chk(regs[8'h01] == 17 && regs[8'h02] == 250, "read back");
    for (int v = 0; v < NV; v++) begin
      wr(8'(8'h10 + 2 * v), {17'h0, 7'(10 + v), 4'h0, 4'(v + 2)});
      wr(8'(8'h11 + 2 * v), 32'hA500_0000 | 32'(v));
    end
    snap();
    for (int v = 0; v < NV; v++) begin
      chk(vcc[v].prio == 4'(v + 2) && vcc[v].bandwidth == 7'(10 + v) && vcc[v].slots == (32'hA500_0000 | 32'(v)),
          $sformatf("VC %0d registers", v));
      chk(regs[8'h10 + 2 * v] == {17'h0, 7'(10 + v), 4'h0, 4'(v + 2)}, "VC read back");
    end
    chk(regs[8'h40][2:0] == 3'(LS_ACTIVE) && regs[8'h40][6:4] == 3'(RX_DATA) && regs[8'h40][8], "status");
    chk(regs[8'h41] == 11 && regs[8'h42] == 22 && regs[8'h43] == 33 && regs[8'h44] == 44, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
