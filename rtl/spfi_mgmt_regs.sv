// spfi_mgmt_regs - management and configuration interface of the CODEC.
//
// A small register bank on a simple synchronous bus (write: we, addr, wdata; read:
// addr -> rdata, combinational) that holds the CODEC configuration and shows its
// status. Register map (word addresses; this map is this design's own):
//   0x00 control   [0] lane_start [1] auto_start [2] lane_standby [3] scramble_en
//   0x01 bc_bandwidth [6:0] (percent)
//   0x02 slot_cycles [15:0] (timeslot length in clock cycles, 0: slot 0 only)
//   0x10 + 2v   VC v: [3:0] priority (1 highest), [14:8] expected bandwidth (percent)
//   0x11 + 2v   VC v: timeslot mask [31:0]
//   0x40 status    [2:0] lane state [6:4] receiver state [8] synchronised
//   0x41 code errors, 0x42 frame (CRC/sequence) errors, 0x43 retries, 0x44 lane re-inits
// Reset values: auto_start on, scrambling off, every VC priority 1 with an equal
// share of bandwidth and all timeslots, BC bandwidth 10 %.
module spfi_mgmt_regs
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [7:0]    addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata,
  output codec_cfg_t    cfg,
  output vc_cfg_t       vc_cfg [NUM_VC],
  input  codec_status_t status
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '{lane_start: 1'b0, auto_start: 1'b1, lane_standby: 1'b0, scramble_en: 1'b0,
               bc_bandwidth: 7'd10, slot_cycles: 16'd0};
      for (int v = 0; v < int'(NUM_VC); v++)
        vc_cfg[v] <= '{prio: 4'd1, bandwidth: 7'(100 / NUM_VC), slots: '1};
    end else if (we) begin
      case (addr)
        8'h00: {cfg.scramble_en, cfg.lane_standby, cfg.auto_start, cfg.lane_start} <= wdata[3:0];
        8'h01: cfg.bc_bandwidth <= wdata[6:0];
        8'h02: cfg.slot_cycles  <= wdata[15:0];
        default: ;
      endcase
      for (int v = 0; v < int'(NUM_VC); v++) begin
        if (addr == 8'(8'h10 + 2 * v)) begin
          vc_cfg[v].prio      <= wdata[3:0];
          vc_cfg[v].bandwidth <= wdata[14:8];
        end
        if (addr == 8'(8'h11 + 2 * v)) vc_cfg[v].slots <= wdata;
      end
    end
  end

  always_comb begin
    rdata = '0;
    case (addr)
      8'h00: rdata = {28'h0, cfg.scramble_en, cfg.lane_standby, cfg.auto_start, cfg.lane_start};
      8'h01: rdata = {25'h0, cfg.bc_bandwidth};
      8'h02: rdata = {16'h0, cfg.slot_cycles};
      8'h40: rdata = {23'h0, status.rx_synced, 1'b0, status.rx_state, 1'b0, status.lane_state};
      8'h41: rdata = {16'h0, status.code_errors};
      8'h42: rdata = {16'h0, status.crc_errors};
      8'h43: rdata = {16'h0, status.retries};
      8'h44: rdata = {16'h0, status.reinits};
      default: ;
    endcase
    for (int v = 0; v < int'(NUM_VC); v++) begin
      if (addr == 8'(8'h10 + 2 * v)) rdata = {17'h0, vc_cfg[v].bandwidth, 4'h0, vc_cfg[v].prio};
      if (addr == 8'(8'h11 + 2 * v)) rdata = vc_cfg[v].slots;
    end
  end
endmodule
