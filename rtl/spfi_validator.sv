// spfi_validator - hardware part of the CODEC validation system.
//
// Two SpaceFibre CODECs, as on the validation board, each with the test hardware
// that surrounds it:
//   - a management register bank (configuration and status of the CODEC),
//   - a packet generator writing fixed-step incrementing packets into one OUT VC and
//     a packet consumer checking them from one IN VC, so the link can be loaded
//     without the system bus,
//   - word-level error injectors on the encoded transmit and receive streams,
//   - a rolling memory that records the words before encoding and after decoding and
//     freezes a window around a trigger word.
// The serial side of each CODEC (40-bit words to and from a SerDes, plus the
// recovered receive clock) is brought out; the two ports are normally looped back to
// each other outside. The processor, system bus, DMA engines and Ethernet link of the
// board are not part of this module: their place is taken by the register buses and
// the host-side VC/BC ports, brought out per CODEC. A VC that the generator (or the
// consumer) is pointed at is driven by it while it is busy (enabled); the external
// port of that VC should stay idle meanwhile.
//
// Clocks: clk (CODEC and test logic), hclk (host side of the VC/BC buffers, generator
// and consumer), rx_clk[i] (recovered clock of CODEC i; its receive-side error
// injector works in that clock and samples its controls there).
//
// Lint note: the per-word injected strobes and the rolling memory's recording flag are
// left open; the counters and rm_irq carry the same information to the outside.
module spfi_validator
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC        = 4,
  parameter int unsigned VC_DEPTH      = 256,
  parameter int unsigned SKIP_INTERVAL = 5000,
  parameter int unsigned RM_DEPTH      = 8192,
  parameter int unsigned RM_POST       = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hclk,
  input  logic          hrst_n,
  // management buses
  input  logic          mgmt_we    [2],
  input  logic [7:0]    mgmt_addr  [2],
  input  logic [31:0]   mgmt_wdata [2],
  output logic [31:0]   mgmt_rdata [2],
  // host-side channel ports (in place of the DMA engines)
  input  logic [NUM_VC-1:0] out_vc_wr   [2],
  input  logic [32:0]       out_vc_data [2][NUM_VC],
  output logic [NUM_VC-1:0] out_vc_full [2],
  input  logic [NUM_VC-1:0] in_vc_rd    [2],
  output logic [32:0]       in_vc_data  [2][NUM_VC],
  output logic [NUM_VC-1:0] in_vc_empty [2],
  input  logic          out_bc_wr   [2],
  input  logic [71:0]   out_bc_data [2],
  output logic          out_bc_full [2],
  input  logic          in_bc_rd    [2],
  output logic [71:0]   in_bc_data  [2],
  output logic          in_bc_empty [2],
  // test hardware
  input  gen_ctrl_t     gen_ctrl [2],
  output gen_stat_t     gen_stat [2],
  input  chk_ctrl_t     chk_ctrl [2],
  output chk_stat_t     chk_stat [2],
  input  inj_ctrl_t     inj_tx_ctrl [2],
  input  inj_ctrl_t     inj_rx_ctrl [2],
  output logic [15:0]   inj_tx_count [2],
  output logic [15:0]   inj_rx_count [2],
  input  rm_ctrl_t      rm_ctrl [2],
  output logic          rm_irq  [2],
  output word_t         rm_data [2],
  // SpaceFibre ports (to the SerDes)
  output logic [39:0]   tx_code  [2],
  input  logic          rx_clk   [2],
  input  logic          rx_rst_n [2],
  input  logic [39:0]   rx_code  [2],
  // CODEC events, for monitoring
  output logic          ev_retry [2],
  output logic          ev_frame_error [2],
  output logic          ev_skip_sent [2],
  output logic          ev_skip_dropped [2],
  output logic          ev_skip_repeated [2],
  output logic [NUM_VC-1:0] ev_vc_frame [2],
  output logic          ev_bc_frame [2]
);
  localparam int unsigned RAW = $clog2(RM_DEPTH);

  for (genvar i = 0; i < 2; i++) begin : g_port
    codec_cfg_t    cfg;
    vc_cfg_t       vcc [NUM_VC];
    codec_status_t status;

    spfi_mgmt_regs #(.NUM_VC(NUM_VC)) u_regs (
      .clk, .rst_n, .we(mgmt_we[i]), .addr(mgmt_addr[i]), .wdata(mgmt_wdata[i]),
      .rdata(mgmt_rdata[i]), .cfg, .vc_cfg(vcc), .status
    );

    // ---------------- generator and consumer ----------------
    logic        gen_wr, chk_rd;
    logic [32:0] gen_data;
    logic [NUM_VC-1:0] c_wr, c_rd, c_full, c_empty;
    logic [32:0]       c_wdata [NUM_VC];
    logic [32:0]       c_rdata [NUM_VC];

    spfi_pkt_gen u_gen (
      .clk(hclk), .rst_n(hrst_n), .start(gen_ctrl[i].start), .stop(gen_ctrl[i].stop),
      .seed(gen_ctrl[i].seed), .step(gen_ctrl[i].step), .pkt_len(gen_ctrl[i].pkt_len),
      .gap(gen_ctrl[i].gap), .num_pkts(gen_ctrl[i].num_pkts),
      .full(c_full[gen_ctrl[i].vc[$clog2(NUM_VC)-1:0]]),
      .wr(gen_wr), .wdata(gen_data), .busy(gen_stat[i].busy), .pkts_sent(gen_stat[i].pkts_sent)
    );
    spfi_pkt_check u_chk (
      .clk(hclk), .rst_n(hrst_n), .start(chk_ctrl[i].start), .enable(chk_ctrl[i].enable),
      .seed(chk_ctrl[i].seed), .step(chk_ctrl[i].step), .pkt_len(chk_ctrl[i].pkt_len),
      .empty(c_empty[chk_ctrl[i].vc[$clog2(NUM_VC)-1:0]]),
      .rdata(c_rdata[chk_ctrl[i].vc[$clog2(NUM_VC)-1:0]]), .rd(chk_rd),
      .words(chk_stat[i].words), .pkts(chk_stat[i].pkts),
      .data_errors(chk_stat[i].data_errors), .frame_errors(chk_stat[i].frame_errors)
    );

    always_comb begin
      for (int v = 0; v < int'(NUM_VC); v++) begin
        logic g, c;
        g = gen_stat[i].busy && int'(gen_ctrl[i].vc) == v;
        c = chk_ctrl[i].enable && int'(chk_ctrl[i].vc) == v;
        c_wr[v]    = g ? gen_wr : out_vc_wr[i][v];
        c_wdata[v] = g ? gen_data : out_vc_data[i][v];
        c_rd[v]    = c ? chk_rd : in_vc_rd[i][v];
      end
    end
    assign out_vc_full[i] = c_full;
    assign in_vc_empty[i] = c_empty;
    assign in_vc_data[i]  = c_rdata;

    // ---------------- CODEC ----------------
    logic [39:0] codec_tx, codec_rx;
    word_t       tx_tap, rx_tap;
    logic        rx_tap_valid;

    spfi_codec #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .SKIP_INTERVAL(SKIP_INTERVAL)) u_codec (
      .clk, .rst_n, .cfg, .vc_cfg(vcc), .status,
      .hclk, .hrst_n, .out_vc_wr(c_wr), .out_vc_data(c_wdata), .out_vc_full(c_full),
      .in_vc_rd(c_rd), .in_vc_data(c_rdata), .in_vc_empty(c_empty),
      .out_bc_wr(out_bc_wr[i]), .out_bc_data(out_bc_data[i]), .out_bc_full(out_bc_full[i]),
      .in_bc_rd(in_bc_rd[i]), .in_bc_data(in_bc_data[i]), .in_bc_empty(in_bc_empty[i]),
      .tx_code(codec_tx), .rx_clk(rx_clk[i]), .rx_rst_n(rx_rst_n[i]), .rx_code(codec_rx),
      .tx_tap, .rx_tap_valid, .rx_tap,
      .ev_retry(ev_retry[i]), .ev_frame_error(ev_frame_error[i]),
      .ev_skip_sent(ev_skip_sent[i]), .ev_skip_dropped(ev_skip_dropped[i]),
      .ev_skip_repeated(ev_skip_repeated[i]), .ev_vc_frame(ev_vc_frame[i]),
      .ev_bc_frame(ev_bc_frame[i])
    );

    // ---------------- error injection ----------------
    spfi_error_inject u_inj_tx (
      .clk, .rst_n, .mode(inj_tx_ctrl[i].mode), .arm(inj_tx_ctrl[i].arm),
      .mask(inj_tx_ctrl[i].mask), .period(inj_tx_ctrl[i].period), .count(inj_tx_ctrl[i].count),
      .din(codec_tx), .dout(tx_code[i]), .injected(), .n_injected(inj_tx_count[i])
    );
    spfi_error_inject u_inj_rx (
      .clk(rx_clk[i]), .rst_n(rx_rst_n[i]), .mode(inj_rx_ctrl[i].mode), .arm(inj_rx_ctrl[i].arm),
      .mask(inj_rx_ctrl[i].mask), .period(inj_rx_ctrl[i].period), .count(inj_rx_ctrl[i].count),
      .din(rx_code[i]), .dout(codec_rx), .injected(), .n_injected(inj_rx_count[i])
    );

    // ---------------- rolling memory ----------------
    spfi_rolling_memory #(.DEPTH(RM_DEPTH), .POST_TRIGGER(RM_POST)) u_rm (
      .clk, .rst_n, .arm(rm_ctrl[i].arm), .trig_rx(rm_ctrl[i].trig_rx),
      .trig_word(rm_ctrl[i].trig_word), .tx_valid(1'b1), .tx_word(tx_tap),
      .rx_valid(rx_tap_valid), .rx_word(rx_tap), .irq(rm_irq[i]), .recording(),
      .rd_sel_rx(rm_ctrl[i].rd_sel_rx), .rd_addr(RAW'(rm_ctrl[i].rd_addr)), .rd_data(rm_data[i])
    );
  end
endmodule
