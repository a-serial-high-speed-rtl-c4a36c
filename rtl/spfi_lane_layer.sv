// spfi_lane_layer - single SpaceFibre lane: initialisation, control words, SKIP
// handling, 8B/10B coding, symbol synchronisation and the receive elastic buffer.
//
// Transmit (clk): data-link word -> lane control word and SKIP insertion -> 8B/10B
// encoder -> tx_code, 40 bits per clock (symbol 0 in bits 39:30, sent first).
// Receive (rx_clk, the clock recovered by the SerDes): rx_code -> comma alignment ->
// 8B/10B decoder -> elastic buffer, which crosses into clk and absorbs the clock
// difference using SKIP words -> lane control word detector -> data link.
// The two taps tx_tap/rx_tap show the words just before the encoder and just after
// the elastic buffer, for the rolling memory analyser.
// Latency: about 2 clk from dl_tx to tx_code; about 7 cycles from rx_code to dl_rx.
module spfi_lane_layer
  import spfi_pkg::*;
#(
  parameter int unsigned SKIP_INTERVAL = 5000,
  parameter int unsigned EB_DEPTH      = 16,
  parameter int unsigned WAIT_CYCLES   = 64,
  parameter int unsigned TIMEOUT       = 2048
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lane_start,
  input  logic        auto_start,
  input  logic        lane_standby,
  // data link, transmit
  input  logic        dl_tx_valid,
  input  word_t       dl_tx_word,
  output logic        dl_tx_ready,
  // data link, receive
  output logic        dl_rx_valid,
  output word_t       dl_rx_word,
  output logic        dl_rx_err,
  // SerDes
  output logic [39:0] tx_code,
  input  logic        rx_clk,
  input  logic        rx_rst_n,
  input  logic [39:0] rx_code,
  // status
  output lane_state_e state,
  output logic        active,
  output logic        rx_synced,
  output logic        reinit,
  output logic        code_error,    // pulse (clk): a received word had a code error
  output logic        skip_sent,
  output logic        skip_dropped,  // pulse (rx_clk)
  output logic        skip_repeated,
  // analyser taps
  output word_t       tx_tap,
  output logic        rx_tap_valid,
  output word_t       rx_tap
);
  // ---------------- transmit ----------------
  lane_word_e lane_sel;
  word_t      tx_w;

  spfi_lane_tx #(.SKIP_INTERVAL(SKIP_INTERVAL)) u_tx (
    .clk, .rst_n, .active, .lane_sel, .dl_valid(dl_tx_valid), .dl_word(dl_tx_word),
    .dl_ready(dl_tx_ready), .tx_word(tx_w), .skip_sent
  );
  assign tx_tap = tx_w;

  spfi_enc8b10b u_enc (.clk, .rst_n, .en(1'b1), .din(tx_w), .code(tx_code));

  // ---------------- receive, recovered clock ----------------
  logic [39:0] aligned;
  logic        synced_rx, sync_d;
  word_t       dec_w;
  logic [3:0]  ce, de;
  logic        dec_err;

  spfi_word_sync u_sync (
    .clk(rx_clk), .rst_n(rx_rst_n), .raw(rx_code), .err_in(dec_err),
    .aligned, .synced(synced_rx)
  );
  spfi_dec8b10b u_dec (
    .clk(rx_clk), .rst_n(rx_rst_n), .en(1'b1), .code(aligned),
    .dout(dec_w), .code_err(ce), .disp_err(de)
  );
  assign dec_err = sync_d && (|ce || |de);

  // the decoder output is one cycle behind the alignment
  always_ff @(posedge rx_clk or negedge rx_rst_n)
    if (!rx_rst_n) sync_d <= 1'b0;
    else           sync_d <= synced_rx;

  logic  eb_valid, eb_err;
  word_t eb_word;
  spfi_elastic_buffer #(.DEPTH(EB_DEPTH)) u_eb (
    .wclk(rx_clk), .wrst_n(rx_rst_n), .wr_en(sync_d && synced_rx), .wr_word(dec_w),
    .wr_err(dec_err), .skip_dropped,
    .rclk(clk), .rrst_n(rst_n), .rd_valid(eb_valid), .rd_word(eb_word), .rd_err(eb_err),
    .skip_repeated
  );
  assign rx_tap_valid = eb_valid;
  assign rx_tap       = eb_word;
  assign code_error   = eb_valid && eb_err;

  // synchronisation flag into clk
  logic [1:0] sync_s;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync_s <= '0;
    else        sync_s <= {sync_s[0], synced_rx};
  assign rx_synced = sync_s[1];

  // ---------------- control word detection and initialisation ----------------
  logic ev_init1, ev_init2, ev_init3, ev_standby, ev_other, ev_any;
  spfi_lane_rx u_rx (
    .active, .rx_valid(eb_valid), .rx_word(eb_word), .rx_err(eb_err),
    .ev_init1, .ev_init2, .ev_init3, .ev_standby, .ev_other, .ev_any,
    .dl_valid(dl_rx_valid), .dl_word(dl_rx_word), .dl_err(dl_rx_err)
  );

  spfi_lane_init_fsm #(.WAIT_CYCLES(WAIT_CYCLES), .TIMEOUT(TIMEOUT)) u_fsm (
    .clk, .rst_n, .lane_start, .auto_start, .lane_standby, .synced(rx_synced),
    .rx_init1(ev_init1), .rx_init2(ev_init2), .rx_init3(ev_init3),
    .rx_standby(ev_standby), .rx_other(ev_other), .rx_any(ev_any),
    .state, .tx_word(lane_sel), .active, .reinit
  );
endmodule
