// spfi_codec - single-lane SpaceFibre CODEC: data link layer over lane layer.
//
// The host sends packets through NUM_VC output virtual channels and short broadcast
// messages through the OUT BC port, and receives them from the matching IN ports; the
// CODEC frames them, schedules the channels, protects frames with CRC and resends
// what arrives damaged, and carries it over one lane of 8B/10B-coded 40-bit words to
// and from a SerDes. The configuration struct (management interface) starts and stops
// the lane and sets scrambling, timeslot length and per-VC priority, bandwidth and
// slots; the status struct reports lane and receiver state and error/retry counts.
// Multi-lane operation is not part of this CODEC. Only the 40-bit SerDes word width
// is provided, and 8B/10B is always done inside.
//
// Clocks: clk is the CODEC clock (62.5 MHz gives 2.5 Gb/s on the line), hclk the host
// clock of the VC/BC buffers, rx_clk the clock recovered by the SerDes.
//
// Lint note: the data link's per-frame frame_ok strobe is not counted here (the
// status block counts rejected frames and retries), so it stays unused.
module spfi_codec
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC        = 4,
  parameter int unsigned VC_DEPTH      = 256,
  parameter int unsigned BC_DEPTH      = 16,
  parameter int unsigned MAX_FRAME     = 64,
  parameter int unsigned RETRY_DEPTH   = 256,
  parameter int unsigned RETRY_TIMEOUT = 1024,
  parameter int unsigned SKIP_INTERVAL = 5000,
  parameter int unsigned EB_DEPTH      = 16,
  parameter int unsigned WAIT_CYCLES   = 64,
  parameter int unsigned LANE_TIMEOUT  = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  input  codec_cfg_t    cfg,
  input  vc_cfg_t       vc_cfg [NUM_VC],
  output codec_status_t status,
  // host side
  input  logic          hclk,
  input  logic          hrst_n,
  input  logic [NUM_VC-1:0] out_vc_wr,
  input  logic [32:0]       out_vc_data [NUM_VC],
  output logic [NUM_VC-1:0] out_vc_full,
  input  logic [NUM_VC-1:0] in_vc_rd,
  output logic [32:0]       in_vc_data [NUM_VC],
  output logic [NUM_VC-1:0] in_vc_empty,
  input  logic          out_bc_wr,
  input  logic [71:0]   out_bc_data,
  output logic          out_bc_full,
  input  logic          in_bc_rd,
  output logic [71:0]   in_bc_data,
  output logic          in_bc_empty,
  // SerDes
  output logic [39:0]   tx_code,
  input  logic          rx_clk,
  input  logic          rx_rst_n,
  input  logic [39:0]   rx_code,
  // analyser taps and events
  output word_t         tx_tap,
  output logic          rx_tap_valid,
  output word_t         rx_tap,
  output logic          ev_retry,
  output logic          ev_frame_error,
  output logic          ev_skip_sent,
  output logic          ev_skip_dropped,
  output logic          ev_skip_repeated,
  output logic [NUM_VC-1:0] ev_vc_frame,
  output logic          ev_bc_frame
);
  logic  lane_active, dl_tx_valid, dl_tx_ready, dl_rx_valid, dl_rx_err;
  word_t dl_tx_word, dl_rx_word;
  logic  reinit, code_error, frame_ok, synced;
  lane_state_e lstate;
  rx_state_e   rstate;

  spfi_data_link #(
    .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .BC_DEPTH(BC_DEPTH), .MAX_FRAME(MAX_FRAME),
    .RETRY_DEPTH(RETRY_DEPTH), .RETRY_TIMEOUT(RETRY_TIMEOUT)
  ) u_dl (
    .clk, .rst_n, .cfg, .vc_cfg,
    .hclk, .hrst_n, .out_vc_wr, .out_vc_data, .out_vc_full, .in_vc_rd, .in_vc_data,
    .in_vc_empty, .out_bc_wr, .out_bc_data, .out_bc_full, .in_bc_rd, .in_bc_data, .in_bc_empty,
    .lane_active, .tx_valid(dl_tx_valid), .tx_word(dl_tx_word), .tx_ready(dl_tx_ready),
    .rx_valid(dl_rx_valid), .rx_word(dl_rx_word), .rx_err(dl_rx_err),
    .rx_state(rstate), .frame_error(ev_frame_error), .frame_ok, .retry_start(ev_retry),
    .vc_frame_start(ev_vc_frame), .bc_frame_start(ev_bc_frame)
  );

  spfi_lane_layer #(
    .SKIP_INTERVAL(SKIP_INTERVAL), .EB_DEPTH(EB_DEPTH), .WAIT_CYCLES(WAIT_CYCLES),
    .TIMEOUT(LANE_TIMEOUT)
  ) u_lane (
    .clk, .rst_n, .lane_start(cfg.lane_start), .auto_start(cfg.auto_start),
    .lane_standby(cfg.lane_standby),
    .dl_tx_valid, .dl_tx_word, .dl_tx_ready, .dl_rx_valid, .dl_rx_word, .dl_rx_err,
    .tx_code, .rx_clk, .rx_rst_n, .rx_code,
    .state(lstate), .active(lane_active), .rx_synced(synced), .reinit, .code_error,
    .skip_sent(ev_skip_sent), .skip_dropped(ev_skip_dropped), .skip_repeated(ev_skip_repeated),
    .tx_tap, .rx_tap_valid, .rx_tap
  );

  // status counters (saturating)
  logic [15:0] n_code, n_crc, n_retry, n_reinit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_code <= '0; n_crc <= '0; n_retry <= '0; n_reinit <= '0;
    end else begin
      if (code_error     && n_code   != 16'hFFFF) n_code   <= n_code + 16'd1;
      if (ev_frame_error && n_crc    != 16'hFFFF) n_crc    <= n_crc + 16'd1;
      if (ev_retry       && n_retry  != 16'hFFFF) n_retry  <= n_retry + 16'd1;
      if (reinit         && n_reinit != 16'hFFFF) n_reinit <= n_reinit + 16'd1;
    end
  end

  assign status = '{lane_state: lstate, rx_state: rstate, rx_synced: synced,
                    code_errors: n_code, crc_errors: n_crc, retries: n_retry,
                    reinits: n_reinit};
endmodule
