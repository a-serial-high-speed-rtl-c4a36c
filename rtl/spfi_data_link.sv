// spfi_data_link - SpaceFibre data link layer of the CODEC.
//
// Transmit side: NUM_VC OUT VC buffers and one OUT BC buffer (dual-clock FIFOs, host
// clock to CODEC clock) feed the Medium Access Controller, which picks a frame by
// priority, bandwidth reservation, timeslot and round robin, or replays frames from
// the error recovery buffer; the transmit path scrambles, adds CRC and slips in
// ACK/NACK/FCT control words. Receive side: the receive path checks and de-scrambles
// frames and writes them into NUM_VC IN VC buffers and one IN BC buffer (CODEC clock to
// host clock), and turns the far end's ACK/NACK/FCT words into events for the
// transmit side.
//
// Host interface (hclk): per VC, a write port {eop, 32-bit data} with full, and a
// show-ahead read port {eop, data} with empty; BC ports carry {channel[7:0],
// message[63:0]}. Lane side (clk): valid/ready transmit stream, valid receive stream
// with a decoder error flag, and lane_active.
//
// Lint notes: the rd_count/wr_free outputs of buffers and the retry buffer's idle flag
// are left open where nothing needs them; the lane-control fields of cfg are used by
// the lane layer, not here.
module spfi_data_link
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC      = 4,
  parameter int unsigned VC_DEPTH    = 256,
  parameter int unsigned BC_DEPTH    = 16,
  parameter int unsigned MAX_FRAME   = 64,
  parameter int unsigned RETRY_DEPTH = 256,
  parameter int unsigned RETRY_TIMEOUT = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  codec_cfg_t  cfg,
  input  vc_cfg_t     vc_cfg [NUM_VC],
  // host side
  input  logic        hclk,
  input  logic        hrst_n,
  input  logic [NUM_VC-1:0] out_vc_wr,
  input  logic [32:0]       out_vc_data [NUM_VC],
  output logic [NUM_VC-1:0] out_vc_full,
  input  logic [NUM_VC-1:0] in_vc_rd,
  output logic [32:0]       in_vc_data [NUM_VC],
  output logic [NUM_VC-1:0] in_vc_empty,
  input  logic        out_bc_wr,
  input  logic [71:0] out_bc_data,
  output logic        out_bc_full,
  input  logic        in_bc_rd,
  output logic [71:0] in_bc_data,
  output logic        in_bc_empty,
  // lane layer
  input  logic        lane_active,
  output logic        tx_valid,
  output word_t       tx_word,
  input  logic        tx_ready,
  input  logic        rx_valid,
  input  word_t       rx_word,
  input  logic        rx_err,
  // status
  output rx_state_e   rx_state,
  output logic        frame_error,
  output logic        frame_ok,
  output logic        retry_start,
  output logic [NUM_VC-1:0] vc_frame_start,
  output logic        bc_frame_start
);
  localparam int unsigned AW = $clog2(VC_DEPTH);

  // ---------------- buffers ----------------
  logic [NUM_VC-1:0] mvc_empty, mvc_rd;
  logic [32:0]       mvc_data [NUM_VC];
  logic [NUM_VC-1:0] rvc_wr, rvc_commit, rvc_rollback, rvc_full;
  logic [32:0]       rvc_wdata;
  logic [AW:0]       rvc_free [NUM_VC];

  for (genvar v = 0; v < int'(NUM_VC); v++) begin : g_vc
    spfi_async_fifo #(.WIDTH(33), .DEPTH(VC_DEPTH), .COMMIT_MODE(1'b0)) u_out (
      .wclk(hclk), .wrst_n(hrst_n), .wr_en(out_vc_wr[v]), .wr_data(out_vc_data[v]),
      .commit(1'b0), .rollback(1'b0), .full(out_vc_full[v]), .wr_free(),
      .rclk(clk), .rrst_n(rst_n), .rd_en(mvc_rd[v]), .rd_data(mvc_data[v]),
      .empty(mvc_empty[v]), .rd_count()
    );
    spfi_async_fifo #(.WIDTH(33), .DEPTH(VC_DEPTH), .COMMIT_MODE(1'b1)) u_in (
      .wclk(clk), .wrst_n(rst_n), .wr_en(rvc_wr[v]), .wr_data(rvc_wdata),
      .commit(rvc_commit[v]), .rollback(rvc_rollback[v]), .full(rvc_full[v]),
      .wr_free(rvc_free[v]),
      .rclk(hclk), .rrst_n(hrst_n), .rd_en(in_vc_rd[v]), .rd_data(in_vc_data[v]),
      .empty(in_vc_empty[v]), .rd_count()
    );
  end

  logic        mbc_empty, mbc_rd, rbc_wr, rbc_full;
  logic [71:0] mbc_data, rbc_wdata;
  spfi_async_fifo #(.WIDTH(72), .DEPTH(BC_DEPTH), .COMMIT_MODE(1'b0)) u_out_bc (
    .wclk(hclk), .wrst_n(hrst_n), .wr_en(out_bc_wr), .wr_data(out_bc_data),
    .commit(1'b0), .rollback(1'b0), .full(out_bc_full), .wr_free(),
    .rclk(clk), .rrst_n(rst_n), .rd_en(mbc_rd), .rd_data(mbc_data), .empty(mbc_empty),
    .rd_count()
  );
  spfi_async_fifo #(.WIDTH(72), .DEPTH(BC_DEPTH), .COMMIT_MODE(1'b0)) u_in_bc (
    .wclk(clk), .wrst_n(rst_n), .wr_en(rbc_wr), .wr_data(rbc_wdata),
    .commit(1'b0), .rollback(1'b0), .full(rbc_full), .wr_free(),
    .rclk(hclk), .rrst_n(hrst_n), .rd_en(in_bc_rd), .rd_data(in_bc_data), .empty(in_bc_empty),
    .rd_count()
  );

  // ---------------- transmit ----------------
  logic       fct_valid;
  logic [4:0] fct_vc;
  logic [2:0] fct_cnt;
  logic       ack_valid, nack_valid;
  logic [7:0] ev_seq;
  logic       rb_space_ok, rb_replay_valid, rb_replay_ready, rb_wr_en, rb_wr_sof, boundary;
  logic [7:0] rb_seq;
  word_t      rb_replay_word, rb_wr_word;
  logic       mac_valid, mac_ready;
  word_t      mac_word;

  spfi_mac #(.NUM_VC(NUM_VC), .MAX_FRAME(MAX_FRAME)) u_mac (
    .clk, .rst_n, .vc_cfg, .bc_bandwidth(cfg.bc_bandwidth), .slot_cycles(cfg.slot_cycles),
    .vc_empty(mvc_empty), .vc_data(mvc_data), .vc_rd(mvc_rd),
    .bc_empty(mbc_empty), .bc_data(mbc_data), .bc_rd(mbc_rd),
    .fct_valid, .fct_vc, .fct_cnt,
    .rb_space_ok, .rb_seq, .rb_replay_valid, .rb_replay_word, .rb_replay_ready,
    .rb_wr_en, .rb_wr_sof, .rb_wr_word, .boundary,
    .out_valid(mac_valid), .out_word(mac_word), .out_ready(mac_ready),
    .vc_frame_start, .bc_frame_start
  );

  spfi_retry_buffer #(.DEPTH(RETRY_DEPTH), .MAX_FRAME(MAX_FRAME), .TIMEOUT(RETRY_TIMEOUT)) u_rb (
    .clk, .rst_n, .wr_en(rb_wr_en), .wr_sof(rb_wr_sof), .wr_word(rb_wr_word),
    .next_seq(rb_seq), .space_ok(rb_space_ok),
    .ack_valid, .ack_seq(ev_seq), .nack_valid, .nack_seq(ev_seq),
    .boundary, .replay_valid(rb_replay_valid), .replay_word(rb_replay_word),
    .replay_ready(rb_replay_ready), .replay_start(retry_start), .idle()
  );

  logic       ack_req, nack_req, fct_req, ack_done, nack_done, fct_done;
  logic [7:0] ack_seq, nack_seq, fct_arg;

  spfi_dl_tx u_tx (
    .clk, .rst_n, .scramble_en(cfg.scramble_en),
    .in_valid(mac_valid), .in_word(mac_word), .in_ready(mac_ready),
    .nack_req, .nack_seq, .nack_done, .ack_req, .ack_seq, .ack_done,
    .fct_req, .fct_arg, .fct_done,
    .out_valid(tx_valid), .out_word(tx_word), .out_ready(tx_ready)
  );

  // ---------------- receive ----------------
  spfi_dl_rx #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .MAX_FRAME(MAX_FRAME)) u_rx (
    .clk, .rst_n, .scramble_en(cfg.scramble_en), .lane_active,
    .in_valid(rx_valid), .in_word(rx_word), .in_err(rx_err),
    .vc_wr(rvc_wr), .vc_wdata(rvc_wdata), .vc_commit(rvc_commit), .vc_rollback(rvc_rollback),
    .vc_full(rvc_full), .vc_free(rvc_free),
    .bc_wr(rbc_wr), .bc_wdata(rbc_wdata), .bc_full(rbc_full),
    .rx_ack(ack_valid), .rx_nack(nack_valid), .rx_seq(ev_seq),
    .rx_fct(fct_valid), .rx_fct_vc(fct_vc), .rx_fct_cnt(fct_cnt),
    .ack_req, .ack_seq, .ack_done, .nack_req, .nack_seq, .nack_done,
    .fct_req, .fct_arg, .fct_done,
    .state(rx_state), .frame_error, .frame_ok
  );
endmodule
