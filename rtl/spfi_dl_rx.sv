// spfi_dl_rx - receive path of the data link layer.
//
// Words from the lane layer are split into data-link control words and frame words
// (data and control words demux). ACK, NACK and FCT words whose CRC-8 is right become
// events for the local transmitter. Frame words go to the word identification state
// machine, and the CRC check block accumulates CRC-16 over them: one accumulator for
// data frames and one for BC frames, so a BC frame inside a data frame is handled.
// Data words of data frames are de-scrambled (when enabled) and written straight into
// the IN VC buffer named in the SDF; each word is held back one place so the EOP flag
// from EDF_EOP can be attached to the last word. At EDF the frame is committed when its
// CRC is right, its sequence number is the expected one and nothing else went wrong;
// otherwise the buffer is rolled back and the frame is dropped. A good frame is
// acknowledged (ACK with its sequence number); a dropped frame triggers one NACK with
// the expected sequence number, repeated only after a later good frame. A frame that
// arrives again after it was already accepted is not written but acknowledged again.
// BC frames (2 data words) are checked the same way and pushed whole into the IN BC
// buffer; a BC frame nested in a data frame is delivered on its CRC alone.
//
// Flow control: for each VC the block grants credits, one per MAX_FRAME words of free
// IN VC buffer space not already promised, and sends the cumulative grant count
// (mod 8) in FCT words; every FCT_REFRESH cycles all counts are sent again, so a lost
// FCT only delays traffic. All frame formats and this flow-control form are this
// design's own.
//
// Lint note: the crc_next outputs of the CRC instances are left open; only the
// registered CRC is compared.
module spfi_dl_rx
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC      = 4,
  parameter int unsigned VC_DEPTH    = 256,
  parameter int unsigned MAX_FRAME   = 64,
  parameter int unsigned FCT_REFRESH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scramble_en,
  input  logic        lane_active,
  input  logic        in_valid,
  input  word_t       in_word,
  input  logic        in_err,
  // IN VC buffers (write side)
  output logic [NUM_VC-1:0] vc_wr,
  output logic [32:0]       vc_wdata,
  output logic [NUM_VC-1:0] vc_commit,
  output logic [NUM_VC-1:0] vc_rollback,
  input  logic [NUM_VC-1:0] vc_full,
  input  logic [$clog2(VC_DEPTH):0] vc_free [NUM_VC],
  // IN BC buffer
  output logic        bc_wr,
  output logic [71:0] bc_wdata,
  input  logic        bc_full,
  // events for the local transmitter
  output logic        rx_ack,
  output logic        rx_nack,
  output logic [7:0]  rx_seq,
  output logic        rx_fct,
  output logic [4:0]  rx_fct_vc,
  output logic [2:0]  rx_fct_cnt,
  // control word requests
  output logic        ack_req,
  output logic [7:0]  ack_seq,
  input  logic        ack_done,
  output logic        nack_req,
  output logic [7:0]  nack_seq,
  input  logic        nack_done,
  output logic        fct_req,
  output logic [7:0]  fct_arg,
  input  logic        fct_done,
  // status
  output rx_state_e   state,
  output logic        frame_error,   // pulse: a frame was dropped
  output logic        frame_ok       // pulse: a frame was accepted
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // ---------------- demux ----------------
  logic ctrl, good_ctrl_crc;
  logic [7:0] typ;
  logic w_sdf, w_edf, w_sbf, w_ebf, w_data, w_bad;
  assign typ           = in_word.d[15:8];
  assign ctrl          = in_valid && !in_err && is_dl_ctrl(in_word);
  assign good_ctrl_crc = in_word.d[31:24] == ctrl_crc(typ, in_word.d[23:16]);

  assign rx_ack     = ctrl && typ == 8'(DW_ACK)  && good_ctrl_crc;
  assign rx_nack    = ctrl && typ == 8'(DW_NACK) && good_ctrl_crc;
  assign rx_fct     = ctrl && typ == 8'(DW_FCT)  && good_ctrl_crc;
  assign rx_seq     = in_word.d[23:16];
  assign rx_fct_vc  = in_word.d[23:19];
  assign rx_fct_cnt = in_word.d[18:16];

  logic is_link_ctrl;
  assign is_link_ctrl = ctrl && (typ == 8'(DW_ACK) || typ == 8'(DW_NACK) || typ == 8'(DW_FCT));
  assign w_sdf  = ctrl && typ == 8'(DW_SDF);
  assign w_edf  = ctrl && (typ == 8'(DW_EDF) || typ == 8'(DW_EDF_EOP));
  assign w_sbf  = ctrl && typ == 8'(DW_SBF);
  assign w_ebf  = ctrl && typ == 8'(DW_EBF);
  assign w_data = in_valid && !in_err && in_word.k == 4'b0000;
  assign w_bad  = in_valid && !is_link_ctrl && !w_sdf && !w_edf && !w_sbf && !w_ebf && !w_data;

  logic data_start, data_word, data_end, data_abort, bc_start, bc_word, bc_end, bc_abort;
  spfi_word_id_fsm u_fsm (
    .clk, .rst_n, .lane_active, .valid(in_valid && !is_link_ctrl),
    .w_sdf, .w_edf, .w_sbf, .w_ebf, .w_data, .w_bad,
    .state, .data_start, .data_word, .data_end, .data_abort,
    .bc_start, .bc_word, .bc_end, .bc_abort
  );

  // ---------------- CRC check ----------------
  logic [15:0] dcrc, bcrc;
  spfi_crc16 u_dcrc (.clk, .rst_n, .start(data_start), .en(data_word), .data(in_word.d),
                     .first(data_start ? 2'd1 : 2'd0), .crc(dcrc), .crc_next());
  spfi_crc16 u_bcrc (.clk, .rst_n, .start(bc_start), .en(bc_word), .data(in_word.d),
                     .first(bc_start ? 2'd1 : 2'd0), .crc(bcrc), .crc_next());
  logic dcrc_ok, bcrc_ok;
  assign dcrc_ok = in_word.d[31:16] == crc16_byte(dcrc, typ);
  assign bcrc_ok = in_word.d[31:16] == crc16_byte(bcrc, typ);

  // ---------------- de-scrambler ----------------
  logic [31:0] desc;
  spfi_scrambler u_dscr (.clk, .rst_n, .seed(data_start), .en(data_word),
                         .din(in_word.d), .dout(desc));

  // ---------------- data frames ----------------
  logic [7:0]    exp_seq;
  logic [VW-1:0] cur_vc;
  logic          cur_bad, cur_dup_old, cur_skip;
  logic [7:0]    cur_seq;
  logic [7:0]    wcnt;
  logic          held_v;
  logic [31:0]   held;
  logic          nacked;
  logic          dfull;
  assign dfull = vc_full[cur_vc];

  logic [7:0] seq_in;
  logic       vc_ok_in;
  assign seq_in   = in_word.d[31:24];
  assign vc_ok_in = int'(in_word.d[23:16]) < int'(NUM_VC);

  // end-of-frame decision (valid in the cycle of data_end)
  logic frame_good;
  assign frame_good = data_end && dcrc_ok && !cur_bad && !cur_skip && !(held_v && dfull);

  always_comb begin
    vc_wr       = '0;
    vc_commit   = '0;
    vc_rollback = '0;
    vc_wdata    = {1'b0, held};
    if (data_word && held_v && !cur_skip && !cur_bad) vc_wr[cur_vc] = 1'b1;
    if (frame_good) begin
      vc_wr[cur_vc]     = held_v;
      vc_wdata          = {typ == 8'(DW_EDF_EOP), held};
      vc_commit[cur_vc] = 1'b1;
    end else if (data_end || data_abort) begin
      vc_rollback[cur_vc] = 1'b1;
    end
  end

  // ---------------- BC frames ----------------
  logic [7:0]  bc_chan, bc_seq;
  logic [63:0] bc_msg;
  logic [2:0]  bc_cnt;
  logic        bc_nested;
  logic        bc_good;
  assign bc_good  = bc_end && bcrc_ok && bc_cnt == 3'd2 && !bc_full &&
                    (bc_nested || bc_seq == exp_seq);
  assign bc_wr    = bc_good;
  assign bc_wdata = {bc_chan, bc_msg};

  // ---------------- flow control ----------------
  logic [2:0] granted [NUM_VC];
  logic [2:0] rcvd    [NUM_VC];
  logic [NUM_VC-1:0] dirty;
  logic [$clog2(FCT_REFRESH+1)-1:0] refresh;
  logic [VW-1:0] fsel;

  always_comb begin
    fsel = '0;
    for (int v = int'(NUM_VC) - 1; v >= 0; v--) if (dirty[v]) fsel = VW'(v);
  end
  assign fct_req = |dirty;
  assign fct_arg = {5'(fsel), granted[fsel]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_seq <= '0; cur_vc <= '0; cur_bad <= 1'b0; cur_skip <= 1'b0; cur_dup_old <= 1'b0;
      cur_seq <= '0; wcnt <= '0; held_v <= 1'b0; held <= '0; nacked <= 1'b0;
      ack_req <= 1'b0; ack_seq <= '0; nack_req <= 1'b0; nack_seq <= '0;
      bc_chan <= '0; bc_seq <= '0; bc_msg <= '0; bc_cnt <= '0; bc_nested <= 1'b0;
      frame_error <= 1'b0; frame_ok <= 1'b0;
      dirty <= '0; refresh <= '0;
      for (int v = 0; v < int'(NUM_VC); v++) begin granted[v] <= '0; rcvd[v] <= '0; end
    end else begin
      frame_error <= 1'b0;
      frame_ok    <= 1'b0;
      if (ack_done)  ack_req  <= 1'b0;
      if (nack_done) nack_req <= 1'b0;

      // data frame bookkeeping
      if (data_start) begin
        cur_vc      <= vc_ok_in ? VW'(in_word.d[23:16]) : '0;
        cur_seq     <= seq_in;
        cur_bad     <= !vc_ok_in;
        cur_skip    <= seq_in != exp_seq;
        cur_dup_old <= (8'(exp_seq - seq_in) != 8'd0) && (8'(exp_seq - seq_in) <= 8'd128);
        wcnt        <= '0;
        held_v      <= 1'b0;
      end else if (data_word) begin
        held   <= scramble_en ? desc : in_word.d;
        held_v <= 1'b1;
        wcnt   <= wcnt + 8'd1;
        if (wcnt == 8'(MAX_FRAME) || (held_v && dfull && !cur_skip)) cur_bad <= 1'b1;
      end

      if (frame_good) begin
        exp_seq  <= exp_seq + 8'd1;
        ack_req  <= 1'b1;
        ack_seq  <= cur_seq;
        nacked   <= 1'b0;
        frame_ok <= 1'b1;
        rcvd[cur_vc] <= rcvd[cur_vc] + 3'd1;
      end else if (data_end && dcrc_ok && !cur_bad && cur_dup_old) begin
        ack_req <= 1'b1;                 // repeated frame: acknowledge again
        ack_seq <= exp_seq - 8'd1;
      end else if (data_end || data_abort) begin
        frame_error <= 1'b1;
        if (!nacked) begin
          nack_req <= 1'b1;
          nack_seq <= exp_seq;
          nacked   <= 1'b1;
        end
      end

      // BC frame bookkeeping
      if (bc_start) begin
        bc_chan   <= in_word.d[23:16];
        bc_seq    <= seq_in;
        bc_cnt    <= '0;
        bc_nested <= (state == RX_DATA);
      end else if (bc_word) begin
        if (bc_cnt == 3'd0) bc_msg[31:0]  <= in_word.d;
        if (bc_cnt == 3'd1) bc_msg[63:32] <= in_word.d;
        if (bc_cnt != 3'd7) bc_cnt <= bc_cnt + 3'd1;
      end
      if (bc_good && !bc_nested) begin
        exp_seq  <= exp_seq + 8'd1;
        ack_req  <= 1'b1;
        ack_seq  <= bc_seq;
        nacked   <= 1'b0;
        frame_ok <= 1'b1;
      end else if (bc_end && bcrc_ok && bc_cnt == 3'd2 && !bc_nested &&
                   (8'(exp_seq - bc_seq) != 8'd0) && (8'(exp_seq - bc_seq) <= 8'd128)) begin
        ack_req <= 1'b1;
        ack_seq <= exp_seq - 8'd1;
      end else if ((bc_end && !bc_good) || bc_abort) begin
        frame_error <= 1'b1;
        if (!nacked && !bc_nested) begin
          nack_req <= 1'b1;
          nack_seq <= exp_seq;
          nacked   <= 1'b1;
        end
      end

      // flow-control credits
      refresh <= refresh + 1'b1;
      for (int v = 0; v < int'(NUM_VC); v++) begin
        logic [2:0] promised;
        promised = granted[v] - rcvd[v];
        if (int'(vc_free[v]) / int'(MAX_FRAME) > int'(promised) && promised != 3'd7) begin
          granted[v] <= granted[v] + 3'd1;
          dirty[v]   <= 1'b1;
        end
      end
      if (refresh == ($clog2(FCT_REFRESH+1))'(FCT_REFRESH)) begin
        refresh <= '0;
        dirty   <= '1;
      end else if (fct_done) begin
        dirty[fsel] <= 1'b0;
      end
    end
  end
endmodule
