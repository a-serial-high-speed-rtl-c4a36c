// spfi_mac - Medium Access Controller of the data link layer.
//
// Decides, one frame at a time, what goes out on the link: a replay from the error
// recovery buffer (always first, and no new frame is started while one is pending),
// a broadcast frame, or a data frame from one of the OUT VCs. It also frames the data:
//   data frame: SDF(VC, seq) + 1..MAX_FRAME data words + EDF or EDF_EOP
//   BC frame:   SBF(channel, seq) + 2 data words (64-bit message) + EBF
// The CRC field of EDF/EBF is left zero here and filled in by the transmit path.
// A data frame ends at the end of a packet, after MAX_FRAME words, or when the VC
// buffer runs empty (the packet then continues in a later frame).
//
// VC selection (the CODEC's priority + bandwidth reservation + round robin scheme):
// a VC is ready when its buffer holds data, the far end has granted it a credit
// (flow control token, FCT) and the current timeslot is one of its slots. Among ready
// VCs the best priority wins (1 is highest); a VC never sends while a VC of higher
// priority is ready. Among equal priorities a VC still inside its reserved bandwidth
// goes before one above it, and ties are broken round robin from the VC after the
// last one served. Bandwidth use is tracked per VC by a counter that gains the VC's
// expected bandwidth (percent) for every data word sent on the link and loses 100 for
// each word the VC itself sends; a negative counter means the VC is above its share.
// BC frames go first while the BC counter (same rule, bc_bandwidth) is not negative, or
// whenever no VC is ready. The timeslot advances every slot_cycles cycles over NUM_VC
// slots. The counters' form, the slot clock and "1 = highest" are this design's own.
//
// Interfaces: VC and BC buffers are show-ahead FIFO read ports; the output is a
// valid/ready word stream. Flow-control credits are cumulative 3-bit counts per VC
// (fct_valid/fct_vc/fct_cnt); a VC has credit while the count granted differs from the
// count of frames it has started.
//
// Lint note: the loop index v is a 32-bit int of which only the low bits select a
// VC.
module spfi_mac
  import spfi_pkg::*;
#(
  parameter int unsigned NUM_VC    = 4,
  parameter int unsigned MAX_FRAME = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vc_cfg_t     vc_cfg [NUM_VC],
  input  logic [6:0]  bc_bandwidth,
  input  logic [15:0] slot_cycles,
  // OUT VC buffers: {eop, data}
  input  logic [NUM_VC-1:0] vc_empty,
  input  logic [32:0]       vc_data [NUM_VC],
  output logic [NUM_VC-1:0] vc_rd,
  // OUT BC buffer: {channel, message}
  input  logic        bc_empty,
  input  logic [71:0] bc_data,
  output logic        bc_rd,
  // flow control from the far end
  input  logic        fct_valid,
  input  logic [4:0]  fct_vc,
  input  logic [2:0]  fct_cnt,
  // error recovery buffer
  input  logic        rb_space_ok,
  input  logic [7:0]  rb_seq,
  input  logic        rb_replay_valid,
  input  word_t       rb_replay_word,
  output logic        rb_replay_ready,
  output logic        rb_wr_en,
  output logic        rb_wr_sof,
  output word_t       rb_wr_word,
  output logic        boundary,
  // framed output
  output logic        out_valid,
  output word_t       out_word,
  input  logic        out_ready,
  // events for statistics
  output logic [NUM_VC-1:0] vc_frame_start,
  output logic        bc_frame_start
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  typedef enum logic [2:0] {M_IDLE, M_SDF, M_DATA, M_EDF, M_SBF, M_BC0, M_BC1, M_EBF} mstate_e;

  mstate_e       st;
  logic [VW-1:0] cur_vc, rr_last, sel_vc;
  logic          sel_any;
  logic [6:0]    wcnt;
  logic          eop_end;
  logic [2:0]    granted [NUM_VC];
  logic [2:0]    started [NUM_VC];
  logic signed [15:0] bw_cnt [NUM_VC];
  logic signed [15:0] bc_cnt;
  logic [VW-1:0] slot;
  logic [15:0]   slot_timer;
  logic          in_replay_frame;
  logic          replay_mode;
  logic [NUM_VC-1:0] ready_vc;

  // ---------------- arbitration ----------------
  always_comb begin
    for (int v = 0; v < int'(NUM_VC); v++)
      ready_vc[v] = !vc_empty[v] && (granted[v] != started[v]) && vc_cfg[v].slots[5'(slot)];
  end

  always_comb begin
    logic [4:0]    best_key, key;
    int unsigned   v;
    sel_any  = 1'b0;
    sel_vc   = '0;
    best_key = '1;
    for (int i = 1; i <= int'(NUM_VC); i++) begin
      v   = (int'(rr_last) + i) % NUM_VC;
      key = {vc_cfg[v].prio, bw_cnt[v][15]};
      if (ready_vc[v] && (!sel_any || key < best_key)) begin
        sel_any  = 1'b1;
        sel_vc   = VW'(v);
        best_key = key;
      end
    end
  end

  logic start_bc, start_data;
  assign start_bc   = (st == M_IDLE) && !replay_mode && !rb_replay_valid && rb_space_ok &&
                      !bc_empty && (!bc_cnt[15] || !sel_any);
  assign start_data = (st == M_IDLE) && !replay_mode && !rb_replay_valid && rb_space_ok &&
                      !start_bc && sel_any;

  // ---------------- framing ----------------
  logic [32:0] cur_data;
  assign cur_data = vc_data[cur_vc];

  always_comb begin
    out_valid = 1'b0;
    out_word  = '0;
    unique case (st)
      M_IDLE: begin
        out_valid = replay_mode && rb_replay_valid;
        out_word  = rb_replay_word;
      end
      M_SDF: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0001, d: {rb_seq, 8'(cur_vc), 8'(DW_SDF), K28_3}};
      end
      M_DATA: begin
        out_valid = 1'b1;
        if (!vc_empty[cur_vc]) out_word = '{k: 4'b0000, d: cur_data[31:0]};
        else                   out_word = '{k: 4'b0001, d: {16'h0000, 8'(DW_EDF), K28_3}};
      end
      M_EDF: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0001, d: {16'h0000, eop_end ? 8'(DW_EDF_EOP) : 8'(DW_EDF), K28_3}};
      end
      M_SBF: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0001, d: {rb_seq, bc_data[71:64], 8'(DW_SBF), K28_3}};
      end
      M_BC0: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0000, d: bc_data[31:0]};
      end
      M_BC1: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0000, d: bc_data[63:32]};
      end
      M_EBF: begin
        out_valid = 1'b1;
        out_word  = '{k: 4'b0001, d: {16'h0000, 8'(DW_EBF), K28_3}};
      end
      default: ;
    endcase
  end

  logic fire;
  assign fire            = out_valid && out_ready;
  assign rb_replay_ready = (st == M_IDLE) && replay_mode && out_ready;
  assign rb_wr_en        = fire && (st != M_IDLE);
  assign rb_wr_sof       = (st == M_SDF) || (st == M_SBF);
  assign rb_wr_word      = out_word;
  assign boundary        = (st == M_IDLE) && !in_replay_frame;
  assign bc_rd           = fire && (st == M_EBF);

  always_comb begin
    vc_rd = '0;
    if (fire && st == M_DATA && !vc_empty[cur_vc]) vc_rd[cur_vc] = 1'b1;
  end

  logic data_word_sent;
  assign data_word_sent = fire && out_word.k == 4'b0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; cur_vc <= '0; rr_last <= VW'(NUM_VC - 1); wcnt <= '0; eop_end <= 1'b0;
      slot <= '0; slot_timer <= '0; bc_cnt <= '0; in_replay_frame <= 1'b0;
      replay_mode <= 1'b0;
      vc_frame_start <= '0; bc_frame_start <= 1'b0;
      for (int v = 0; v < int'(NUM_VC); v++) begin
        granted[v] <= '0; started[v] <= '0; bw_cnt[v] <= '0;
      end
    end else begin
      vc_frame_start <= '0;
      bc_frame_start <= 1'b0;

      // timeslots
      if (slot_cycles != 16'd0 && slot_timer >= slot_cycles - 16'd1) begin
        slot_timer <= '0;
        slot       <= (slot == VW'(NUM_VC - 1)) ? '0 : slot + 1'b1;
      end else begin
        slot_timer <= slot_timer + 16'd1;
      end

      // credits
      if (fct_valid && int'(fct_vc) < int'(NUM_VC)) granted[fct_vc[VW-1:0]] <= fct_cnt;

      // replay mode: entered between frames, left when the buffer has no more words
      if (st == M_IDLE) begin
        if (rb_replay_valid && !in_replay_frame) replay_mode <= 1'b1;
        else if (!rb_replay_valid)               replay_mode <= 1'b0;
      end
      if (rb_replay_ready && rb_replay_valid && is_dl_ctrl(rb_replay_word)) begin
        if (rb_replay_word.d[15:8] == 8'(DW_SDF) || rb_replay_word.d[15:8] == 8'(DW_SBF))
          in_replay_frame <= 1'b1;
        else if (rb_replay_word.d[15:8] == 8'(DW_EDF) || rb_replay_word.d[15:8] == 8'(DW_EDF_EOP) ||
                 rb_replay_word.d[15:8] == 8'(DW_EBF))
          in_replay_frame <= 1'b0;
      end

      // bandwidth accounting
      if (data_word_sent) begin
        for (int v = 0; v < int'(NUM_VC); v++) begin
          logic signed [15:0] n;
          n = bw_cnt[v] + 16'(vc_cfg[v].bandwidth);
          if (st == M_DATA && VW'(v) == cur_vc) n = n - 16'sd100;
          if (n > 16'sd4096)  n = 16'sd4096;
          if (n < -16'sd4096) n = -16'sd4096;
          bw_cnt[v] <= n;
        end
        begin
          logic signed [15:0] b;
          b = bc_cnt + 16'(bc_bandwidth);
          if (st == M_BC0 || st == M_BC1) b = b - 16'sd100;
          if (b > 16'sd4096)  b = 16'sd4096;
          if (b < -16'sd4096) b = -16'sd4096;
          bc_cnt <= b;
        end
      end

      unique case (st)
        M_IDLE: begin
          if (start_bc) st <= M_SBF;
          else if (start_data) begin
            st      <= M_SDF;
            cur_vc  <= sel_vc;
            rr_last <= sel_vc;
          end
        end
        M_SDF: if (fire) begin
          st <= M_DATA;
          wcnt <= '0;
          started[cur_vc] <= started[cur_vc] + 3'd1;
          vc_frame_start[cur_vc] <= 1'b1;
        end
        M_DATA: if (fire) begin
          if (vc_empty[cur_vc]) st <= M_IDLE;           // EDF sent in place of data
          else begin
            wcnt <= wcnt + 7'd1;
            if (cur_data[32] || wcnt == 7'(MAX_FRAME - 1)) begin
              st      <= M_EDF;
              eop_end <= cur_data[32];
            end
          end
        end
        M_EDF: if (fire) st <= M_IDLE;
        M_SBF: if (fire) begin st <= M_BC0; bc_frame_start <= 1'b1; end
        M_BC0: if (fire) st <= M_BC1;
        M_BC1: if (fire) st <= M_EBF;
        M_EBF: if (fire) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
