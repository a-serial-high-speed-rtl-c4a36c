// spfi_word_id_fsm - Data Word Identification state machine of the receive data link.
//
// Classifies each received word by the frame it belongs to. Its five states are the
// CODEC's: NO_TRAFFIC (lane not active), IDLE (between frames), DATA (inside a data
// frame), BC (inside a broadcast frame) and MIXED (a broadcast frame inside a data
// frame). The transitions are this design's own:
//   IDLE:  SDF -> DATA, SBF -> BC; anything else outside a frame is ignored.
//   DATA:  data word -> data; EDF -> IDLE (frame end); SBF -> MIXED; SDF aborts the
//          frame and starts a new one; EBF or a bad word abort the frame.
//   BC:    data word -> broadcast; EBF -> IDLE; SBF restarts; SDF aborts the BC frame
//          and starts a data frame; EDF or a bad word abort.
//   MIXED: data word -> broadcast; EBF -> DATA; anything else aborts both frames.
//   Lane going down aborts whatever frame is open.
// Outputs are combinational decodes of the present word and state; the state changes
// on the clock edge.
module spfi_word_id_fsm
  import spfi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      lane_active,
  input  logic      valid,
  input  logic      w_sdf,
  input  logic      w_edf,      // EDF or EDF_EOP
  input  logic      w_sbf,
  input  logic      w_ebf,
  input  logic      w_data,
  input  logic      w_bad,      // corrupted or unknown word
  output rx_state_e state,
  output logic      data_start,
  output logic      data_word,
  output logic      data_end,
  output logic      data_abort,
  output logic      bc_start,
  output logic      bc_word,
  output logic      bc_end,
  output logic      bc_abort
);
  rx_state_e nxt;

  always_comb begin
    nxt = state;
    {data_start, data_word, data_end, data_abort, bc_start, bc_word, bc_end, bc_abort} = '0;
    if (!lane_active) begin
      nxt = RX_NO_TRAFFIC;
      data_abort = (state == RX_DATA) || (state == RX_MIXED);
      bc_abort   = (state == RX_BC) || (state == RX_MIXED);
    end else if (valid) begin
      unique case (state)
        RX_NO_TRAFFIC, RX_IDLE: begin
          if (w_sdf) begin nxt = RX_DATA; data_start = 1'b1; end
          else if (w_sbf) begin nxt = RX_BC; bc_start = 1'b1; end
          else nxt = RX_IDLE;
        end
        RX_DATA: begin
          if (w_bad) begin nxt = RX_IDLE; data_abort = 1'b1; end
          else if (w_data) data_word = 1'b1;
          else if (w_edf) begin nxt = RX_IDLE; data_end = 1'b1; end
          else if (w_sbf) begin nxt = RX_MIXED; bc_start = 1'b1; end
          else if (w_sdf) begin data_abort = 1'b1; data_start = 1'b1; end
          else begin nxt = RX_IDLE; data_abort = 1'b1; end
        end
        RX_BC: begin
          if (w_bad) begin nxt = RX_IDLE; bc_abort = 1'b1; end
          else if (w_data) bc_word = 1'b1;
          else if (w_ebf) begin nxt = RX_IDLE; bc_end = 1'b1; end
          else if (w_sbf) begin bc_abort = 1'b1; bc_start = 1'b1; end
          else if (w_sdf) begin nxt = RX_DATA; bc_abort = 1'b1; data_start = 1'b1; end
          else begin nxt = RX_IDLE; bc_abort = 1'b1; end
        end
        RX_MIXED: begin
          if (w_bad) begin nxt = RX_IDLE; bc_abort = 1'b1; data_abort = 1'b1; end
          else if (w_data) bc_word = 1'b1;
          else if (w_ebf) begin nxt = RX_DATA; bc_end = 1'b1; end
          else begin nxt = RX_IDLE; bc_abort = 1'b1; data_abort = 1'b1; end
        end
        default: nxt = RX_IDLE;
      endcase
    end else if (state == RX_NO_TRAFFIC) begin
      nxt = RX_IDLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= RX_NO_TRAFFIC;
    else        state <= nxt;
endmodule
