// spfi_lane_tx - lane control word insertion and SKIP insertion.
//
// Produces one word per clock for the 8B/10B encoder. Every SKIP_INTERVAL-th word is a
// SKIP (the CODEC sends one SKIP every 5000 words, enough for 100 ppm clock
// difference); in that cycle the data link is held off (dl_ready low). Otherwise, while
// the lane is not ACTIVE, the word chosen by the initialisation state machine (INIT1,
// INIT2, INIT3, STANDBY or IDLE) is sent; while ACTIVE, the data link's word is sent,
// or IDLE when it has none. dl_ready is combinational: a data-link word is taken in a
// cycle with dl_valid && dl_ready.
module spfi_lane_tx
  import spfi_pkg::*;
#(
  parameter int unsigned SKIP_INTERVAL = 5000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       active,
  input  lane_word_e lane_sel,
  input  logic       dl_valid,
  input  word_t      dl_word,
  output logic       dl_ready,
  output word_t      tx_word,
  output logic       skip_sent
);
  localparam int unsigned CW = $clog2(SKIP_INTERVAL);
  logic [CW-1:0] cnt;
  logic          skip_now;

  assign skip_now  = (cnt == CW'(SKIP_INTERVAL - 1));
  assign dl_ready  = active && !skip_now;
  assign skip_sent = skip_now;

  always_comb begin
    if (skip_now)                tx_word = lane_word(LW_SKIP);
    else if (!active)            tx_word = lane_word(lane_sel);
    else if (dl_valid)           tx_word = dl_word;
    else                         tx_word = lane_word(LW_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= skip_now ? '0 : cnt + 1'b1;
  end
endmodule
