// spfi_lane_rx - lane control word detector.
//
// Looks at each word leaving the elastic buffer. Lane control words (INIT1, INIT2,
// INIT3, STANDBY, IDLE, SKIP) are recognised by their whole 36-bit pattern and turned
// into one-cycle event pulses for the initialisation state machine; they never reach
// the data link. Every other word is passed to the data link, with its decoder error
// flag, but only while the lane is ACTIVE. Purely combinational.
// dl_word and dl_err are the input word and flag unchanged; only dl_valid gates them.
module spfi_lane_rx
  import spfi_pkg::*;
(
  input  logic  active,
  input  logic  rx_valid,
  input  word_t rx_word,
  input  logic  rx_err,
  output logic  ev_init1,
  output logic  ev_init2,
  output logic  ev_init3,
  output logic  ev_standby,
  output logic  ev_other,
  output logic  ev_any,
  output logic  dl_valid,
  output word_t dl_word,
  output logic  dl_err
);
  logic lane_w, idle_w, skip_w;
  assign ev_init1   = rx_valid && !rx_err && is_lane_word(rx_word, LW_INIT1);
  assign ev_init2   = rx_valid && !rx_err && is_lane_word(rx_word, LW_INIT2);
  assign ev_init3   = rx_valid && !rx_err && is_lane_word(rx_word, LW_INIT3);
  assign ev_standby = rx_valid && !rx_err && is_lane_word(rx_word, LW_STANDBY);
  assign idle_w     = is_lane_word(rx_word, LW_IDLE);
  assign skip_w     = is_lane_word(rx_word, LW_SKIP);
  assign lane_w     = ev_init1 || ev_init2 || ev_init3 || ev_standby || idle_w || skip_w;
  assign ev_other   = rx_valid && !rx_err && (idle_w || !lane_w);
  assign ev_any     = rx_valid;
  assign dl_valid   = rx_valid && active && !lane_w;
  assign dl_word    = rx_word;
  assign dl_err     = rx_err;
endmodule
