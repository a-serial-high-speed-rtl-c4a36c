// spfi_lane_init_fsm - lane initialisation state machine.
//
// Brings a SpaceFibre lane from DISABLED to ACTIVE by a three-step handshake with
// the far end: in STARTED the lane sends INIT1 until it is symbol-synchronised and
// hears INIT1 or INIT2, in CONNECTING it sends INIT2 until it hears INIT2 or INIT3,
// and in CONNECTED it sends INIT3 until it has sent at least MIN_INIT3 of them and
// heard INIT3 (or data/IDLE from a far end already active). Each of these states
// falls back to WAIT after TIMEOUT cycles. ACTIVE is left for WAIT when the receiver
// loses synchronisation, when no word arrives for TIMEOUT cycles, or when the far end
// starts again (INIT1/INIT2 heard). A standby request sends STANDBY words for
// MIN_INIT3 cycles and disables the lane; a STANDBY heard from the far end disables it
// too. From DISABLED, lane_start (or auto_start and an INIT1 heard) restarts it.
// The overall role follows the CODEC; the states' detail and all counts are this
// design's own, the exact machine being left to the SpaceFibre standard.
// Lint note: tx_word only takes the codes 1..6, so its upper bits are constant zero.
module spfi_lane_init_fsm
  import spfi_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 64,
  parameter int unsigned TIMEOUT     = 2048,
  parameter int unsigned MIN_INIT3   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lane_start,
  input  logic        auto_start,
  input  logic        lane_standby,
  input  logic        synced,
  input  logic        rx_init1,
  input  logic        rx_init2,
  input  logic        rx_init3,
  input  logic        rx_standby,
  input  logic        rx_other,      // IDLE or a data-link word
  input  logic        rx_any,        // any word received
  output lane_state_e state,
  output lane_word_e  tx_word,       // lane word to send when not active
  output logic        active,
  output logic        reinit         // pulse: ACTIVE was left because of a fault
);
  localparam int unsigned CW = $clog2(TIMEOUT + 1);
  logic [CW-1:0] timer;
  logic [7:0]    sent3;
  logic          heard3;
  lane_state_e   nxt;

  assign active = (state == LS_ACTIVE);

  always_comb begin
    unique case (state)
      LS_STARTED:      tx_word = LW_INIT1;
      LS_CONNECTING:   tx_word = LW_INIT2;
      LS_CONNECTED:    tx_word = LW_INIT3;
      LS_PREP_STANDBY: tx_word = LW_STANDBY;
      default:         tx_word = LW_IDLE;
    endcase
  end

  always_comb begin
    nxt = state;
    unique case (state)
      LS_DISABLED:
        if (lane_start || (auto_start && synced && rx_init1)) nxt = LS_WAIT;
      LS_WAIT:
        if (lane_standby) nxt = LS_DISABLED;
        else if (timer >= CW'(WAIT_CYCLES) || (synced && rx_init1)) nxt = LS_STARTED;
      LS_STARTED:
        if (lane_standby) nxt = LS_PREP_STANDBY;
        else if (synced && (rx_init1 || rx_init2)) nxt = LS_CONNECTING;
        else if (timer >= CW'(TIMEOUT)) nxt = LS_WAIT;
      LS_CONNECTING:
        if (lane_standby) nxt = LS_PREP_STANDBY;
        else if (synced && (rx_init2 || rx_init3)) nxt = LS_CONNECTED;
        else if (timer >= CW'(TIMEOUT) || !synced) nxt = LS_WAIT;
      LS_CONNECTED:
        if (lane_standby) nxt = LS_PREP_STANDBY;
        else if (rx_init1) nxt = LS_WAIT;
        else if ((heard3 || rx_init3 || rx_other) && sent3 >= 8'(MIN_INIT3 - 1)) nxt = LS_ACTIVE;
        else if (timer >= CW'(TIMEOUT) || !synced) nxt = LS_WAIT;
      LS_ACTIVE:
        if (lane_standby) nxt = LS_PREP_STANDBY;
        else if (rx_standby) nxt = LS_DISABLED;
        else if (!synced || rx_init1 || rx_init2 || timer >= CW'(TIMEOUT)) nxt = LS_WAIT;
      LS_PREP_STANDBY:
        if (timer >= CW'(MIN_INIT3)) nxt = LS_DISABLED;
      default: nxt = LS_DISABLED;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= LS_DISABLED;
      timer  <= '0;
      sent3  <= '0;
      heard3 <= 1'b0;
      reinit <= 1'b0;
    end else begin
      state  <= nxt;
      reinit <= (state == LS_ACTIVE) && (nxt == LS_WAIT);
      if (nxt != state) timer <= '0;
      else if (state == LS_ACTIVE && rx_any) timer <= '0;
      else if (timer != CW'(TIMEOUT)) timer <= timer + 1'b1;
      if (state != LS_CONNECTED) begin
        sent3 <= '0; heard3 <= 1'b0;
      end else begin
        if (sent3 != 8'hFF) sent3 <= sent3 + 8'd1;
        if (rx_init3) heard3 <= 1'b1;
      end
    end
  end
endmodule
