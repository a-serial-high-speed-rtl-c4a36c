// spfi_rolling_memory - low-level link analyser ("rolling memory").
//
// Two circular memories of DEPTH 36-bit words, one for the words a CODEC transmits
// (just before 8B/10B encoding) and one for those it receives (just after decoding),
// record the link continuously, the oldest word being overwritten. When armed, a
// word equal to the trigger pattern (on the side chosen by trig_rx) starts the
// post-trigger phase: POST_TRIGGER more words are stored on each side, then recording
// stops and irq is raised (the words of the trigger cycle are kept as well), so the memory holds the traffic before and after the
// trigger. The host then reads either memory at rd_addr (relative to the oldest word
// kept; one-cycle read latency) and re-arms. DEPTH 8192, POST_TRIGGER 4096 and the
// 36-bit width are the analyser's; the port set is this design's own.
module spfi_rolling_memory
  import spfi_pkg::*;
#(
  parameter int unsigned DEPTH        = 8192,
  parameter int unsigned POST_TRIGGER = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,        // start recording, wait for the trigger
  input  logic        trig_rx,    // trigger on the receive (1) or transmit (0) word
  input  word_t       trig_word,
  input  logic        tx_valid,
  input  word_t       tx_word,
  input  logic        rx_valid,
  input  word_t       rx_word,
  output logic        irq,        // capture finished (level, cleared by arm)
  output logic        recording,
  input  logic        rd_sel_rx,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output word_t       rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  word_t mem_tx [DEPTH];
  word_t mem_rx [DEPTH];
  logic [AW-1:0] wp_tx, wp_rx;
  logic          triggered;
  logic [AW:0]   post_tx, post_rx;
  logic          hit, tx_we, rx_we;

  assign hit   = recording && !triggered &&
                 (trig_rx ? (rx_valid && rx_word == trig_word) : (tx_valid && tx_word == trig_word));
  assign tx_we = recording && tx_valid && !(triggered && post_tx == '0);
  assign rx_we = recording && rx_valid && !(triggered && post_rx == '0);

  always_ff @(posedge clk) begin
    if (tx_we) mem_tx[wp_tx] <= tx_word;
    if (rx_we) mem_rx[wp_rx] <= rx_word;
    rd_data <= rd_sel_rx ? mem_rx[AW'(wp_rx + rd_addr)] : mem_tx[AW'(wp_tx + rd_addr)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_tx <= '0; wp_rx <= '0; triggered <= 1'b0; recording <= 1'b0; irq <= 1'b0;
      post_tx <= '0; post_rx <= '0;
    end else if (arm) begin
      recording <= 1'b1; triggered <= 1'b0; irq <= 1'b0;
    end else begin
      if (tx_we) wp_tx <= wp_tx + 1'b1;
      if (rx_we) wp_rx <= wp_rx + 1'b1;
      if (hit) begin
        triggered <= 1'b1;
        // POST_TRIGGER words are stored on each side after the trigger cycle
        post_tx <= (AW+1)'(POST_TRIGGER);
        post_rx <= (AW+1)'(POST_TRIGGER);
      end else if (triggered) begin
        if (tx_we) post_tx <= post_tx - 1'b1;
        if (rx_we) post_rx <= post_rx - 1'b1;
        if (recording && post_tx == '0 && post_rx == '0) begin
          recording <= 1'b0;
          irq       <= 1'b1;
        end
      end
    end
  end
endmodule
