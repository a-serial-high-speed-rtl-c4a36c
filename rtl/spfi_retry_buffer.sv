// spfi_retry_buffer - error recovery buffer of the data link layer.
//
// Every frame the MAC sends for the first time is also written here, word by word,
// before scrambling and CRC (those are redone on the way out, so a replayed frame is
// bit-identical to the original). Frames carry 8-bit sequence numbers; the address of
// each outstanding frame's first word is kept in a table of SLOTS entries indexed by
// the sequence number. An ACK(s) from the far end releases frames up to s. A NACK(s),
// or TIMEOUT cycles without progress while frames are outstanding, schedules a replay
// from frame s (or the oldest outstanding frame). The replay starts when the MAC is
// between frames (boundary) and streams the stored words out until it reaches the
// write pointer; the MAC takes no new frame meanwhile (space_ok is low).
// Go-back-N with ACK/NACK words and a timeout is this design's own concrete form of
// the CODEC's "re-send corrupted data packets".
//
// Timing: the replay word is shown combinationally from the buffer (replay_valid /
// replay_word, taken with replay_ready); ACK/NACK take effect on the next edge.
//
// Lint note: only the low bits of the pending sequence number index the frame table;
// it is kept 8 bits wide like the ACK/NACK sequence numbers it is loaded from.
module spfi_retry_buffer
  import spfi_pkg::*;
#(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned SLOTS     = 8,
  parameter int unsigned MAX_FRAME = 64,
  parameter int unsigned TIMEOUT   = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  // write side (first transmission)
  input  logic       wr_en,
  input  logic       wr_sof,      // word is the start of a frame
  input  word_t      wr_word,
  output logic [7:0] next_seq,    // sequence number for the next frame
  output logic       space_ok,    // room for one more frame of MAX_FRAME words
  // far-end acknowledgements
  input  logic       ack_valid,
  input  logic [7:0] ack_seq,
  input  logic       nack_valid,
  input  logic [7:0] nack_seq,
  // replay
  input  logic       boundary,
  output logic       replay_valid,
  output word_t      replay_word,
  input  logic       replay_ready,
  output logic       replay_start,  // pulse: a replay begins
  output logic       idle           // nothing outstanding
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  word_t       mem [DEPTH];
  logic [AW:0] start_addr [SLOTS];
  logic [AW:0] wptr, aptr, rp;
  logic [7:0]  aseq, nseq, pend_seq;
  logic        replaying, pending;
  logic [TW-1:0] timer;
  logic [7:0]  outstanding;

  assign next_seq    = nseq;
  assign outstanding = nseq - aseq;
  assign idle        = (outstanding == 8'd0);
  assign space_ok    = !replaying && !pending && (outstanding < 8'(SLOTS)) &&
                       ((wptr - aptr) <= (AW+1)'(DEPTH - MAX_FRAME - 2));
  assign replay_valid = replaying && (rp != wptr);
  assign replay_word  = mem[rp[AW-1:0]];

  // sequence number s lies in [aseq, nseq)
  function automatic logic in_window(logic [7:0] s);
    return (8'(s - aseq)) < outstanding;
  endfunction

  always_ff @(posedge clk) if (wr_en) mem[wptr[AW-1:0]] <= wr_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; aptr <= '0; rp <= '0;
      aseq <= '0; nseq <= '0; pend_seq <= '0;
      replaying <= 1'b0; pending <= 1'b0; timer <= '0;
      replay_start <= 1'b0;
      for (int i = 0; i < int'(SLOTS); i++) start_addr[i] <= '0;
    end else begin
      replay_start <= 1'b0;
      if (wr_en) begin
        wptr <= wptr + 1'b1;
        if (wr_sof) begin
          start_addr[nseq[SW-1:0]] <= wptr;
          nseq <= nseq + 8'd1;
        end
      end

      // acknowledgements: release frames, schedule replays
      if (nack_valid && (in_window(nack_seq) || nack_seq == nseq)) begin
        aseq  <= nack_seq;
        aptr  <= (nack_seq == nseq) ? wptr : start_addr[nack_seq[SW-1:0]];
        timer <= '0;
        if (nack_seq != nseq) begin
          pending  <= 1'b1;
          pend_seq <= nack_seq;
        end
      end else if (ack_valid && in_window(ack_seq)) begin
        aseq  <= ack_seq + 8'd1;
        aptr  <= (8'(ack_seq + 8'd1) == nseq) ? wptr : start_addr[SW'(ack_seq + 8'd1)];
        timer <= '0;
      end else if (idle || replaying) begin
        timer <= '0;
      end else if (timer == TW'(TIMEOUT)) begin
        timer    <= '0;
        pending  <= 1'b1;
        pend_seq <= aseq;
      end else begin
        timer <= timer + 1'b1;
      end

      // replay
      if (pending && boundary) begin
        pending      <= 1'b0;
        replaying    <= 1'b1;
        replay_start <= 1'b1;
        rp           <= start_addr[pend_seq[SW-1:0]];
      end else if (replaying) begin
        if (replay_valid && replay_ready) rp <= rp + 1'b1;
        else if (!replay_valid) replaying <= 1'b0;
      end
    end
  end
endmodule
