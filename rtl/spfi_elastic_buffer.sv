// spfi_elastic_buffer - receive elastic buffer of the lane layer.
//
// Words decoded in the recovered receive clock (wclk) are written into a small
// dual-clock FIFO and read in the CODEC clock (rclk), which may run a little faster or
// slower. SKIP words absorb the difference: the write side drops a SKIP when the buffer
// is more than half full, and the read side, finding a SKIP at its head while the
// buffer is less than half full, hands the SKIP out without removing it, so the
// buffer fills again. The SKIP rule is the CODEC's; showing the head SKIP again on the
// read side is this design's reading of "the SKIP word is not skipped".
// Every rclk cycle with data gives one word (valid); when the FIFO is empty, valid is
// low. Words pass with 3-4 rclk cycles of latency.
//
// Lint note: the FIFO full flag is not used; a full buffer can only follow a clock
// mismatch beyond what SKIP words absorb, and words are then lost by design.
module spfi_elastic_buffer
  import spfi_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  wclk,
  input  logic  wrst_n,
  input  logic  wr_en,
  input  word_t wr_word,
  input  logic  wr_err,       // decoder error flag travelling with the word
  output logic  skip_dropped, // pulse (wclk): a SKIP was dropped

  input  logic  rclk,
  input  logic  rrst_n,
  output logic  rd_valid,
  output word_t rd_word,
  output logic  rd_err,
  output logic  skip_repeated // pulse (rclk): a SKIP was given out again
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [36:0] rdata;
  logic        full, empty, drop, rd_en;
  logic [AW:0] wr_free;
  logic [AW:0] rfill;
  word_t       head;

  assign drop         = wr_en && is_lane_word(wr_word, LW_SKIP) && (wr_free < (AW+1)'(DEPTH / 2));
  assign skip_dropped = drop;

  spfi_async_fifo #(.WIDTH(37), .DEPTH(DEPTH), .COMMIT_MODE(1'b0)) u_fifo (
    .wclk, .wrst_n, .wr_en(wr_en && !drop), .wr_data({wr_err, wr_word}),
    .commit(1'b0), .rollback(1'b0), .full, .wr_free,
    .rclk, .rrst_n, .rd_en, .rd_data(rdata), .empty, .rd_count(rfill)
  );

  assign head = rdata[35:0];
  logic repeat_skip;
  assign repeat_skip   = !empty && is_lane_word(head, LW_SKIP) && (rfill < (AW+1)'(DEPTH / 2));
  assign rd_en         = !empty && !repeat_skip;
  assign rd_valid      = !empty;
  assign rd_word       = head;
  assign rd_err        = rdata[36];
  assign skip_repeated = repeat_skip;

endmodule
