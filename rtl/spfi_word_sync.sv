// spfi_word_sync - symbol and word alignment of the raw 40-bit receive stream.
//
// The SerDes delivers 40 bits per clock at an arbitrary bit offset. The last two
// words form an 80-bit window (older bits first); for each of the 40 possible offsets
// the block checks whether the 7-bit comma of K28.5 (0011111 or 1100000) starts
// there. Lane control words carry K28.5 in symbol 0, so a comma marks both the symbol
// and the word boundary. Two commas found at the same offset lock the alignment; while
// locked, LOSE_ERRS code errors (err_in, from the decoder) within 256 words drop the
// lock and the search starts again. The lock/lose counts are this design's own.
//
// Timing: aligned output is registered, one cycle after the input word that completes
// it. synced tells whether the output can be trusted.
module spfi_word_sync #(
  parameter int unsigned LOSE_ERRS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [39:0] raw,
  input  logic        err_in,
  output logic [39:0] aligned,
  output logic        synced
);
  logic [39:0] prev;
  logic [79:0] win;
  logic [5:0]  offset, cand;
  logic        found;
  logic [1:0]  hits;
  logic [7:0]  win_cnt;
  logic [3:0]  errs;

  assign win = {prev, raw};

  always_comb begin
    found = 1'b0;
    cand  = '0;
    for (int o = 39; o >= 0; o--) begin
      if (win[79 - o -: 7] == 7'b0011111 || win[79 - o -: 7] == 7'b1100000) begin
        found = 1'b1;
        cand  = 6'(o);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; aligned <= '0; offset <= '0; synced <= 1'b0;
      hits <= '0; win_cnt <= '0; errs <= '0;
    end else begin
      prev    <= raw;
      aligned <= win[79 - offset -: 40];
      if (!synced) begin
        if (found) begin
          if (cand == offset) begin
            if (hits == 2'd1) begin
              synced <= 1'b1;
              errs <= '0;
              win_cnt <= '0;
            end
            hits <= hits + 2'd1;
          end else begin
            offset <= cand;
            hits   <= 2'd1;
          end
        end
      end else begin
        win_cnt <= win_cnt + 8'd1;
        if (win_cnt == 8'hFF) errs <= '0;
        else if (err_in) errs <= errs + 4'd1;
        if (err_in && errs == 4'(LOSE_ERRS - 1)) begin
          synced <= 1'b0;
          hits   <= '0;
        end
      end
    end
  end
endmodule
