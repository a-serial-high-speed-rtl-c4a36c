// spfi_enc8b10b - 8B/10B encoder for one 36-bit SpaceFibre word per clock.
//
// The four symbols are encoded in the same cycle by four table encoders chained
// through their running disparity; the disparity after symbol 3 is kept in a register
// for the next word. Symbol 0 (d[7:0], k[0]) is placed in code[39:30] so that a
// SerDes sending bit 39 first sends symbol 0 first. The code tables are the standard
// 8B/10B ones (in spfi_pkg); the chained four-symbol arrangement is this design's
// own, since the parallel encoder the CODEC uses is not described in detail.
//
// Timing: registered output, one cycle latency; a word is taken every cycle while en.
module spfi_enc8b10b
  import spfi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  word_t       din,
  output logic [39:0] code
);
  logic        rd;
  logic [39:0] c;
  logic        rd_n;

  always_comb begin
    logic        r;
    logic [10:0] e;
    r = rd;
    for (int i = 0; i < 4; i++) begin
      e = enc8b10b(din.d[8*i +: 8], din.k[i], r);
      c[39 - 10*i -: 10] = e[9:0];
      r = e[10];
    end
    rd_n = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd   <= 1'b0;
      code <= '0;
    end else if (en) begin
      rd   <= rd_n;
      code <= c;
    end
  end
endmodule
