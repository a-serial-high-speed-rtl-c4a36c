// spfi_pkt_check - hardware packet consumer of the validation system.
//
// Drains one IN VC buffer of a CODEC and checks the data against the same
// fixed-step incrementing sequence the generator produces (seed, step, pkt_len). It
// counts words, packets, data errors (word differs from the expected value; the
// expectation then resynchronises on the received value) and framing errors (EOP not
// on the pkt_len-th word). Reads one word per clock whenever the buffer is not empty
// and the checker is enabled; start clears the counters and reloads the seed.
module spfi_pkt_check (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        enable,
  input  logic [31:0] seed,
  input  logic [31:0] step,
  input  logic [15:0] pkt_len,
  input  logic        empty,
  input  logic [32:0] rdata,
  output logic        rd,
  output logic [31:0] words,
  output logic [31:0] pkts,
  output logic [15:0] data_errors,
  output logic [15:0] frame_errors
);
  logic [31:0] expect_v;
  logic [15:0] wcnt;
  logic        last;

  assign rd   = enable && !empty && !start;   // start only resets, it takes no word
  assign last = (wcnt == pkt_len - 16'd1) || (pkt_len == 16'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      expect_v <= '0; wcnt <= '0; words <= '0; pkts <= '0; data_errors <= '0; frame_errors <= '0;
    end else if (start) begin
      expect_v <= seed; wcnt <= '0; words <= '0; pkts <= '0; data_errors <= '0; frame_errors <= '0;
    end else if (rd) begin
      words    <= words + 32'd1;
      expect_v <= rdata[31:0] + step;
      if (rdata[31:0] != expect_v && data_errors != 16'hFFFF) data_errors <= data_errors + 16'd1;
      if (rdata[32] != last && frame_errors != 16'hFFFF) frame_errors <= frame_errors + 16'd1;
      if (rdata[32]) begin
        pkts <= pkts + 32'd1;
        wcnt <= '0;
      end else begin
        wcnt <= wcnt + 16'd1;
      end
    end
  end
endmodule
