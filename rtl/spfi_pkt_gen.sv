// spfi_pkt_gen - hardware packet generator of the validation system.
//
// Writes packets of fixed-step incrementing 32-bit data into one OUT VC buffer of a
// CODEC, without using the system bus, so it can fill the link on its own. Each packet
// has pkt_len words; word values start at seed and increase by step across packets.
// Between packets it waits gap cycles; it sends num_pkts packets (0: without end)
// after start, and stops at once on stop. The packet format and controls are this
// design's own; the document says only that the data are fixed-step incremental.
// Timing: one word per host clock while the buffer is not full.
module spfi_pkt_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic [31:0] seed,
  input  logic [31:0] step,
  input  logic [15:0] pkt_len,    // words per packet, at least 1
  input  logic [15:0] gap,
  input  logic [31:0] num_pkts,
  input  logic        full,
  output logic        wr,
  output logic [32:0] wdata,      // {eop, data}
  output logic        busy,
  output logic [31:0] pkts_sent
);
  logic [31:0] value;
  logic [15:0] wcnt, gcnt;
  logic        last;

  assign last  = (wcnt == pkt_len - 16'd1) || (pkt_len == 16'd0);
  assign wr    = busy && (gcnt == 16'd0) && !full;
  assign wdata = {last, value};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; value <= '0; wcnt <= '0; gcnt <= '0; pkts_sent <= '0;
    end else if (start) begin
      busy <= 1'b1; value <= seed; wcnt <= '0; gcnt <= '0; pkts_sent <= '0;
    end else if (stop) begin
      busy <= 1'b0;
    end else if (busy) begin
      if (gcnt != 16'd0) gcnt <= gcnt - 16'd1;
      else if (wr) begin
        value <= value + step;
        if (last) begin
          wcnt      <= '0;
          gcnt      <= gap;
          pkts_sent <= pkts_sent + 32'd1;
          if (num_pkts != 32'd0 && pkts_sent + 32'd1 == num_pkts) busy <= 1'b0;
        end else begin
          wcnt <= wcnt + 16'd1;
        end
      end
    end
  end
endmodule
