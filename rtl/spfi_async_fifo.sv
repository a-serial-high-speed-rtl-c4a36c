// spfi_async_fifo - dual-clock FIFO used for the OUT VC, IN VC, OUT BC and IN BC
// buffers of the CODEC.
//
// Binary pointers one bit wider than the address are converted to Gray code and
// passed through two-flop synchronisers, so full/empty are exact in their own domain
// and conservative across it. The write side also offers a frame commit/rollback: the
// reader only sees words up to the last commit (when COMMIT_MODE = 1), and a rollback
// throws away the words written since. The receive side uses this to drop a frame
// whose CRC fails after its words are already in the buffer. With COMMIT_MODE = 0
// every write is visible at once.
//
// Write side (wclk): wr_en/wr_data, full, wr_free (free words, may lag reads by the
// synchroniser delay), commit, rollback. Read side (rclk): show-ahead rd_data valid
// while !empty, rd_en pops, rd_count = words visible to the reader. Latency write-to-visible: three rclk edges after the
// commit (or write), plus one wclk per word of a committed frame, since the visible
// pointer walks forward one word per cycle to keep the Gray code crossing safe.
module spfi_async_fifo #(
  parameter int unsigned WIDTH       = 33,
  parameter int unsigned DEPTH       = 256,
  parameter bit          COMMIT_MODE = 1'b0
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             commit,
  input  logic             rollback,
  output logic             full,
  output logic [$clog2(DEPTH):0] wr_free,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wptr, wcommit, wvis, rptr;
  ptr_t wcommit_g, rptr_g;
  ptr_t rptr_g_s1, rptr_g_s2, wcommit_g_s1, wcommit_g_s2;
  ptr_t rptr_w, wcommit_r;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  ptr_t wptr_next, wcommit_next;
  always_comb begin
    wptr_next    = wptr;
    wcommit_next = wcommit;
    if (wr_en && !full) wptr_next = wptr + 1'b1;
    if (COMMIT_MODE) begin
      if (rollback)    wptr_next    = wcommit;
      else if (commit) wcommit_next = wptr_next;
    end else begin
      wcommit_next = wptr_next;
    end
  end

  always_ff @(posedge wclk) if (wr_en && !full) mem[wptr[AW-1:0]] <= wr_data;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr <= '0; wcommit <= '0; wvis <= '0; wcommit_g <= '0;
      rptr_g_s1 <= '0; rptr_g_s2 <= '0;
    end else begin
      wptr      <= wptr_next;
      wcommit   <= wcommit_next;
      // the visible pointer steps by one per cycle so its Gray code changes one bit
      // at a time even when a whole frame is committed at once
      if (wvis != wcommit) begin
        wvis      <= wvis + 1'b1;
        wcommit_g <= bin2gray(wvis + 1'b1);
      end
      rptr_g_s1 <= rptr_g;
      rptr_g_s2 <= rptr_g_s1;
    end
  end
  assign rptr_w  = gray2bin(rptr_g_s2);
  assign full    = (wptr - rptr_w) >= ptr_t'(DEPTH);
  assign wr_free = ptr_t'(DEPTH) - (wptr - rptr_w);

  // ---------------- read side ----------------
  ptr_t rptr_next;
  assign rptr_next = (rd_en && !empty) ? rptr + 1'b1 : rptr;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr <= '0; rptr_g <= '0;
      wcommit_g_s1 <= '0; wcommit_g_s2 <= '0;
    end else begin
      rptr         <= rptr_next;
      rptr_g       <= bin2gray(rptr_next);
      wcommit_g_s1 <= wcommit_g;
      wcommit_g_s2 <= wcommit_g_s1;
    end
  end
  assign wcommit_r = gray2bin(wcommit_g_s2);
  assign empty     = (wcommit_r == rptr);
  assign rd_data   = mem[rptr[AW-1:0]];
  assign rd_count  = wcommit_r - rptr;

endmodule
