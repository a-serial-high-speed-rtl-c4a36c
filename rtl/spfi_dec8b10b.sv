// spfi_dec8b10b - 8B/10B decoder for one aligned 40-bit code word per clock.
//
// A 1024-entry table, computed at elaboration from the encoder function in spfi_pkg,
// tells for every 10-bit code whether it is valid at negative and/or positive running
// disparity and which byte and K flag it carries. A code valid at neither disparity is
// a code error; a code valid only at the other disparity is a disparity error (the
// byte is still delivered). The running disparity is then taken from the received
// code itself, so a single error does not cause a string of disparity errors.
// Symbol 0 is in code[39:30]. Registered output, one cycle latency.
//
// Lint notes: the decode table is one 11264-bit constant, which is why its
// construction looks like a very wide replication. While the table is built, the
// encoder's running-disparity output (bit 10 of its result) is not needed.
module spfi_dec8b10b
  import spfi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [39:0] code,
  output word_t       dout,
  output logic [3:0]  code_err,   // per symbol: not a valid code
  output logic [3:0]  disp_err    // per symbol: valid code, wrong running disparity
);
  // entry: {valid at rd-, valid at rd+, k, byte}
  localparam int unsigned EW = 11;
  localparam int K_CODES[12] = '{28, 60, 92, 124, 156, 188, 220, 252, 247, 251, 253, 254};

  function automatic logic [1024*EW-1:0] build_table();
    logic [1024*EW-1:0] t;
    logic [10:0] e;
    t = '0;
    for (int rd = 0; rd < 2; rd++) begin
      for (int b = 0; b < 256; b++) begin
        e = enc8b10b(8'(b), 1'b0, rd[0]);
        t[EW*int'(e[9:0]) + 10 - rd] = 1'b1;
        t[EW*int'(e[9:0]) +: 8]     = 8'(b);
      end
      for (int j = 0; j < 12; j++) begin
        e = enc8b10b(8'(K_CODES[j]), 1'b1, rd[0]);
        t[EW*int'(e[9:0]) + 10 - rd] = 1'b1;
        t[EW*int'(e[9:0]) + 8]      = 1'b1;
        t[EW*int'(e[9:0]) +: 8]     = 8'(K_CODES[j]);
      end
    end
    return t;
  endfunction

  localparam logic [1024*EW-1:0] DEC = build_table();

  logic  rd, rd_n;
  word_t w;
  logic [3:0] ce, de;

  always_comb begin
    logic        r;
    logic [9:0]  c;
    logic [EW-1:0] e;
    r = rd;
    for (int i = 0; i < 4; i++) begin
      c = code[39 - 10*i -: 10];
      e = DEC[EW*int'(c) +: EW];
      w.d[8*i +: 8] = e[7:0];
      w.k[i]        = e[8];
      ce[i] = !e[10] && !e[9];
      de[i] = !ce[i] && (r ? !e[9] : !e[10]);
      r = rd_after(rd_after(r, c[9:4], 6), {2'b00, c[3:0]}, 4);
    end
    rd_n = r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= 1'b0; dout <= '0; code_err <= '0; disp_err <= '0;
    end else if (en) begin
      rd <= rd_n; dout <= w; code_err <= ce; disp_err <= de;
    end
  end
endmodule
