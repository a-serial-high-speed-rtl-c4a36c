// spfi_error_inject - word-level error injection on a 40-bit encoded SerDes stream.
//
// Sits between a CODEC and its SerDes (one instance per direction) and XORs a
// programmable 40-bit mask onto chosen words, so that exactly the wanted symbols are
// damaged: one word (mode ONE_SHOT, armed by arm), or one word every period words
// (PERIODIC), up to count words in all (count = 0: no limit). The mask, period and
// count are inputs, meant to be driven from registers. The modes and their parameters
// are this design's own; the document gives only the role of the block.
// Timing: combinational path from din to dout; injected pulses for each damaged word.
//
// Lint note: M_OFF names mode 0 (no injection) for readers; the case falls to it by
// default, so the constant itself is not referenced.
module spfi_error_inject (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  mode,      // 0 off, 1 one-shot, 2 periodic
  input  logic        arm,       // one-shot: damage the next word
  input  logic [39:0] mask,
  input  logic [15:0] period,
  input  logic [15:0] count,
  input  logic [39:0] din,
  output logic [39:0] dout,
  output logic        injected,
  output logic [15:0] n_injected
);
  localparam logic [1:0] M_OFF = 2'd0, M_ONE = 2'd1, M_PER = 2'd2;
  logic        armed;
  logic [15:0] pcnt;
  logic        hit, limit;

  assign limit = (count != 16'd0) && (n_injected >= count);
  always_comb begin
    unique case (mode)
      M_ONE:   hit = armed;
      M_PER:   hit = (period != 16'd0) && (pcnt == period - 16'd1) && !limit;
      default: hit = 1'b0;
    endcase
  end
  assign dout     = hit ? (din ^ mask) : din;
  assign injected = hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0; pcnt <= '0; n_injected <= '0;
    end else begin
      if (arm) armed <= 1'b1;
      else if (hit && mode == M_ONE) armed <= 1'b0;
      if (mode != M_PER || period == 16'd0 || pcnt == period - 16'd1) pcnt <= '0;
      else pcnt <= pcnt + 16'd1;
      if (hit && n_injected != 16'hFFFF) n_injected <= n_injected + 16'd1;
    end
  end
endmodule
