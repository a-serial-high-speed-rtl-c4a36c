// spfi_scrambler - additive scrambler / de-scrambler for data-frame data words.
//
// Scrambling is optional in the CODEC and serves to spread the spectrum of the line
// signal. A 16-bit generator (x^16+x^5+x^4+x^3+1) is reloaded with 0xFFFF at the start
// of every data frame (seed) and advanced by 32 bits for every data word (en); dout is
// din XOR the next 32 generator bits. Since the operation is an XOR with a sequence that
// depends only on the position in the frame, the same block de-scrambles. The
// generator and its restart rule are this design's own choices. dout is
// combinational from din and the generator state.
module spfi_scrambler
  import spfi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed,
  input  logic        en,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [15:0] state;
  logic [47:0] step;

  assign step = scr_step(state);
  assign dout = din ^ step[31:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    state <= SCR_SEED;
    else if (seed) state <= SCR_SEED;
    else if (en)   state <= step[47:32];
endmodule
