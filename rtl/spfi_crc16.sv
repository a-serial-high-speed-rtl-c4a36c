// spfi_crc16 - CRC-16 accumulator for data and broadcast frames.
//
// The CODEC appends a CRC to every data frame and BC frame. This block keeps the
// running CRC-16 (polynomial x^16+x^12+x^5+1, initial value 0xFFFF, bytes taken from
// d[7:0] upwards; the polynomial and byte order are this design's own choice). start
// begins a new CRC from the bytes first..3 of the word (the start-of-frame word's
// header bytes); en adds bytes first..3 of the word to the running CRC. crc_next shows
// the value including the present input, so the end-of-frame word can carry it in the
// same cycle; crc is the registered value.
module spfi_crc16
  import spfi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        en,
  input  logic [31:0] data,
  input  logic [1:0]  first,
  output logic [15:0] crc,
  output logic [15:0] crc_next
);
  always_comb begin
    crc_next = crc;
    if (start)   crc_next = crc16_word(CRC16_INIT, data, 32'(first));
    else if (en) crc_next = crc16_word(crc, data, 32'(first));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) crc <= CRC16_INIT;
    else        crc <= crc_next;
endmodule
