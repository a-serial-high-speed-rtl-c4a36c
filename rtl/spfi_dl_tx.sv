// spfi_dl_tx - transmit path of the data link layer after the MAC.
//
// Takes the MAC's framed words and does what the CODEC's scrambler, CRC demux, CRC
// block and Tx data mux do: data words of data frames are scrambled when enabled
// (generator restarted at each SDF), the CRC-16 is accumulated over the header bytes of
// SDF/SBF (symbols 1..3), every data word as sent, and the type byte of EDF/EBF, and
// the result is written into symbols 2-3 of EDF/EBF. Control words requested by the
// receive side (NACK first, then ACK, then FCT) are slipped in between any two words,
// also inside a frame, and carry a CRC-8 of their symbols 1-2.
//
// Timing: one output register (out_valid/out_word, taken when out_ready); a word from
// the MAC or a control word is loaded whenever that register is empty or being taken.
// *_done pulses in the cycle a control word is loaded.
//
// Lint note: the CRC instance's crc_next output is left open; only the registered
// CRC is used.
module spfi_dl_tx
  import spfi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scramble_en,
  // from the MAC
  input  logic       in_valid,
  input  word_t      in_word,
  output logic       in_ready,
  // control word requests
  input  logic       nack_req,
  input  logic [7:0] nack_seq,
  output logic       nack_done,
  input  logic       ack_req,
  input  logic [7:0] ack_seq,
  output logic       ack_done,
  input  logic       fct_req,
  input  logic [7:0] fct_arg,
  output logic       fct_done,
  // to the lane layer
  output logic       out_valid,
  output word_t      out_word,
  input  logic       out_ready
);
  logic load, ctrl;
  logic in_data;
  logic [7:0] typ;
  logic is_sdf, is_sbf, is_end, is_dw;
  logic [31:0] scr_out;
  logic [15:0] crc;
  word_t next_word;

  assign load = !out_valid || out_ready;
  assign ctrl = nack_req || ack_req || fct_req;
  assign in_ready  = load && !ctrl;
  assign nack_done = load && nack_req;
  assign ack_done  = load && !nack_req && ack_req;
  assign fct_done  = load && !nack_req && !ack_req && fct_req;

  assign typ    = in_word.d[15:8];
  assign is_sdf = is_dl_ctrl(in_word) && (typ == 8'(DW_SDF));
  assign is_sbf = is_dl_ctrl(in_word) && (typ == 8'(DW_SBF));
  assign is_end = is_dl_ctrl(in_word) &&
                  (typ == 8'(DW_EDF) || typ == 8'(DW_EDF_EOP) || typ == 8'(DW_EBF));
  assign is_dw  = (in_word.k == 4'b0000);

  logic take;
  assign take = in_valid && in_ready;

  spfi_scrambler u_scr (
    .clk, .rst_n, .seed(take && is_sdf), .en(take && is_dw && in_data),
    .din(in_word.d), .dout(scr_out)
  );

  logic [31:0] sent_d;
  assign sent_d = (is_dw && in_data && scramble_en) ? scr_out : in_word.d;

  spfi_crc16 u_crc (
    .clk, .rst_n, .start(take && (is_sdf || is_sbf)), .en(take && is_dw),
    .data(sent_d), .first(is_sdf || is_sbf ? 2'd1 : 2'd0),
    .crc, .crc_next()
  );

  // EDF/EBF carry the CRC including their own type byte
  logic [15:0] crc_end;
  assign crc_end = crc16_byte(crc, typ);

  always_comb begin
    if (nack_req)     next_word = dl_ctrl_word(DW_NACK, nack_seq);
    else if (ack_req) next_word = dl_ctrl_word(DW_ACK, ack_seq);
    else if (fct_req) next_word = dl_ctrl_word(DW_FCT, fct_arg);
    else if (is_end)  next_word = '{k: in_word.k, d: {crc_end, in_word.d[15:0]}};
    else              next_word = '{k: in_word.k, d: sent_d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
      in_data   <= 1'b0;
    end else begin
      if (load) begin
        out_valid <= ctrl || in_valid;
        out_word  <= next_word;
      end
      if (take && is_sdf) in_data <= 1'b1;
      else if (take && is_end) in_data <= 1'b0;
    end
  end
endmodule
