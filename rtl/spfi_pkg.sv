// spfi_pkg - types, control-word codes and CRC/scrambler functions shared by the
// SpaceFibre CODEC.
//
// A SpaceFibre word is four symbols, each an 8-bit value plus a K (control) flag:
// 36 bits in all, the width the CODEC's buffers and analysers store. Symbol 0 sits in
// d[7:0]/k[0] and is the first one on the line.
//
// Lane-layer control words start with the comma K28.5 and data-link control words
// with K28.3, as in the SpaceFibre standard; the type codes in symbol 1 and the
// layout of symbols 2 and 3 are this design's own. CRC-16 (x^16+x^12+x^5+1, init
// 0xFFFF) protects frames and CRC-8 (x^8+x^2+x+1) protects ACK/NACK/FCT words; the
// scrambler is an additive x^16+x^5+x^4+x^3+1 generator. These choices are this
// design's own: the protocol details are left to the standard.
package spfi_pkg;

  typedef struct packed {
    logic [3:0]  k;
    logic [31:0] d;
  } word_t;

  localparam logic [7:0] K28_5 = 8'hBC;   // comma, starts lane control words
  localparam logic [7:0] K28_3 = 8'h7C;   // starts data-link control words

  // lane control word types (symbol 1)
  typedef enum logic [7:0] {
    LW_INIT1   = 8'h01,
    LW_INIT2   = 8'h02,
    LW_INIT3   = 8'h03,
    LW_STANDBY = 8'h04,
    LW_SKIP    = 8'h05,
    LW_IDLE    = 8'h06
  } lane_word_e;

  // data-link control word types (symbol 1)
  typedef enum logic [7:0] {
    DW_SDF     = 8'h10,   // start of data frame: sym2 = VC, sym3 = sequence number
    DW_EDF     = 8'h11,   // end of data frame, packet continues: sym3:sym2 = CRC-16
    DW_EDF_EOP = 8'h12,   // end of data frame, last word ends the packet
    DW_SBF     = 8'h13,   // start of BC frame: sym2 = BC channel, sym3 = sequence
    DW_EBF     = 8'h14,   // end of BC frame: sym3:sym2 = CRC-16
    DW_ACK     = 8'h20,   // sym2 = sequence number, sym3 = CRC-8
    DW_NACK    = 8'h21,   // sym2 = first sequence number to resend, sym3 = CRC-8
    DW_FCT     = 8'h22    // sym2 = {VC[4:0], credit count[2:0]}, sym3 = CRC-8
  } dl_word_e;

  localparam int MAX_VC = 32;

  function automatic word_t lane_word(lane_word_e t);
    word_t w;
    w.k = 4'b0001;
    w.d = {8'(t), ~8'(t), 8'(t), K28_5};
    return w;
  endfunction

  function automatic logic is_lane_word(word_t w, lane_word_e t);
    return w == lane_word(t);
  endfunction

  function automatic logic is_dl_ctrl(word_t w);
    return w.k == 4'b0001 && w.d[7:0] == K28_3;
  endfunction

  function automatic logic [7:0] crc8_update(logic [7:0] crc, logic [7:0] b);
    logic [7:0] c;
    c = crc ^ b;
    for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  // CRC-8 of symbols 1 and 2 of an ACK/NACK/FCT word
  function automatic logic [7:0] ctrl_crc(logic [7:0] s1, logic [7:0] s2);
    return crc8_update(crc8_update(8'h00, s1), s2);
  endfunction

  function automatic word_t dl_ctrl_word(dl_word_e t, logic [7:0] arg);
    word_t w;
    w.k = 4'b0001;
    w.d = {ctrl_crc(8'(t), arg), arg, 8'(t), K28_3};
    return w;
  endfunction

  function automatic logic [15:0] crc16_byte(logic [15:0] crc, logic [7:0] b);
    logic [15:0] c;
    c = crc ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction

  // CRC-16 over the bytes of d from byte 'first' up to byte 3, byte 0 = d[7:0]
  function automatic logic [15:0] crc16_word(logic [15:0] crc, logic [31:0] d, int unsigned first);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 4; i++)
      if (i >= int'(first)) c = crc16_byte(c, d[8*i +: 8]);
    return c;
  endfunction

  localparam logic [15:0] CRC16_INIT = 16'hFFFF;
  localparam logic [15:0] SCR_SEED   = 16'hFFFF;

  // advance the scrambler by 32 bits; returns {next state, 32-bit mask}
  function automatic logic [47:0] scr_step(logic [15:0] s);
    logic [15:0] st;
    logic [31:0] m;
    st = s;
    for (int i = 0; i < 32; i++) begin
      m[i] = st[15];
      st   = {st[14:0], st[15] ^ st[4] ^ st[3] ^ st[2]};
    end
    return {st, m};
  endfunction

  // ---------------- 8B/10B (IEEE 802.3 clause 36 / Widmer-Franaszek code) ---------
  // Codes are written abcdei_fghj with 'a' in bit 9; rd = 0 is negative running
  // disparity. Returns {running disparity after the symbol, 10-bit code}.
  function automatic logic [5:0] code6_neg(logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;  5'd2:  return 6'b101101;
      5'd3:  return 6'b110001;  5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;  5'd8:  return 6'b111001;
      5'd9:  return 6'b100101;  5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;  5'd14: return 6'b011100;
      5'd15: return 6'b010111;  5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;  5'd20: return 6'b001011;
      5'd21: return 6'b101010;  5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;  5'd26: return 6'b010110;
      5'd27: return 6'b110110;  5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  function automatic logic [3:0] code4_neg(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;  3'd2: return 4'b0101;
      3'd3: return 4'b1100;  3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // running disparity after a sub-block, given the disparity before it
  function automatic logic rd_after(logic rd, logic [5:0] blk, int unsigned n);
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < 6; i++) if (i < int'(n)) ones += 32'(blk[i]);
    if (2 * ones > n) return 1'b1;
    if (2 * ones < n) return 1'b0;
    if (n == 6 && blk == 6'b000111) return 1'b1;
    if (n == 6 && blk == 6'b111000) return 1'b0;
    if (n == 4 && blk[3:0] == 4'b0011) return 1'b1;
    if (n == 4 && blk[3:0] == 4'b1100) return 1'b0;
    return rd;
  endfunction

  function automatic logic [10:0] enc8b10b(logic [7:0] b, logic k, logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd1;
    logic       flip6;
    x = b[4:0];
    y = b[7:5];
    c6 = (k && x == 5'd28) ? 6'b001111 : code6_neg(x);
    flip6 = ($countones(c6) != 3) || (c6 == 6'b111000);
    if (rd && flip6) c6 = ~c6;
    rd1 = rd_after(rd, c6, 6);
    if (y == 3'd7 && (k || (!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                          ( rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
      c4 = 4'b0111;
    else if (k && (y == 3'd1 || y == 3'd2 || y == 3'd5 || y == 3'd6))
      c4 = ~code4_neg(y);
    else
      c4 = code4_neg(y);
    if (rd1 && (k || $countones(c4) != 2 || c4 == 4'b1100)) c4 = ~c4;
    return {rd_after(rd1, {2'b00, c4}, 4), c6, c4};
  endfunction

  // per-VC quality-of-service settings
  typedef struct packed {
    logic [3:0]        prio;        // 1 = highest .. 15 = lowest
    logic [6:0]        bandwidth;   // expected bandwidth, percent 0..100
    logic [MAX_VC-1:0] slots;       // timeslots in which the VC may send
  } vc_cfg_t;

  // CODEC configuration (management interface)
  typedef struct packed {
    logic        lane_start;     // start lane initialisation
    logic        auto_start;     // start when the far end is seen
    logic        lane_standby;   // request standby
    logic        scramble_en;    // scramble data frames (both ends must agree)
    logic [6:0]  bc_bandwidth;   // expected BC bandwidth, percent 1..100
    logic [15:0] slot_cycles;    // length of one timeslot in clock cycles
  } codec_cfg_t;

  typedef enum logic [2:0] {
    LS_DISABLED, LS_WAIT, LS_STARTED, LS_CONNECTING, LS_CONNECTED, LS_ACTIVE, LS_PREP_STANDBY
  } lane_state_e;

  typedef enum logic [2:0] {
    RX_NO_TRAFFIC, RX_IDLE, RX_DATA, RX_BC, RX_MIXED
  } rx_state_e;

  // CODEC status (management interface)
  typedef struct packed {
    lane_state_e lane_state;
    rx_state_e   rx_state;
    logic        rx_synced;
    logic [15:0] code_errors;     // 8B10B code/disparity errors seen
    logic [15:0] crc_errors;      // frames dropped for CRC or sequence errors
    logic [15:0] retries;         // replays started by the error recovery buffer
    logic [15:0] reinits;         // lane re-initialisations from ACTIVE
  } codec_status_t;

  // ---------------- validation system controls ----------------
  typedef struct packed {
    logic        start;
    logic        stop;
    logic [4:0]  vc;
    logic [31:0] seed;
    logic [31:0] step;
    logic [15:0] pkt_len;
    logic [15:0] gap;
    logic [31:0] num_pkts;
  } gen_ctrl_t;

  typedef struct packed {
    logic        busy;
    logic [31:0] pkts_sent;
  } gen_stat_t;

  typedef struct packed {
    logic        start;
    logic        enable;
    logic [4:0]  vc;
    logic [31:0] seed;
    logic [31:0] step;
    logic [15:0] pkt_len;
  } chk_ctrl_t;

  typedef struct packed {
    logic [31:0] words;
    logic [31:0] pkts;
    logic [15:0] data_errors;
    logic [15:0] frame_errors;
  } chk_stat_t;

  typedef struct packed {
    logic [1:0]  mode;     // 0 off, 1 one-shot, 2 periodic
    logic        arm;
    logic [39:0] mask;
    logic [15:0] period;
    logic [15:0] count;
  } inj_ctrl_t;

  typedef struct packed {
    logic        arm;
    logic        trig_rx;
    word_t       trig_word;
    logic        rd_sel_rx;
    logic [12:0] rd_addr;
  } rm_ctrl_t;

endpackage
