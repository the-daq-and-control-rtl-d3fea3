// pix_pkg: types, constants and coding functions shared by the pixel
// DAQ and control blocks.
//
// Contents:
//  * 4b/5b code (standard FDDI table) and the two idle symbols the TBM
//    DataKeeper uses to mark core A and core B when a core has nothing to send.
//  * 12-bit stream markers of a TBM core data stream. All markers start with
//    the byte 0x7F; a hit never does because its double-column number (< 26)
//    occupies the top six bits.
//  * Qualifiers attached to each word written into a FED TBM FIFO.
//  * Module-clock command codes shared by the Pixel FEC trigger FSM and the
//    TBM command decoder, and TTC fast-command codes.
//  * FED error codes (carried in the ROC field of a FED error word) and TTS
//    state codes.
// The bit patterns are this design's own choices where the architecture only
// names the fields (marker patterns, command codes); the 4b/5b and 8b/10b
// tables and TTS codes follow the usual public conventions.
package pix_pkg;

  // ---------------- 4b/5b ----------------
  localparam logic [4:0] IDLE_A = 5'b11111;  // idle symbol of core A
  localparam logic [4:0] IDLE_B = 5'b11000;  // idle symbol of core B

  function automatic logic [4:0] enc4b5b(input logic [3:0] n);
    case (n)
      4'h0: return 5'b11110; 4'h1: return 5'b01001;
      4'h2: return 5'b10100; 4'h3: return 5'b10101;
      4'h4: return 5'b01010; 4'h5: return 5'b01011;
      4'h6: return 5'b01110; 4'h7: return 5'b01111;
      4'h8: return 5'b10010; 4'h9: return 5'b10011;
      4'hA: return 5'b10110; 4'hB: return 5'b10111;
      4'hC: return 5'b11010; 4'hD: return 5'b11011;
      4'hE: return 5'b11100; default: return 5'b11101;
    endcase
  endfunction

  // Decoded symbol: valid data nibble, idle, or invalid.
  typedef struct packed {
    logic       data;   // symbol is a data nibble
    logic       idle;   // symbol is IDLE_A or IDLE_B
    logic [3:0] nib;
  } sym_t;

  function automatic sym_t dec4b5b(input logic [4:0] s);
    sym_t r;
    r = '0;
    for (int i = 0; i < 16; i++)
      if (enc4b5b(4'(i)) == s) begin
        r.data = 1'b1;
        r.nib  = 4'(i);
      end
    if (s == IDLE_A || s == IDLE_B) r.idle = 1'b1;
    return r;
  endfunction

  // ---------------- TBM core data stream ----------------
  localparam logic [7:0] MARK_PREFIX  = 8'h7F;
  localparam logic [3:0] MARK_TBM_HDR = 4'hC;   // 0x7FC
  localparam logic [3:0] MARK_TBM_TRL = 4'hE;   // 0x7FE
  // ROC header: 0x7F, then 2'b10 and two status bits (0x8..0xB)

  // 24-bit hit: {dcol[5:0], pxl[8:0], adc[7:4], 1'b0, adc[3:0]}
  function automatic logic [23:0] pack_hit(input logic [5:0] dcol, input logic [8:0] pxl,
                                           input logic [7:0] adc);
    return {dcol, pxl, adc[7:4], 1'b0, adc[3:0]};
  endfunction

  // ---------------- FED TBM FIFO words ----------------
  typedef enum logic [3:0] {
    Q_TBM_HDR = 4'h1,
    Q_ROC_HDR = 4'h2,
    Q_HIT     = 4'h3,
    Q_TBM_TRL = 4'h4
  } qual_t;

  // error flags placed in bits [31:24] of a Q_TBM_TRL word
  typedef struct packed {
    logic overflow;    // payload truncated (FIFO level or too many hits)
    logic roc_count;   // ROC count differs from expected
    logic seq_err;     // marker sequence / timing violation
    logic no_trailer;  // packet closed without a TBM trailer
    logic [3:0] rsvd;
  } dec_err_t;

  // ---------------- module clock commands ----------------
  // After a start slot, three BX carry the code; a '1' suppresses the
  // clock high phase of that BX.
  localparam logic [2:0] MCMD_L1A     = 3'b100;
  localparam logic [2:0] MCMD_ROC_RST = 3'b110;
  localparam logic [2:0] MCMD_TBM_RST = 3'b101;

  // ---------------- TTC fast commands (8-bit bus) ----------------
  localparam logic [7:0] TTC_BC0        = 8'h01;
  localparam logic [7:0] TTC_EC0        = 8'h02;
  localparam logic [7:0] TTC_RESYNC     = 8'h04;  // global resync (with EC0)
  localparam logic [7:0] TTC_RESYNC_PRV = 8'h05;  // private resync, back end only
  localparam logic [7:0] TTC_ROC_RST    = 8'h1C;
  localparam logic [7:0] TTC_TBM_RST    = 8'h14;
  localparam logic [7:0] TTC_SEND_DATA  = 8'h24;

  // TTC short broadcast Hamming (13,8) check bits
  function automatic logic [4:0] ttc_ham(input logic [7:0] d);
    logic [4:0] h;
    h[0] = d[0] ^ d[1] ^ d[2] ^ d[3];
    h[1] = d[0] ^ d[4] ^ d[5] ^ d[6];
    h[2] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    h[3] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    h[4] = ^{d, h[3:0]};
    return h;
  endfunction

  // ---------------- FED output ----------------
  localparam logic [4:0] ERR_TIMEOUT  = 5'd29;
  localparam logic [4:0] ERR_TRAILER  = 5'd30;
  localparam logic [4:0] ERR_EVNUM    = 5'd31;

  typedef enum logic [3:0] {
    TTS_RDY = 4'b1000,
    TTS_BSY = 4'b0100,
    TTS_OOS = 4'b0010
  } tts_t;

endpackage
