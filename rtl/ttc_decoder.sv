// ttc_decoder: TTC receiver with Hamming decoding.
//
// Input ttc_ab holds, per BX, the two bits delivered by the input DDR
// register: ttc_ab[1] = A channel (L1A), ttc_ab[0] = B channel (serial
// broadcast commands). A '1' on the A channel gives an l1a pulse in the same
// BX (registered, one BX latency). The B channel idles at '1'. A short
// broadcast frame is 16 bits: start '0', format '0', 8 command bits (MSB
// first), 5 Hamming check bits (pix_pkg::ttc_ham), stop '1'. The decoder
// corrects any single-bit error in the 13 protected bits (corrected pulse),
// drops frames with a double error (ham_err pulse) and presents good
// commands on the 8-bit bus cmd with a one-BX cmd_valid pulse. Long-format
// frames (format '1', 42 bits) are skipped.
// The L1A + 8-bit fast command outputs and the Hamming decoder follow the
// Pixel FEC description; the frame layout and check equations are the TTC
// system's short broadcast format as this design assumes it.
module ttc_decoder
  import pix_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic [1:0] ttc_ab,
  output logic       l1a,
  output logic       cmd_valid,
  output logic [7:0] cmd,
  output logic       ham_err,
  output logic       corrected
);
  typedef enum logic [1:0] {T_IDLE, T_FMT, T_SHORT, T_LONG} state_t;
  state_t st;
  logic [11:0] sr;     // received bits of the frame so far
  logic [5:0]  n;
  logic [12:0] fr;
  logic [7:0]  d, dc;
  logic [4:0]  h;
  logic [3:0]  syn;
  logic        par;

  // decode of a complete 13-bit frame held in fr
  always_comb begin
    fr  = {sr[11:0], ttc_ab[0]};
    d   = fr[12:5];
    h   = fr[4:0];
    syn = ttc_ham(d)[3:0] ^ h[3:0];
    par = ^fr;
    dc  = d;
    case (syn)
      4'b0011: dc[0] = ~d[0];
      4'b1101: dc[1] = ~d[1];
      4'b0101: dc[2] = ~d[2];
      4'b1001: dc[3] = ~d[3];
      4'b1110: dc[4] = ~d[4];
      4'b0110: dc[5] = ~d[5];
      4'b1010: dc[6] = ~d[6];
      4'b1100: dc[7] = ~d[7];
      default: ;  // error in a check bit: data are good
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= T_IDLE; sr <= '0; n <= '0;
      l1a <= 1'b0; cmd_valid <= 1'b0; cmd <= '0; ham_err <= 1'b0; corrected <= 1'b0;
    end else if (ce40) begin
      l1a <= ttc_ab[1];
      cmd_valid <= 1'b0; ham_err <= 1'b0; corrected <= 1'b0;
      case (st)
        T_IDLE:  if (!ttc_ab[0]) st <= T_FMT;
        T_FMT: begin
          n  <= '0;
          st <= ttc_ab[0] ? T_LONG : T_SHORT;
        end
        T_SHORT: begin
          sr <= fr[11:0];
          n  <= n + 6'd1;
          if (n == 6'd12) begin
            st <= T_IDLE;     // the stop bit is idle level
            if (!par && syn != 4'b0) begin
              ham_err <= 1'b1;                      // double error
            end else begin
              cmd_valid <= 1'b1;
              cmd       <= par ? dc : d;
              corrected <= par;
            end
          end
        end
        T_LONG: begin
          n <= n + 6'd1;
          if (n == 6'd39) st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
