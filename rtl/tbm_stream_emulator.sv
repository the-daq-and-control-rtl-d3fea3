// tbm_stream_emulator: TBM core data-stream generator.
//
// Produces, for every trigger, the stream a TBM core would send: TBM header
// (0x7FC, 8-bit event number, header field = pending-trigger count), then for
// each of N_ROCS ROCs a ROC header (0x7F8) followed by hits_per_roc 24-bit
// hits, then the TBM trailer (0x7FE and 16 status bits = 0). Output is one
// nibble per BX (160 Mb/s) with out_valid. Triggers arriving during a packet
// are counted (up to 255) and served in turn. The hit contents are derived
// from the event, ROC and hit counters so a checker can predict them:
//   dcol = (roc + hit) mod 26, pixel = (event + 3*hit) mod 160,
//   adc  = event XOR {roc[3:0], hit[3:0]}.
// This is the fixed-size mode of the FED data emulation and of the FED
// tester; the table-driven (SRAM) mode is not built. The packet length is
// 7 + N_ROCS*(3 + 6*hits_per_roc) + 7 nibbles. ec0 (with ce40) restarts
// the event numbers so that the emulated data follow an EC0 or resync.
module tbm_stream_emulator
  import pix_pkg::*;
#(
  parameter int N_ROCS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       trig,
  input  logic       ec0,          // event counter reset: next event is 1
  input  logic [3:0] hits_per_roc,
  output logic       out_valid,
  output logic [3:0] out_nib,
  output logic       busy
);
  typedef enum logic [2:0] {E_IDLE, E_HDR, E_ROC, E_HIT, E_TRL} state_t;
  state_t st;
  logic [7:0]  pend, evn;
  logic [27:0] sr;
  logic [2:0]  idx;
  logic [4:0]  roc;
  logic [3:0]  hit;
  logic [23:0] hw;
  logic [5:0]  dcol;
  logic [8:0]  pxl;
  logic [7:0]  adc;
  logic [9:0]  pxl_sum;

  assign busy = (st != E_IDLE);
  always_comb begin
    dcol    = (6'(roc) + 6'(hit)) % 6'd26;
    pxl_sum = 10'(evn) + 10'(hit) * 10'd3;
    pxl     = 9'(pxl_sum % 10'd160);
    adc     = evn ^ {roc[3:0], hit};
    hw      = pack_hit(dcol, pxl, adc);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= E_IDLE; pend <= '0; evn <= '0; sr <= '0; idx <= '0; roc <= '0; hit <= '0;
      out_valid <= 1'b0; out_nib <= '0;
    end else if (ce40) begin
      out_valid <= 1'b0;
      pend <= pend + ((trig && pend != 8'hFF) ? 8'd1 : 8'd0)
                   - ((st == E_IDLE && pend != 0) ? 8'd1 : 8'd0);
      case (st)
        E_IDLE: if (pend != 0) begin
          st  <= E_HDR;
          idx <= '0;
          sr  <= {MARK_PREFIX, MARK_TBM_HDR, evn + 8'd1, pend - 8'd1};
          evn <= evn + 8'd1;
        end
        E_HDR: begin
          out_valid <= 1'b1; out_nib <= sr[27:24]; sr <= {sr[23:0], 4'h0};
          idx <= idx + 3'd1;
          if (idx == 3'd6) begin
            st <= E_ROC; idx <= '0; roc <= 5'd1;
            sr <= {12'h7F8, 16'h0};
          end
        end
        E_ROC: begin
          out_valid <= 1'b1; out_nib <= sr[27:24]; sr <= {sr[23:0], 4'h0};
          idx <= idx + 3'd1;
          if (idx == 3'd2) begin
            idx <= '0; hit <= '0;
            if (hits_per_roc != 0) st <= E_HIT;
            else if (roc == 5'(N_ROCS)) begin st <= E_TRL; sr <= {12'h7FE, 16'h0}; end
            else begin roc <= roc + 5'd1; sr <= {12'h7F8, 16'h0}; end
          end
        end
        E_HIT: begin
          out_valid <= 1'b1;
          out_nib   <= hw[23 - 4*idx -: 4];
          idx <= idx + 3'd1;
          if (idx == 3'd5) begin
            idx <= '0;
            hit <= hit + 4'd1;
            if (hit + 4'd1 == hits_per_roc) begin
              if (roc == 5'(N_ROCS)) begin st <= E_TRL; sr <= {12'h7FE, 16'h0}; end
              else begin st <= E_ROC; roc <= roc + 5'd1; sr <= {12'h7F8, 16'h0}; end
            end
          end
        end
        E_TRL: begin
          out_valid <= 1'b1; out_nib <= sr[27:24]; sr <= {sr[23:0], 4'h0};
          idx <= idx + 3'd1;
          if (idx == 3'd6) st <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
      if (ec0) evn <= '0;
    end
  end
endmodule
