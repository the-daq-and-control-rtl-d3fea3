// tbm_core: one token-bit manager core.
//
// Keeps pending triggers in a 32-deep L1A stack (tbm_l1a_stack). When a
// trigger is pending and no readout is running, the core
//   1. sends the TBM header: marker 0x7FC, the 8-bit event number and an
//      8-bit field holding the stack count,
//   2. passes the token to its ROC group (token_out pulse) and forwards the
//      ROC serial data (ROC headers and hits) while roc_valid is high,
//   3. on the returned token (token_in) sends the TBM trailer: marker 0x7FE
//      followed by 16 status bits {stack overflow, token timeout, 8'b0,
//      stack count[5:0]} (count of triggers still waiting at that time).
// Output is one 4-bit nibble per bunch crossing (160 Mb/s) with out_valid;
// gaps (out_valid low) become idle symbols in the DataKeeper. A token that
// does not come back within TOKEN_TO BX ends the packet with the timeout flag.
// The readout sequence follows the TBM description; marker values, the
// status layout and the timeout are this design's choices.
module tbm_core
  import pix_pkg::*;
#(
  parameter int STACK_DEPTH = 32,
  parameter int TOKEN_TO    = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       l1a,
  input  logic       tbm_reset,
  output logic       token_out,
  input  logic       token_in,
  input  logic       roc_valid,
  input  logic [3:0] roc_nib,
  output logic       out_valid,
  output logic [3:0] out_nib,
  output logic       readout_busy
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_ROC, S_TRL} state_t;
  state_t st;
  logic [2:0]  idx;
  logic [27:0] hdr_sr;   // 7 nibbles
  logic [27:0] trl_sr;   // 7 nibbles
  logic [$clog2(STACK_DEPTH):0] cnt;
  logic [7:0]  head;
  logic        ovf, pop;
  logic [$clog2(TOKEN_TO):0] tmo;
  logic [5:0]  cnt6;

  assign pop  = (st == S_IDLE) && (cnt != 0);
  assign cnt6 = 6'(cnt);
  assign readout_busy = (st != S_IDLE);

  tbm_l1a_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n, .ce40, .clr(tbm_reset), .push(l1a), .pop,
    .head, .count(cnt), .overflow(ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || (ce40 && tbm_reset)) begin
      st <= S_IDLE; idx <= '0; hdr_sr <= '0; trl_sr <= '0; tmo <= '0; 
      token_out <= 1'b0; out_valid <= 1'b0; out_nib <= '0;
    end else if (ce40) begin
      token_out <= 1'b0;
      out_valid <= 1'b0;
      case (st)
        S_IDLE: if (pop) begin
          hdr_sr <= {MARK_PREFIX, MARK_TBM_HDR, head, 2'b00, cnt6};
          st     <= S_HDR;
          idx    <= '0;
        end
        S_HDR: begin
          out_valid <= 1'b1;
          out_nib   <= hdr_sr[27:24];
          hdr_sr    <= {hdr_sr[23:0], 4'h0};
          idx       <= idx + 3'd1;
          if (idx == 3'd6) begin
            st        <= S_ROC;
            token_out <= 1'b1;
            tmo       <= '0;
          end
        end
        S_ROC: begin
          out_valid <= roc_valid;
          out_nib   <= roc_nib;
          tmo       <= tmo + 1'b1;
          if (token_in || tmo == TOKEN_TO[$clog2(TOKEN_TO):0]) begin
            trl_sr <= {MARK_PREFIX, MARK_TBM_TRL, ovf, !token_in, 8'h00, cnt6};
            st     <= S_TRL;
            idx    <= '0;
          end
        end
        S_TRL: begin
          out_valid <= 1'b1;
          out_nib   <= trl_sr[27:24];
          trl_sr    <= {trl_sr[23:0], 4'h0};
          idx       <= idx + 3'd1;
          if (idx == 3'd6) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
