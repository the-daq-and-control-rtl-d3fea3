// tbm_cmd_decoder: TBM command recovery from the module clock.
//
// The sensor module receives a clock in which the Pixel FEC encodes its
// commands (see pfec_trigger_fsm): a suppressed clock high phase while idle
// marks a start, and the next three BX carry a 3-bit code, '1' meaning a
// suppressed high phase. This block samples the clock pattern once per BX
// (ce40) and emits a one-BX pulse on l1a, roc_reset or tbm_reset one BX after
// the last code bit. Unknown codes are dropped and counted in bad_cmd.
// The encoding is this design's choice; the TBM's role of distributing
// clock, L1A and fast commands follows the architecture.
module tbm_cmd_decoder
  import pix_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic [1:0] mclk_pat,
  output logic       l1a,
  output logic       roc_reset,
  output logic       tbm_reset,
  output logic       bad_cmd
);
  logic [1:0] nbits;
  logic [2:0] sr;
  logic       active;
  logic       bit_now;

  assign bit_now = (mclk_pat[1] == 1'b0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nbits <= '0; sr <= '0; active <= 1'b0;
      l1a <= 1'b0; roc_reset <= 1'b0; tbm_reset <= 1'b0; bad_cmd <= 1'b0;
    end else if (ce40) begin
      l1a <= 1'b0; roc_reset <= 1'b0; tbm_reset <= 1'b0; bad_cmd <= 1'b0;
      if (!active) begin
        if (bit_now) begin
          active <= 1'b1;
          nbits  <= '0;
        end
      end else begin
        sr    <= {sr[1:0], bit_now};
        nbits <= nbits + 2'd1;
        if (nbits == 2'd2) begin
          active <= 1'b0;
          case ({sr[1:0], bit_now})
            MCMD_L1A:     l1a       <= 1'b1;
            MCMD_ROC_RST: roc_reset <= 1'b1;
            MCMD_TBM_RST: tbm_reset <= 1'b1;
            default:      bad_cmd   <= 1'b1;
          endcase
        end
      end
    end
  end
endmodule
