// roc_group_model: behavioural model of a daisy-chained group of ROCs as
// seen by a TBM core (not synthesizable logic of the real chip, whose
// pixel array, ADC and buffers are analog/mixed-signal). When the token
// arrives, each of the N_ROCS ROCs in turn sends its ROC header (0x7F8)
// and its hits for the event, one nibble per BX, and the last ROC returns
// the token. Hits follow the reference pattern of tb_ref_pkg for event ev;
// the number of hits per ROC is the hits input. gap_every > 0 inserts an
// idle BX after every gap_every nibbles. hold_token keeps the token (to
// provoke the TBM token timeout).
module roc_group_model #(
  parameter int N_ROCS = 8
) (
  input  logic       clk,
  input  logic       ce40,
  input  logic       token_in,
  input  int         hits,
  input  int         gap_every,
  input  logic       hold_token,
  output logic       token_out,
  output logic       valid,
  output logic [3:0] nib
);
  import tb_ref_pkg::*;
  nib_q_t q;
  int ev = 0;
  int n = 0;
  logic active = 0;
  initial begin token_out = 0; valid = 0; nib = 0; end
  always @(posedge clk) if (ce40) begin
    token_out <= 1'b0;
    valid <= 1'b0;
    if (token_in) begin
      ev++;
      q.delete();
      for (int r = 1; r <= N_ROCS; r++) begin
        push12(q, 12'h7F8);
        for (int k = 0; k < hits; k++)
          push_hit(q, ref_hit((r + k) % 26, (ev + 3 * k) % 160, (ev & 255) ^ (((r & 15) << 4) | (k & 15))));
      end
      active <= 1'b1;
      n = 0;
    end else if (active) begin
      if (q.size() != 0) begin
        n++;
        if (gap_every > 0 && n % (gap_every + 1) == 0) begin
          valid <= 1'b0;
        end else begin
          valid <= 1'b1;
          nib <= q.pop_front();
        end
      end else begin
        active <= 1'b0;
        if (!hold_token) token_out <= 1'b1;
      end
    end
  end
endmodule
