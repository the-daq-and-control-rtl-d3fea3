// pfec_trigger_fsm: Pixel FEC trigger state machine.
//
// Encodes L1A, ROC reset and TBM reset into the module clock that the Pixel
// FEC sends to the sensor modules. The clock is represented by two samples
// per bunch crossing (BX) in mclk_pat: {high phase, low phase}; a running
// clock is 2'b10. A command takes four BX: a start BX whose high phase is
// suppressed, then three BX carrying the command code (pix_pkg MCMD_*), a '1'
// bit again suppressing the high phase. The sources may be TTC fast
// commands or register bits, OR-ed by the caller. Requests that arrive while
// a command is on the line are queued: up to 15 L1As are counted, resets are
// held one deep. L1As go first, then TBM reset, then ROC reset.
// The use of clock suppression and the exact codes are this design's
// choice; the architecture only states that a bit pattern is encoded into
// the clock. busy is high while a command is being sent.
module pfec_trigger_fsm
  import pix_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       l1a,
  input  logic       roc_reset,
  input  logic       tbm_reset,
  output logic [1:0] mclk_pat,
  output logic       busy,
  output logic [3:0] l1a_pending
);
  logic [3:0] l1a_cnt;
  logic       roc_pend, tbm_pend;
  logic [2:0] code;
  logic [1:0] slot;      // 0: start, 1..3: code bits
  logic       active;
  logic       start_l1a, start_tbm, start_roc;

  assign busy        = active;
  assign l1a_pending = l1a_cnt;
  assign start_l1a = !active && (l1a_cnt != 0);
  assign start_tbm = !active && (l1a_cnt == 0) && tbm_pend;
  assign start_roc = !active && (l1a_cnt == 0) && !tbm_pend && roc_pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l1a_cnt <= '0; roc_pend <= 1'b0; tbm_pend <= 1'b0;
      code <= '0; slot <= '0; active <= 1'b0; mclk_pat <= 2'b10;
    end else if (ce40) begin
      // queue bookkeeping
      l1a_cnt <= l1a_cnt + ((l1a && l1a_cnt != 4'hF) ? 4'd1 : 4'd0) - (start_l1a ? 4'd1 : 4'd0);
      if (roc_reset) roc_pend <= 1'b1; else if (start_roc) roc_pend <= 1'b0;
      if (tbm_reset) tbm_pend <= 1'b1; else if (start_tbm) tbm_pend <= 1'b0;

      if (!active) begin
        if (start_l1a || start_tbm || start_roc) begin
          active   <= 1'b1;
          slot     <= 2'd1;
          code     <= start_l1a ? MCMD_L1A : (start_tbm ? MCMD_TBM_RST : MCMD_ROC_RST);
          mclk_pat <= 2'b00;                    // start: suppressed high phase
        end else begin
          mclk_pat <= 2'b10;
        end
      end else begin
        mclk_pat <= code[2] ? 2'b00 : 2'b10;    // MSB first
        code     <= {code[1:0], 1'b0};
        slot     <= slot + 2'd1;
        if (slot == 2'd3) active <= 1'b0;
      end
    end
  end
endmodule
