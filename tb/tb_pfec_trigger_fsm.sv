// Testbench for pfec_trigger_fsm: drives L1A, ROC reset and TBM reset
// requests (including bursts) and decodes the module clock it produces with
// an independent model of the clock-suppression code, checking that every
// command arrives once, in the documented priority and timing (4 BX each).
`include "tb_check.svh"
module tb_pfec_trigger_fsm;
  import pix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic l1a = 0, roc_reset = 0, tbm_reset = 0;
  logic [1:0] mclk_pat;
  logic busy;
  logic [3:0] l1a_pending;
  pfec_trigger_fsm dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; `TB_END end
  // reference decoder
  int n_l1a = 0, n_roc = 0, n_tbm = 0, n_bad = 0;
  int st = 0; logic [2:0] code; int t_start;
  int first_l1a_bx = -1, bxn = 0;
  always @(posedge clk) if (rst_n) begin
    bxn++;
    if (st == 0) begin
      if (mclk_pat == 2'b00) begin st = 1; t_start = bxn; end
      else if (mclk_pat != 2'b10) n_bad++;
    end else begin
      code = {code[1:0], (mclk_pat[1] == 1'b0)};
      st++;
      if (st == 4) begin
        st = 0;
        case (code)
          3'b100: begin n_l1a++; if (first_l1a_bx < 0) first_l1a_bx = t_start; end
          3'b110: n_roc++;
          3'b101: n_tbm++;
          default: n_bad++;
        endcase
      end
    end
  end
  int req_bx;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); l1a = 1; req_bx = bxn; @(negedge clk); l1a = 0;
    repeat (10) @(posedge clk);
    `CHECK(n_l1a == 1, "single L1A decoded")
    `CHECK(first_l1a_bx - req_bx == 3, $sformatf("L1A start slot seen on the third BX edge after the request %0d", first_l1a_bx - req_bx))
    // burst: 5 L1As back to back plus both resets
    for (int i = 0; i < 5; i++) begin @(negedge clk); l1a = 1; end
    roc_reset = 1; tbm_reset = 1; @(negedge clk); l1a = 0; roc_reset = 0; tbm_reset = 0;
    `CHECK(l1a_pending >= 3, "L1As queued")
    repeat (40) @(posedge clk);
    `CHECK(n_l1a == 6, "all L1As delivered")
    `CHECK(n_roc == 1 && n_tbm == 1, "both resets delivered")
    `CHECK(n_bad == 0, "no malformed commands")
    `CHECK(!busy && l1a_pending == 0, "idle at end")
    `TB_END
  end
endmodule
