// Testbench for tbm_core with a behavioural ROC group: sends L1As (also
// faster than the readout so the stack fills), and compares the core's
// stream with reference packets: header with event number and stack count,
// ROC data forwarded unchanged, trailer. Also checks the token timeout flag
// when the ROCs keep the token, and the L1A-to-header latency.
`include "tb_check.svh"
module tb_tbm_core;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1, l1a = 0, tbm_reset = 0;
  logic token_out, token_in, roc_valid, out_valid, readout_busy;
  logic [3:0] roc_nib, out_nib;
  int hits = 1; logic hold = 0;
  tbm_core #(.TOKEN_TO(64)) dut (.*);
  roc_group_model #(.N_ROCS(2)) rocs (.clk, .ce40, .token_in(token_out), .hits, .gap_every(3),
    .hold_token(hold), .token_out(token_in), .valid(roc_valid), .nib(roc_nib));
  always #5 clk = ~clk;
  initial begin #400000; failures++; `TB_END end
  nib_q_t got, exp;
  int cyc = 0, first_hdr = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      got.push_back(out_nib);
      if (first_hdr < 0) first_hdr = cyc;
    end
  end
  int l1a_cyc;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); l1a = 1; l1a_cyc = cyc; @(negedge clk); l1a = 0;
    // two more L1As while the first readout runs
    repeat (3) @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (300) @(negedge clk);
    `CHECK(first_hdr - l1a_cyc == 4, $sformatf("L1A to first header nibble %0d", first_hdr - l1a_cyc))
    // header: stack count including this trigger; trailer: count at its end
    push_packet(exp, 1, 1, 2, 1, 2);
    push_packet(exp, 2, 2, 2, 1, 1);
    push_packet(exp, 3, 1, 2, 1, 0);
    `CHECK(got.size() == exp.size(), $sformatf("stream length %0d vs %0d", got.size(), exp.size()))
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      `CHECK(got[i] == exp[i], $sformatf("nibble %0d got %h exp %h", i, got[i], exp[i]))
    // token timeout
    got.delete(); exp.delete();
    hold = 1;
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (200) @(negedge clk);
    `CHECK(got.size() >= 7, "timeout packet present")
    if (got.size() >= 7) begin
      `CHECK({got[got.size()-7], got[got.size()-6], got[got.size()-5]} == 12'h7FE, "trailer after timeout")
      `CHECK(got[got.size()-4][2] == 1'b1, "token timeout flag")
    end
    `CHECK(!readout_busy, "core idle again")
    `TB_END
  end
endmodule
