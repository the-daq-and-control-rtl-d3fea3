// Testbench for tbm_stream_emulator: two triggers (the second while the
// first packet is still being sent) must give two complete packets equal to
// the reference packet builder, each nibble on consecutive BX, with the
// documented length 7 + N_ROCS*(3 + 6*hits) + 7. After an EC0 pulse the
// next packet carries event number 1 again.
`include "tb_check.svh"
module tb_tbm_stream_emulator;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1, trig = 0, ec0 = 0;
  logic [3:0] hits_per_roc = 4'd2;
  logic out_valid, busy;
  logic [3:0] out_nib;
  tbm_stream_emulator #(.N_ROCS(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_END end
  nib_q_t got, exp;
  int first_t = -1, last_t = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      got.push_back(out_nib);
      if (first_t < 0) first_t = cyc;
      last_t = cyc;
    end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    repeat (10) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;
    repeat (200) @(negedge clk);
    push_packet(exp, 1, 0, 3, 2, 0);
    push_packet(exp, 2, 0, 3, 2, 0);
    `CHECK(got.size() == exp.size(), $sformatf("length %0d vs %0d", got.size(), exp.size()))
    `CHECK(exp.size() == 2 * (7 + 3 * (3 + 12) + 7), "reference length")
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      `CHECK(got[i] == exp[i], $sformatf("nibble %0d", i))
    `CHECK(last_t - first_t + 1 == exp.size() + 1, "packets back to back with one idle BX")
    `CHECK(!busy, "idle at end")
    // EC0 restarts the event numbers: the next packet is event 1 again
    got.delete(); exp.delete();
    repeat ($urandom_range(1, 20)) @(negedge clk);
    ec0 = 1; @(negedge clk); ec0 = 0;
    trig = 1; @(negedge clk); trig = 0;
    repeat (100) @(negedge clk);
    push_packet(exp, 1, 0, 3, 2, 0);
    `CHECK(got.size() == exp.size(), "length after EC0")
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      `CHECK(got[i] == exp[i], $sformatf("nibble %0d after EC0", i))
    `TB_END
  end
endmodule
