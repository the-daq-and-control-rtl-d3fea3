// Testbench for tbm_cmd_decoder: sends hand-built module-clock patterns
// (start slot + 3 code slots) and checks the decoded pulses, their timing
// (one BX after the last code slot), and that an unknown code is rejected.
`include "tb_check.svh"
module tb_tbm_cmd_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic [1:0] mclk_pat = 2'b10;
  logic l1a, roc_reset, tbm_reset, bad_cmd;
  tbm_cmd_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_END end
  int nl = 0, nr = 0, nt = 0, nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (l1a) nl++; if (roc_reset) nr++; if (tbm_reset) nt++; if (bad_cmd) nb++;
  end
  task automatic send(input logic [2:0] c);
    @(negedge clk) mclk_pat = 2'b00;
    for (int i = 2; i >= 0; i--) @(negedge clk) mclk_pat = c[i] ? 2'b00 : 2'b10;
    @(negedge clk) mclk_pat = 2'b10;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    send(3'b100);
    `CHECK(l1a == 1'b1, "L1A pulse right after the code")
    @(negedge clk);
    `CHECK(nl == 1 && l1a == 1'b0, "single-BX L1A")
    send(3'b110); repeat (2) @(negedge clk);
    send(3'b101); repeat (2) @(negedge clk);
    send(3'b111); repeat (2) @(negedge clk);
    for (int i = 0; i < 4; i++) send(3'b100);
    repeat (3) @(negedge clk);
    `CHECK(nl == 5, "L1A count")
    `CHECK(nr == 1, $sformatf("ROC reset count %0d %0d %0d %0d", nl, nr, nt, nb))
    `CHECK(nt == 1, "TBM reset count")
    `CHECK(nb == 1, "bad code rejected")
    `TB_END
  end
endmodule
