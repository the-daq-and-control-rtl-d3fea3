// Testbench for tbm_datakeeper: random valid/idle nibbles on both cores;
// the line bits are NRZI-decoded and split into two 5-bit symbols by the
// testbench and compared with its own 4b/5b table (core A first, then core
// B, idle symbols for idle cores), one BX after the input.
`include "tb_check.svh"
module tb_tbm_datakeeper;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic a_valid = 0, b_valid = 0;
  logic [3:0] a_nib = 0, b_nib = 0;
  logic [9:0] link;
  tbm_datakeeper dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; `TB_END end
  logic prev_level = 0;
  logic [9:0] dec;
  int ea, eb;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); prev_level = link[0];
    for (int i = 0; i < 500; i++) begin
      a_valid = $urandom_range(0, 3) != 0; b_valid = $urandom_range(0, 3) != 0;
      a_nib = 4'($urandom); b_nib = 4'($urandom);
      ea = a_valid ? int'(a_nib) : -1;
      eb = b_valid ? int'(b_nib) : -2;
      @(negedge clk);
      for (int j = 9; j >= 0; j--) begin
        dec[j] = link[j] ^ prev_level;
        prev_level = link[j];
      end
      `CHECK(ref_4b(dec[9:5]) == ea, $sformatf("core A symbol %0d", i))
      `CHECK(ref_4b(dec[4:0]) == eb, $sformatf("core B symbol %0d", i))
    end
    `TB_END
  end
endmodule
