// Testbench for fed_link_decoder: the testbench encodes random core A/B
// nibble streams (4b/5b + NRZI with its own tables), delays the line by a
// random number of bits (0..9) so the symbol boundary is unknown, and checks
// that the decoder locks and recovers both streams in order. Then it
// corrupts the line and checks that invalid symbols are flagged and the lock
// is dropped and regained.
`include "tb_check.svh"
module tb_fed_link_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic [9:0] bits = '0;
  logic locked, a_valid, b_valid, sym_err;
  logic [3:0] a_nib, b_nib;
  fed_link_decoder #(.LOCK_N(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; `TB_END end

  logic [3:0] qa[$], qb[$], ga[$], gb[$];
  logic line = 0;
  logic [19:0] hist = '0;
  int shift;
  int nerr = 0;
  logic corrupt = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_valid) ga.push_back(a_nib);
    if (b_valid) gb.push_back(b_nib);
    if (sym_err) nerr++;
  end
  // produce one BX of line bits
  task automatic bx(input logic av, input logic [3:0] an, input logic bv, input logic [3:0] bn);
    logic [9:0] raw, nrz;
    raw = {av ? ref_5b(an) : 5'b11111, bv ? ref_5b(bn) : 5'b11000};
    if (corrupt) raw = 10'($urandom);
    for (int j = 9; j >= 0; j--) begin line = line ^ raw[j]; nrz[j] = line; end
    hist = {hist[9:0], nrz};
    @(negedge clk);
    bits = hist[19 - shift -: 10];
  endtask
  initial begin
    shift = $urandom_range(0, 9);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 30; i++) bx(0, 0, 0, 0);
    `CHECK(locked, $sformatf("locked with bit shift %0d", shift))
    ga.delete(); gb.delete();
    for (int i = 0; i < 400; i++) begin
      logic av, bv; logic [3:0] an, bn;
      av = $urandom_range(0, 2) != 0; bv = $urandom_range(0, 2) != 0;
      an = 4'($urandom); bn = 4'($urandom);
      if (av) qa.push_back(an);
      if (bv) qb.push_back(bn);
      bx(av, an, bv, bn);
    end
    for (int i = 0; i < 5; i++) bx(0, 0, 0, 0);
    `CHECK(ga.size() == qa.size() && gb.size() == qb.size(), $sformatf("counts %0d/%0d %0d/%0d", ga.size(), qa.size(), gb.size(), qb.size()))
    for (int i = 0; i < qa.size() && i < ga.size(); i++) `CHECK(ga[i] == qa[i], "core A data")
    for (int i = 0; i < qb.size() && i < gb.size(); i++) `CHECK(gb[i] == qb[i], "core B data")
    `CHECK(nerr == 0, "no symbol errors on a clean line")
    corrupt = 1;
    for (int i = 0; i < 60; i++) bx(0, 0, 0, 0);
    `CHECK(nerr > 0, "errors flagged on a corrupted line")
    `CHECK(!locked, "lock dropped")
    corrupt = 0;
    for (int i = 0; i < 40; i++) bx(0, 0, 0, 0);
    `CHECK(locked, "lock regained")
    `TB_END
  end
endmodule
