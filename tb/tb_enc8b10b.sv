// Testbench for enc8b10b. Checks known code words (K28.5 in both
// disparities, K28.0, K28.4, D.0.0, D.21.5), and over a long random stream
// of data bytes and K.28 characters: each word and each 6b/4b sub-block
// has disparity 0 or +-2 of the allowed sign, the running disparity output
// follows the word disparity, no run of more than five equal bits appears
// on the line, the comma 0011111/1100000 appears only inside K.28 words,
// and no code word is produced for two different characters (decodable).
// Timing: q changes one clock after en.
`include "tb_check.svh"
module tb_enc8b10b;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, k = 0;
  logic [7:0] d = 0;
  logic [9:0] q;
  logic rd_pos;
  enc8b10b dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; `TB_END end

  function automatic int disp(logic [9:0] w, int lo, int n);
    int s = 0;
    for (int i = lo; i < lo + n; i++) s += w[i] ? 1 : -1;
    return s;
  endfunction

  logic [8:0] seen[logic [9:0]];
  logic line[$];

  task automatic enc(logic kk, logic [7:0] dd, output logic [9:0] w, output logic rd_before);
    rd_before = rd_pos;
    en = 1; k = kk; d = dd; @(negedge clk); en = 0;
    w = q;
  endtask

  initial begin
    logic [9:0] w; logic rb;
    int run; logic last;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    `CHECK(q == 10'b0011111010 && !rd_pos, "reset word K28.5, RD-")
    enc(1, 8'hBC, w, rb); `CHECK(w == 10'b0011111010, $sformatf("K28.5 RD- %b", w))
    `CHECK(rd_pos, "RD+ after K28.5")
    enc(1, 8'hBC, w, rb); `CHECK(w == 10'b1100000101, $sformatf("K28.5 RD+ %b", w))
    enc(1, 8'h1C, w, rb); `CHECK(w == 10'b0011110100, $sformatf("K28.0 RD- %b", w))
    enc(0, 8'hB5, w, rb); `CHECK(w == 10'b1010101010, $sformatf("D.21.5 %b", w))
    enc(1, 8'h9C, w, rb);
    `CHECK(w == (rb ? 10'b1100001101 : 10'b0011110010), $sformatf("K28.4 %b rd %0d", w, rb))
    if (rd_pos) enc(0, 8'hB5, w, rb);
    if (!rd_pos) begin enc(0, 8'h00, w, rb); `CHECK(w == 10'b1001110100, $sformatf("D.0.0 RD- %b", w)) end
    // random stream
    line.delete();
    for (int i = 0; i < 20000; i++) begin
      logic kk; logic [7:0] dd; int dw;
      kk = $urandom_range(0, 7) == 0;
      dd = kk ? {3'($urandom), 5'd28} : 8'($urandom);
      enc(kk, dd, w, rb);
      dw = disp(w, 0, 10);
      `CHECK(rb ? (dw == 0 || dw == -2) : (dw == 0 || dw == 2), $sformatf("word disparity %0d with rd %0d", dw, rb))
      `CHECK(rd_pos == ((dw == 0) ? rb : !rb), "running disparity output")
      `CHECK(disp(w, 4, 6) inside {-2, 0, 2} && disp(w, 0, 4) inside {-2, 0, 2}, "sub-block disparity")
      if (seen.exists(w)) `CHECK(seen[w] == {kk, dd}, $sformatf("code %b for two characters", w))
      else seen[w] = {kk, dd};
      for (int j = 9; j >= 0; j--) line.push_back(w[j]);
      // comma check in this word plus its neighbours
      if (!kk && line.size() >= 17) begin
        for (int s = line.size() - 16; s <= line.size() - 7; s++) begin
          logic [6:0] c;
          for (int b = 0; b < 7; b++) c[6 - b] = line[s + b];
          `CHECK(c != 7'b0011111 && c != 7'b1100000 || (s < line.size() - 13), "comma inside data")
        end
      end
    end
    run = 0; last = 0;
    foreach (line[i]) begin
      if (i > 0 && line[i] == last) run++; else run = 1;
      last = line[i];
      if (run > 5) begin `CHECK(0, $sformatf("run of %0d at bit %0d", run, i)) break; end
    end
    `CHECK(1, "run length")
    `TB_END
  end
endmodule
