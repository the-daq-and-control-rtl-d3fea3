// Testbench for phase_finder: a random bit stream is 4x oversampled with a
// chosen skew (the bit edges fall before sample phase s); after two windows
// the chosen phase must be the one half a bit from the edges, (s+2) mod 4,
// and the output bits must equal the input stream (with a fixed delay).
// The skew is then moved to check that the phase follows.
`include "tb_check.svh"
module tb_phase_finder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic [39:0] samples = '0;
  logic [9:0] bits;
  logic [1:0] phase;
  logic phase_changed;
  phase_finder #(.WIN(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; `TB_END end
  logic stream[$];      // transmitted bits
  logic rx[$];          // received bits
  int skew = 1;
  int nchg = 0;
  // global sample index t: sample t carries bit floor((t - skew) / 4)
  task automatic bx(input int k);
    for (int j = 9; j >= 0; j--)
      for (int p = 0; p < 4; p++) begin
        int t, b;
        t = 40 * k + 4 * (9 - j) + p;
        b = (t - skew) / 4;
        if (t < skew) b = 0;
        while (stream.size() <= b) stream.push_back(1'($urandom));
        samples[4 * j + 3 - p] = stream[b];
      end
    @(negedge clk);
    for (int j = 9; j >= 0; j--) rx.push_back(bits[j]);
    if (phase_changed) nchg++;
  endtask
  function automatic int match_delay();
    // find a delay d such that rx[i] == stream[i - d] over the last 200 bits
    for (int d = 0; d < 40; d++) begin
      bit ok = 1;
      for (int i = rx.size() - 200; i < rx.size(); i++)
        if (i - d < 0 || rx[i] != stream[i - d]) ok = 0;
      if (ok) return d;
    end
    return -1;
  endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 100; k++) bx(k);
    `CHECK(phase == 2'((skew + 2) % 4), $sformatf("phase %0d for skew %0d", phase, skew))
    `CHECK(match_delay() >= 0, "bits recovered")
    skew = 3;
    for (int k = 100; k < 200; k++) bx(k);
    `CHECK(phase == 2'((skew + 2) % 4), $sformatf("phase %0d follows skew %0d", phase, skew))
    `CHECK(match_delay() >= 0, "bits recovered after the move")
    `CHECK(nchg >= 1, "phase change reported")
    `TB_END
  end
endmodule
