// Testbench for ttc_decoder. The testbench serialises short broadcast
// frames (start 0, format 0, 8 command bits, 5 check bits from its own
// Hamming equations, stop 1) on the B channel with random idle gaps and
// random L1As on the A channel. It checks every command arrives once with
// the right code, that single-bit errors are corrected, that double errors
// are dropped with ham_err, that long-format frames are skipped, and that
// l1a follows the A channel with one BX latency.
`include "tb_check.svh"
module tb_ttc_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic [1:0] ttc_ab = 2'b01;
  logic l1a, cmd_valid, ham_err, corrected;
  logic [7:0] cmd;
  ttc_decoder dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; `TB_END end

  function automatic logic [4:0] ham(logic [7:0] x);
    logic [4:0] h;
    h[0] = x[0] ^ x[1] ^ x[2] ^ x[3];
    h[1] = x[0] ^ x[4] ^ x[5] ^ x[6];
    h[2] = x[1] ^ x[2] ^ x[4] ^ x[5] ^ x[7];
    h[3] = x[1] ^ x[3] ^ x[4] ^ x[6] ^ x[7];
    h[4] = ^{x, h[3:0]};
    return h;
  endfunction

  logic [7:0] got[$];
  int n_l1a_in = 0, n_l1a_out = 0, n_herr = 0, n_corr = 0, lat_bad = 0;
  logic a_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid) got.push_back(cmd);
    if (ham_err) n_herr++;
    if (corrected) n_corr++;
    if (l1a) n_l1a_out++;
    if (l1a != a_prev) lat_bad++;
    a_prev = ttc_ab[1];
  end

  task automatic bit_b(logic b);
    ttc_ab[0] = b;
    ttc_ab[1] = $urandom_range(0, 9) == 0;
    if (ttc_ab[1]) n_l1a_in++;
    @(negedge clk);
  endtask
  task automatic frame(logic [7:0] c, int flip1, int flip2);
    logic [15:0] f;
    f = {1'b0, 1'b0, c, ham(c), 1'b1};
    // flip positions count within the 13 protected bits (0 = first command bit)
    if (flip1 >= 0) f[13 - flip1] = ~f[13 - flip1];
    if (flip2 >= 0) f[13 - flip2] = ~f[13 - flip2];
    for (int i = 15; i >= 0; i--) bit_b(f[i]);
    repeat ($urandom_range(0, 5)) bit_b(1);
  endtask

  initial begin
    logic [7:0] exp_c[$];
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    repeat (5) bit_b(1);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] c; c = 8'($urandom); exp_c.push_back(c); frame(c, -1, -1);
    end
    for (int i = 0; i < 100; i++) begin
      logic [7:0] c; c = 8'($urandom); exp_c.push_back(c); frame(c, $urandom_range(0, 12), -1);
    end
    for (int i = 0; i < 50; i++) begin
      int a, b; a = $urandom_range(0, 12); b = (a + $urandom_range(1, 12)) % 13;
      frame(8'($urandom), a, b);
    end
    // long-format frame: start 0, format 1, 40 more bits, stop; contents random
    begin
      logic [7:0] c; c = 8'($urandom);
      bit_b(0); bit_b(1);
      repeat (39) bit_b(1'($urandom)); bit_b(1);
      repeat (3) bit_b(1);
      exp_c.push_back(c); frame(c, -1, -1);
    end
    repeat (5) bit_b(1);
    `CHECK(got.size() == exp_c.size(), $sformatf("%0d commands, expected %0d", got.size(), exp_c.size()))
    for (int i = 0; i < got.size() && i < exp_c.size(); i++)
      `CHECK(got[i] == exp_c[i], $sformatf("command %0d: %h expected %h", i, got[i], exp_c[i]))
    `CHECK(n_corr == 100, $sformatf("%0d corrections", n_corr))
    `CHECK(n_herr == 50, $sformatf("%0d double errors", n_herr))
    `CHECK(n_l1a_out == n_l1a_in && lat_bad == 0, $sformatf("l1a %0d/%0d, latency errors %0d", n_l1a_out, n_l1a_in, lat_bad))
    `TB_END
  end
endmodule
