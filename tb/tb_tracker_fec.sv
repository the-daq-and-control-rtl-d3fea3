// Testbench for tracker_fec with its four rings, each closed by two
// behavioural CCU ring paths. Commands run on all rings at the same time
// (independence), ring 2's A path is then broken and only ring 2 must
// report the failure; switching ring 2 to path B restores it.
`include "tb_check.svh"
module tb_tracker_fec;
  int checks = 0, failures = 0;
  localparam int NR = 4, TO = 500;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0] sel_b = 0, cmd_valid = 0, cmd_read = 0;
  logic [NR-1:0][7:0] cmd_addr = 0, cmd_reg = 0, cmd_data = 0;
  logic [NR-1:0] cmd_ready, cmd_done, cmd_ok, tx_a, tx_b, rx_a, rx_b, ring_ok;
  logic [NR-1:0][7:0] rd_data;
  logic [NR-1:0][15:0] token_good, token_bad;
  logic [NR-1:0] broken = 0;
  tracker_fec #(.N_RINGS(NR), .TIMEOUT(TO)) dut (.*);
  for (genvar r = 0; r < NR; r++) begin : g_ring
    ccu_ring_model #(.DELAY(40 + 20 * r), .N_CCU(3)) ra (.clk, .broken(broken[r]), .din(tx_a[r]), .dout(rx_a[r]));
    ccu_ring_model #(.DELAY(60 + 20 * r), .N_CCU(3)) rb (.clk, .broken(1'b0), .din(tx_b[r]), .dout(rx_b[r]));
  end
  always #5 clk = ~clk;
  initial begin #10000000; failures++; `TB_END end

  // one command on every ring in parallel; returns ok bits and data
  task automatic all_rings(logic rd, logic [NR-1:0][7:0] d, output logic [NR-1:0] ok, output logic [NR-1:0][7:0] q);
    logic [NR-1:0] fin;
    int t;
    t = 0;
    while (cmd_ready != '1 && t < 5000) begin @(negedge clk); t++; end
    for (int r = 0; r < NR; r++) begin
      cmd_read[r] = rd; cmd_addr[r] = 8'd1 + 8'(r % 3); cmd_reg[r] = 8'd7; cmd_data[r] = d[r];
    end
    cmd_valid = '1; @(negedge clk); cmd_valid = '0;
    fin = '0; ok = '0; t = 0;
    while (fin != '1 && t < 5000) begin
      for (int r = 0; r < NR; r++) if (cmd_done[r]) begin fin[r] = 1; ok[r] = cmd_ok[r]; q[r] = rd_data[r]; end
      @(negedge clk); t++;
    end
  endtask

  initial begin
    logic [NR-1:0] ok; logic [NR-1:0][7:0] q, d;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (400) @(negedge clk);
    `CHECK(ring_ok == '1, "all rings pass the start-up token check")
    for (int r = 0; r < NR; r++) d[r] = 8'($urandom);
    all_rings(0, d, ok, q);
    `CHECK(ok == '1, "writes on all rings")
    all_rings(1, '0, ok, q);
    `CHECK(ok == '1 && q == d, "read-back on all rings")
    broken[2] = 1;
    all_rings(0, d, ok, q);
    `CHECK(ok == 4'b1011 && ring_ok == 4'b1011, $sformatf("only ring 2 fails (%b)", ok))
    `CHECK(token_bad[2] >= 1 && token_bad[0] == 0, "token failure counted on ring 2 only")
    sel_b[2] = 1;
    all_rings(0, d, ok, q);
    `CHECK(ok == '1 && ring_ok == '1, "ring 2 restored through path B")
    `TB_END
  end
endmodule
