// Testbench for ctrl_ring with behavioural CCU rings on the A and B paths.
// Checks the start-up token check, register writes and read-back through
// the ring (data compared with what was written), a command to a missing
// CCU (cmd_done without cmd_ok after TIMEOUT clocks), a broken A ring (token
// check fails, ring_ok low, commands refused) and recovery by selecting
// ring B. Also checks the idle pattern 1010... on the unused path.
`include "tb_check.svh"
module tb_ctrl_ring;
  int checks = 0, failures = 0;
  localparam int TO = 400;
  logic clk = 0, rst_n = 0, sel_b = 0;
  logic cmd_valid = 0, cmd_read = 0;
  logic [7:0] cmd_addr = 0, cmd_reg = 0, cmd_data = 0;
  logic cmd_ready, cmd_done, cmd_ok, tx_a, tx_b, rx_a, rx_b, ring_ok;
  logic [7:0] rd_data;
  logic [15:0] token_good, token_bad;
  logic broken_a = 0;
  ctrl_ring #(.TIMEOUT(TO)) dut (.*);
  ccu_ring_model #(.DELAY(70), .N_CCU(4)) ring_a (.clk, .broken(broken_a), .din(tx_a), .dout(rx_a));
  ccu_ring_model #(.DELAY(90), .N_CCU(4)) ring_b (.clk, .broken(1'b0), .din(tx_b), .dout(rx_b));
  always #5 clk = ~clk;
  initial begin #10000000; failures++; `TB_END end

  int t_cmd;
  task automatic run(logic rd, logic [7:0] a, logic [7:0] r, logic [7:0] d, output logic ok, output logic [7:0] q);
    int t0;
    t0 = 0;
    while (!cmd_ready && t0 < 5000) begin @(negedge clk); t0++; end
    cmd_valid = 1; cmd_read = rd; cmd_addr = a; cmd_reg = r; cmd_data = d;
    @(negedge clk); cmd_valid = 0;
    t0 = 0;
    while (!cmd_done && t0 < 5000) begin @(negedge clk); t0++; end
    t_cmd = t0;
    ok = cmd_ok; q = rd_data;
    @(negedge clk);
  endtask

  logic [7:0] model[int];
  initial begin
    logic ok; logic [7:0] q;
    int idle_bad = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (300) @(negedge clk);
    `CHECK(ring_ok && token_good == 1 && token_bad == 0, "start-up token check passed")
    for (int i = 0; i < 30; i++) begin
      logic [7:0] a, r, d;
      a = 8'($urandom_range(1, 4)); r = 8'($urandom_range(0, 7)); d = 8'($urandom);
      if ($urandom_range(0, 1) || !model.exists({a, r})) begin
        run(0, a, r, d, ok, q); model[{a, r}] = d;
        `CHECK(ok, "write acknowledged")
      end else begin
        run(1, a, r, 0, ok, q);
        `CHECK(ok && q == model[{a, r}], $sformatf("read %0d/%0d: %h expected %h", a, r, q, model[{a, r}]))
      end
      // the unused B path carries the idle pattern
      for (int k = 0; k < 4; k++) begin
        logic p; p = tx_b; @(negedge clk); if (tx_b == p) idle_bad++;
      end
    end
    `CHECK(idle_bad == 0, "idle pattern on the unused path")
    `CHECK(token_good == 31, $sformatf("%0d good token checks", token_good))
    run(0, 8'd9, 8'd0, 8'd1, ok, q);
    `CHECK(!ok, "no reply from a missing CCU")
    `CHECK(t_cmd >= TO && t_cmd <= TO + 200, $sformatf("missing CCU reported after %0d clocks", t_cmd))
    // break ring A
    broken_a = 1;
    run(0, 8'd1, 8'd1, 8'h55, ok, q);
    `CHECK(!ok && !ring_ok && token_bad >= 1, "broken ring A: token check fails")
    sel_b = 1;
    run(0, 8'd2, 8'd3, 8'hC3, ok, q);
    `CHECK(ok && ring_ok, "ring B carries the command")
    run(1, 8'd2, 8'd3, 8'h00, ok, q);
    `CHECK(ok && q == 8'hC3, "read back through ring B")
    `TB_END
  end
endmodule
