// Testbench for sync_fifo: random writes and reads against a queue model;
// checks data order, empty/full flags and the level count, including writes
// to a full FIFO and reads from an empty one.
`include "tb_check.svh"
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [35:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [4:0] level;
  logic [35:0] q[$];
  sync_fifo #(.WIDTH(36), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog"); `TB_END
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      `CHECK(empty == (q.size() == 0), "empty flag")
      `CHECK(full == (q.size() == 16), "full flag")
      `CHECK(level == 5'(q.size()), "level")
      if (q.size() != 0) `CHECK(rd_data == q[0], "head data")
      wr_en = ($urandom_range(0, 99) < (i < 1500 ? 60 : 40));
      rd_en = ($urandom_range(0, 99) < 50);
      wr_data = {$urandom, 4'($urandom)};
    end
    `TB_END
  end
  // model update on the edge, using the flags seen before the edge
  always @(posedge clk) if (rst_n) begin
    if (rd_en && q.size() != 0) void'(q.pop_front());
    if (wr_en && !full) q.push_back(wr_data);
  end
endmodule
