// Testbench for tbm_l1a_stack: pushes triggers, pops them in order, checks
// event numbers (1, 2, 3, ...), the stack count, simultaneous push/pop, the
// 32-entry limit with the overflow flag, and clearing by TBM reset.
`include "tb_check.svh"
module tb_tbm_l1a_stack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 1, clr = 0, push = 0, pop = 0;
  logic [7:0] head;
  logic [5:0] count;
  logic overflow;
  tbm_l1a_stack #(.DEPTH(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_END end
  task automatic step(input logic pu, input logic po);
    @(negedge clk); push = pu; pop = po; @(negedge clk); push = 0; pop = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) step(1, 0);
    `CHECK(count == 5, "count after 5")
    `CHECK(head == 8'd1, "first event number")
    step(0, 1);
    `CHECK(head == 8'd2 && count == 4, "pop order")
    step(1, 1);                       // push and pop together
    `CHECK(head == 8'd3 && count == 4, "push+pop")
    for (int i = 0; i < 40; i++) step(1, 0);
    `CHECK(count == 32, "limited to 32")
    `CHECK(overflow, "overflow flag")
    for (int i = 0; i < 32; i++) begin
      `CHECK(head == 8'(3 + i), "ordered drain")
      step(0, 1);
    end
    `CHECK(count == 0, "empty")
    step(0, 1);
    `CHECK(count == 0, "pop when empty ignored")
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    `CHECK(!overflow && count == 0, "clear")
    step(1, 0);
    `CHECK(head == 8'd1, "event number restarts")
    `TB_END
  end
endmodule
