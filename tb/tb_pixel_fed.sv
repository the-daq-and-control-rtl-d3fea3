// Testbench for pixel_fed with two fibers (four TBM FIFOs) in emulation
// mode, driven through its TTC input. Checks that every L1A gives one
// S-Link event with the right event number, BX number (counted from BC0),
// 4 x 8 x emu_hits hits and a correct length; that EC0 restarts the event
// numbers; that a private resync flushes (BSY) without clearing the event
// counter; and that too-short channel timeouts drive TTS to OOS, left by a
// global resync.
`include "tb_check.svh"
module tb_pixel_fed;
  import tb_ref_pkg::*;
  import pix_pkg::*;
  int checks = 0, failures = 0;
  localparam int NF = 2;
  logic clk = 0, rst_n = 0, ce40 = 0;
  logic [NF-1:0][39:0] fiber = '0;
  logic [1:0] ttc_ab = 2'b01;
  logic emu_en = 1, cnt_clr = 0;
  logic [3:0] emu_hits = 4'd1;
  logic [4:0] n_rocs = 5'd8;
  logic [9:0] trunc_level = 10'd400, max_hits = 10'd200;
  logic [15:0] timeout_cyc = 16'd2000;
  logic [8:0] l1a_afull_thr = 9'd200;
  logic [9:0] pix_afull_thr = 10'd450;
  logic [3:0] oos_n = 4'd2;
  logic slink_valid, slink_ctrl, slink_ready = 1;
  logic [63:0] slink_data;
  tts_t tts;
  logic [2:0] tts_state;
  logic [NF-1:0] locked;
  logic [2*NF-1:0][3:0][15:0] err_cnt;
  logic [NF-1:0][15:0] sym_err_cnt;
  logic [23:0] ev_count;
  logic ev_done;
  pixel_fed #(.N_FIBERS(NF), .FIFO_DEPTH(512), .L1A_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;
  int ph = 0;
  always @(posedge clk) begin ph = (ph + 1) % 4; ce40 <= (ph == 3); end
  initial begin #50000000; failures++; `TB_END end

  // TTC driver
  logic b_q[$];
  int l1a_req = 0, bxn = 0;
  always @(posedge clk) if (ce40) begin
    bxn++;
    ttc_ab[1] <= l1a_req > 0;
    if (l1a_req > 0) l1a_req--;
    ttc_ab[0] <= b_q.size() ? b_q.pop_front() : 1'b1;
  end
  task automatic ttc_cmd(logic [7:0] c);
    logic [15:0] f;
    f = ttc_frame(c);
    for (int i = 15; i >= 0; i--) b_q.push_back(f[i]);
    while (b_q.size() > 0) @(posedge clk iff ce40);
    repeat (6) @(posedge clk iff ce40);
  endtask

  // S-Link monitor
  int n_ev = 0, hits = 0, words = 0, last_ev = 0, last_bx = 0, ev_hits[$], ev_no[$], ev_bx[$];
  int n_to_words = 0, n_oos = 0, n_bsy3 = 0;
  always @(posedge clk) if (rst_n && slink_valid && slink_ready) begin
    words++;
    if (slink_ctrl && slink_data[63:56] == 8'h51) begin
      words = 1; hits = 0;
      ev_no.push_back(int'(slink_data[55:32])); ev_bx.push_back(int'(slink_data[31:20]));
    end else if (slink_ctrl) begin
      `CHECK(int'(slink_data[55:32]) == words, "event length")
      ev_hits.push_back(hits); n_ev++;
    end else for (int k = 0; k < 2; k++) begin
      logic [31:0] x;
      x = k ? slink_data[31:0] : slink_data[63:32];
      if (x != 0 && x[25:21] < 29) hits++;
      if (x != 0 && x[25:21] == 29) n_to_words++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (tts == TTS_OOS) n_oos++;
    if (tts_state == 3'd3) n_bsy3++;
  end

  int l1a_bx[$];
  task automatic trig(int gap);
    @(posedge clk iff ce40);
    l1a_req = 1;
    repeat (gap) @(posedge clk iff ce40);
  endtask

  initial begin
    int bc0_bx;
    repeat (8) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk iff ce40);
    ttc_cmd(TTC_BC0);
    for (int e = 0; e < 5; e++) trig(300);
    repeat (200) @(posedge clk iff ce40);
    `CHECK(n_ev == 5, $sformatf("%0d events", n_ev))
    foreach (ev_no[i]) begin
      `CHECK(ev_no[i] == i + 1, $sformatf("event number %0d", ev_no[i]))
      `CHECK(ev_hits[i] == 2 * NF * 8, $sformatf("event %0d hits %0d", i, ev_hits[i]))
      if (i > 0) `CHECK(((ev_bx[i] - ev_bx[i - 1]) & 12'hFFF) == 301 % 4096, $sformatf("bx step %0d", ev_bx[i] - ev_bx[i - 1]))
    end
    // EC0
    ttc_cmd(TTC_EC0);
    ev_no.delete(); ev_hits.delete();
    trig(300);
    repeat (100) @(posedge clk iff ce40);
    `CHECK(ev_no.size() == 1 && ev_no[0] == 1, "event number 1 after EC0")
    // private resync: flush, counter kept
    ttc_cmd(TTC_RESYNC_PRV);
    repeat (20) @(posedge clk iff ce40);
    `CHECK(n_bsy3 > 0 && tts == TTS_RDY, "private resync flushed and returned to RDY")
    `CHECK(ev_count == 24'd1, "event counter kept by the private resync")
    // timeouts -> OOS
    timeout_cyc = 16'd2;
    for (int e = 0; e < 3; e++) trig(300);
    repeat (100) @(posedge clk iff ce40);
    `CHECK(n_to_words > 0, "timeout error words")
    `CHECK(tts == TTS_OOS, "OOS after repeated timeouts")
    timeout_cyc = 16'd2000;
    ttc_cmd(TTC_RESYNC);
    repeat (100) @(posedge clk iff ce40);
    `CHECK(tts == TTS_RDY && ev_count == 0, "global resync: RDY, counter cleared")
    `TB_END
  end
endmodule
