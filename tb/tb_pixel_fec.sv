// Testbench for pixel_fec (2 channels, small FIFOs) driven through its TTC
// input and register pulses. The module clock is decoded by the testbench
// (start BX '00', three code BX with '00' = 1) and the commands compared
// with the requests: TTC L1A, register L1A (a one-clock pulse at any clock
// phase), TTC ROC reset and TBM reset. Also checks the fast-command
// counters, the TTC event FIFO contents (BX number from BC0, L1A and
// command flags), and that the TTC Send Data command starts only the
// channels in send_mask while reg_send starts a single channel.
`include "tb_check.svh"
module tb_pixel_fec;
  import tb_ref_pkg::*;
  import pix_pkg::*;
  int checks = 0, failures = 0;
  localparam int NC = 2;
  logic clk = 0, rst_n = 0, ce40 = 0;
  logic [1:0] ttc_ab = 2'b01;
  logic reg_l1a = 0, reg_roc_reset = 0, reg_tbm_reset = 0, evt_rd = 0;
  logic [1:0] mclk_pat;
  logic [3:0][31:0] cmd_cnt;
  logic [23:0] evt_q;
  logic evt_empty;
  logic [NC-1:0] fifo_wr = 0, reg_send = 0, send_mask = 0, rx_bit = 0;
  logic [NC-1:0][7:0] fifo_data = 0;
  logic [NC-1:0][4:0] hub = 0;
  logic [NC-1:0][2:0] port = 0;
  logic [NC-1:0][13:0] nbytes = 0;
  logic [NC-1:0][9:0] tx;
  logic [NC-1:0] busy, done, timeout, rx_err;
  pixel_fec #(.N_CH(NC), .TX_BYTES(64), .EVT_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  int ph = 0;
  always @(posedge clk) begin ph = (ph + 1) % 4; ce40 <= (ph == 3); end
  initial begin #20000000; failures++; `TB_END end

  logic b_q[$];
  int l1a_req = 0;
  always @(posedge clk) if (ce40) begin
    ttc_ab[1] <= l1a_req > 0;
    if (l1a_req > 0) l1a_req--;
    ttc_ab[0] <= b_q.size() ? b_q.pop_front() : 1'b1;
  end
  task automatic ttc_cmd(logic [7:0] c);
    logic [15:0] f;
    f = ttc_frame(c);
    for (int i = 15; i >= 0; i--) b_q.push_back(f[i]);
    while (b_q.size() > 0) @(posedge clk iff ce40);
    repeat (10) @(posedge clk iff ce40);
  endtask

  // module clock decoder
  logic [2:0] got[$];
  int slot = -1;
  logic [2:0] code;
  int n_to = 0;
  always @(posedge clk) if (rst_n && ce40) begin
    if (slot < 0) begin
      if (mclk_pat == 2'b00) begin slot = 0; code = 0; end
    end else begin
      code = {code[1:0], mclk_pat == 2'b00};
      slot++;
      if (slot == 3) begin got.push_back(code); slot = -1; end
    end
    if (timeout[0] || timeout[1]) n_to++;
  end

  initial begin
    int b0;
    repeat (8) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk iff ce40);
    ttc_cmd(TTC_BC0);
    @(posedge clk iff ce40); l1a_req = 1;
    repeat (10) @(posedge clk iff ce40);
    `CHECK(got.size() == 1 && got[0] == MCMD_L1A, "TTC L1A becomes a module-clock L1A")
    @(negedge clk); @(negedge clk); reg_l1a = 1; @(negedge clk); reg_l1a = 0;
    repeat (10) @(posedge clk iff ce40);
    `CHECK(got.size() == 2 && got[1] == MCMD_L1A, "register L1A")
    ttc_cmd(TTC_ROC_RST);
    `CHECK(got.size() == 3 && got[2] == MCMD_ROC_RST, "TTC ROC reset")
    ttc_cmd(TTC_TBM_RST);
    `CHECK(got.size() == 4 && got[3] == MCMD_TBM_RST, "TTC TBM reset")
    @(negedge clk); reg_tbm_reset = 1; @(negedge clk); reg_tbm_reset = 0;
    repeat (10) @(posedge clk iff ce40);
    `CHECK(got.size() == 5 && got[4] == MCMD_TBM_RST, "register TBM reset")
    ttc_cmd(TTC_EC0);
    ttc_cmd(TTC_RESYNC);
    `CHECK(cmd_cnt[0] == 1 && cmd_cnt[1] == 1 && cmd_cnt[2] == 1 && cmd_cnt[3] == 1, "fast command counters")
    // TTC event FIFO: BC0, L1A, ROC_RST, TBM_RST, EC0, RESYNC
    begin
      logic [23:0] e[$];
      while (!evt_empty) begin e.push_back(evt_q); @(negedge clk); evt_rd = 1; @(negedge clk); evt_rd = 0; end
      `CHECK(e.size() == 6, $sformatf("%0d TTC events", e.size()))
      if (e.size() == 6) begin
        `CHECK(e[0][10] && e[0][7:0] == TTC_BC0, "BC0 recorded")
        // BC0 is decoded at its last frame bit; ttc_cmd then waits 10 BX, the
        // L1A goes out on the next BX and is decoded one BX later: bx 12
        `CHECK(e[1][11] && !e[1][10] && e[1][23:12] == 12'd12, $sformatf("L1A recorded with bx %0d", e[1][23:12]))
        `CHECK(e[2][7:0] == TTC_ROC_RST && e[5][7:0] == TTC_RESYNC, "commands recorded in order")
      end
    end
    // Send Data
    hub[0] = 5'd1; hub[1] = 5'd2; nbytes[0] = 14'd0; nbytes[1] = 14'd0;
    send_mask = 2'b01;
    ttc_cmd(TTC_SEND_DATA);
    `CHECK(busy == 2'b01, $sformatf("TTC Send Data starts the masked channel only (%b)", busy))
    @(negedge clk); reg_send = 2'b10; @(negedge clk); reg_send = 0;
    repeat (3) @(posedge clk iff ce40);
    `CHECK(busy == 2'b11, "register Send Data starts channel 1")
    repeat (150) @(posedge clk iff ce40);
    `CHECK(busy == 2'b00 && n_to == 2, "both channels time out without a module")
    `TB_END
  end
endmodule
