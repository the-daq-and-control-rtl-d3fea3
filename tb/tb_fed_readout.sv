// Testbench for fed_readout with N_CH=4 TBM FIFOs modelled as queues in the
// testbench (show-ahead read). For each L1A the testbench loads one packet
// per channel (random ROCs and hits) and builds the expected list of 32-bit
// output words. The S-Link side applies random back-pressure. Per event it
// checks the header (event number, bx, source id), the trailer length, that
// the multiset of non-filler 32-bit words equals the expected one, and the
// summary flags. Cases: clean events, a wrong event number (code 31), a
// channel with no data (timeout, code 29, checked against timeout_cyc),
// trailer error flags (code 30), and a flush. Also checks the rate: with
// ready always high an event of W 64-bit words leaves in at most
// W + 3*N_CH + 10 clocks.
`include "tb_check.svh"
module tb_fed_readout;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic l1a = 0, ec0 = 0, flush = 0;
  logic [11:0] bx = 0;
  logic [15:0] timeout_cyc = 16'd60;
  logic [N-1:0] ch_empty = '1;
  logic [N-1:0][35:0] ch_data = '0;
  logic [N-1:0] ch_rd;
  logic slink_valid, slink_ready = 1;
  logic [63:0] slink_data;
  logic slink_ctrl;
  logic [4:0] l1a_level;
  logic l1a_empty, ev_done, ev_timeout, ev_mismatch;
  logic [23:0] ev_count;
  fed_readout #(.N_CH(N), .L1A_DEPTH(16), .SOURCE_ID(12'd77)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; `TB_END end

  logic [35:0] q[N][$];
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      if (ch_rd[c] && q[c].size() > 0) void'(q[c].pop_front());
      ch_empty[c] <= q[c].size() == 0;
      ch_data[c]  <= q[c].size() > 0 ? q[c][0] : 36'h0;
    end
  end

  // received events
  logic [63:0] ow[$];
  int ev_cycles = 0, cyc = 0, hdr_cyc = 0;
  int n_to = 0, n_mm = 0;
  logic rand_ready = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (slink_valid && slink_ready) begin
      if (slink_ctrl && slink_data[63:56] == 8'h51) hdr_cyc = cyc;
      if (slink_ctrl && slink_data[63:56] == 8'hA0) ev_cycles = cyc - hdr_cyc;
      `CHECK(slink_ctrl == (slink_data[63:56] == 8'h51 && ow.size() == 0 || slink_data[63:56] == 8'hA0 && ow.size() > 0 && slink_data[31:0] == 0 && int'(slink_data[55:32]) == ow.size() + 1), "control flag on header and trailer only")
      ow.push_back(slink_data);
    end
    if (ev_done && ev_timeout) n_to++;
    if (ev_done && ev_mismatch) n_mm++;
    slink_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  logic [31:0] exp_w[$];
  // load one packet into channel c; returns nothing, appends expected words
  task automatic load(int c, int ev, int rocs, int hits, logic [7:0] flags, logic [15:0] st);
    q[c].push_back({4'h1, 16'h0, 8'(ev), 8'h0});
    for (int r = 1; r <= rocs; r++) begin
      q[c].push_back({4'h2, 22'h0, 2'b00, 3'b0, 5'(r)});
      for (int k = 0; k < hits; k++) begin
        logic [5:0] d; logic [8:0] p; logic [7:0] a;
        d = 6'($urandom_range(0, 25)); p = 9'($urandom_range(0, 159)); a = 8'($urandom);
        q[c].push_back({4'h3, 3'b0, 5'(r), ref_hit(d, p, a)});
        exp_w.push_back({6'(c + 1), 5'(r), d[4:0], p[7:0], a});
      end
    end
    q[c].push_back({4'h4, flags, 8'h0, st});
    if (flags != 0 || st[15:14] != 0) exp_w.push_back({6'(c + 1), 5'd30, 13'h0, flags | {6'h0, st[15:14]}});
  endtask

  task automatic check_event(int ev, int bxv, string what);
    logic [31:0] g[$];
    int t0;
    t0 = cyc;
    while (ow.size() == 0 || ow[ow.size() - 1][63:56] != 8'hA0) begin
      @(negedge clk);
      if (cyc - t0 > 5000) break;
    end
    `CHECK(ow.size() >= 2, {what, ": event received"})
    if (ow.size() >= 2) begin
      `CHECK(ow[0] == {8'h51, 24'(ev), 12'(bxv), 12'd77, 8'h00}, $sformatf("%s: header %h", what, ow[0]))
      `CHECK(ow[ow.size() - 1] == {8'hA0, 24'(ow.size()), 32'h0}, $sformatf("%s: trailer %h len %0d", what, ow[ow.size() - 1], ow.size()))
      for (int i = 1; i < ow.size() - 1; i++) begin
        if (ow[i][63:32] != 0) g.push_back(ow[i][63:32]);
        if (ow[i][31:0] != 0) g.push_back(ow[i][31:0]);
      end
      g.sort(); exp_w.sort();
      `CHECK(g.size() == exp_w.size(), $sformatf("%s: %0d words, expected %0d", what, g.size(), exp_w.size()))
      for (int i = 0; i < g.size() && i < exp_w.size(); i++)
        `CHECK(g[i] == exp_w[i], $sformatf("%s: word %h expected %h", what, g[i], exp_w[i]))
    end
    ow.delete(); exp_w.delete();
  endtask

  task automatic trigger(int b);
    bx = 12'(b); l1a = 1; @(negedge clk); l1a = 0;
  endtask

  initial begin
    int ev;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    ev = 0;
    // clean events, ready always high: also the rate check
    for (int e = 0; e < 10; e++) begin
      ev++;
      for (int c = 0; c < N; c++) load(c, ev, $urandom_range(1, 3), $urandom_range(0, 5), 8'h0, 16'h0);
      trigger(100 + e);
      check_event(ev, 100 + e, "clean");
      `CHECK(ev_cycles > 0, "event trailer seen")
    end
    begin
      int words;
      ev++;
      for (int c = 0; c < N; c++) load(c, ev, 2, 8, 8'h0, 16'h0);
      words = 2 + (N * 16 + 1) / 2;
      trigger(1);
      check_event(ev, 1, "rate");
      `CHECK(ev_cycles + 1 <= words + 3 * N + 10, $sformatf("event of %0d words in %0d clocks", words, ev_cycles + 1))
    end
    // back-pressure
    rand_ready = 1;
    for (int e = 0; e < 10; e++) begin
      ev++;
      for (int c = 0; c < N; c++) load(c, ev, $urandom_range(1, 3), $urandom_range(0, 5), 8'h0, 16'h0);
      trigger(200 + e);
      check_event(ev, 200 + e, "back-pressure");
    end
    rand_ready = 0;
    // event number mismatch on channel 2
    ev++;
    for (int c = 0; c < N; c++) load(c, c == 2 ? ev + 5 : ev, 1, 2, 8'h0, 16'h0);
    exp_w.push_back({6'd3, 5'd31, 13'h0, 8'(ev + 5)});
    trigger(5);
    check_event(ev, 5, "mismatch");
    `CHECK(n_mm == 1, "mismatch flagged to TTS")
    // trailer error flags on channel 0 and 3
    ev++;
    for (int c = 0; c < N; c++) load(c, ev, 1, 1, c == 0 ? 8'h80 : 8'h0, c == 3 ? 16'h8000 : 16'h0);
    trigger(6);
    check_event(ev, 6, "trailer error");
    // channel 1 silent: timeout
    ev++;
    for (int c = 0; c < N; c++) if (c != 1) load(c, ev, 1, 2, 8'h0, 16'h0);
    exp_w.push_back({6'd2, 5'd29, 21'h0});
    trigger(7);
    check_event(ev, 7, "timeout");
    `CHECK(n_to == 1, "timeout flagged to TTS")
    `CHECK(ev_cycles >= int'(timeout_cyc) && ev_cycles <= int'(timeout_cyc) + 40,
           $sformatf("timeout event took %0d clocks (timeout %0d)", ev_cycles, timeout_cyc))
    // flush: load data and L1As, flush, then all FIFOs must be empty
    for (int c = 0; c < N; c++) load(c, 99, 1, 3, 8'h0, 16'h0);
    exp_w.delete();
    rand_ready = 1;
    trigger(8); trigger(9);
    flush = 1; repeat (3) @(negedge clk);
    // wait until the tb FIFOs are drained
    repeat (40) @(negedge clk);
    flush = 0; rand_ready = 0;
    repeat (10) @(negedge clk);
    begin
      int left = 0;
      for (int c = 0; c < N; c++) left += q[c].size();
      `CHECK(left == 0 && l1a_empty, $sformatf("flush emptied the FIFOs (%0d words left)", left))
    end
    ow.delete();
    ec0 = 1; @(negedge clk); ec0 = 0;
    for (int c = 0; c < N; c++) load(c, 1, 1, 1, 8'h0, 16'h0);
    trigger(10);
    check_event(1, 10, "after ec0");
    `TB_END
  end
endmodule
