// End-to-end testbench of pixel_daq_top at its default (full) size: 24 FED
// fibers / 48 TBM FIFOs, 512-word FIFOs, 8 Pixel FEC channels with 16 kB
// FIFOs, 4 control rings. No parameter is overridden.
//
// Set-up: the testbench sends TTC (L1A on channel A, short broadcast
// commands on channel B). The Pixel FEC turns L1As and resets into the
// module clock of the TBM, whose two cores read two behavioural ROC groups
// (8 ROCs, 2 hits each per event). The TBM link goes to FED fiber 0; the
// other 23 fibers carry copies of it with different skews (0..39 samples),
// so all 48 FED channels see real TBM data and every fiber must find its
// own sampling phase and symbol boundary. Pixel FEC channel 0 has a module
// model that echoes the hub/port byte; channel 1 has none. Every control
// ring path has a behavioural CCU ring; ring 1 path A can be broken.
//
// An S-Link monitor parses every event (header, hit words, error words,
// trailer length, event number sequence) and, in the clean phases, checks
// 768 hits per event and no error word. Phases: emulation mode events;
// mode switch to detector data (with global resync and TBM reset); clean
// detector events; truncation (max_hits); back-pressure until BSY; timeouts
// until OOS and recovery by resync; FEC programming started by the TTC Send
// Data command (done on channel 0, 100-BX timeout on channel 1); ROC reset;
// TTC event FIFO readout; control ring commands, a broken ring A and
// recovery through ring B. Each mechanism is counted; the test fails if
// any count is zero.
`include "tb_check.svh"
module tb_pixel_daq_top;
  import tb_ref_pkg::*;
  import pix_pkg::*;
  int checks = 0, failures = 0;
  localparam int NF = 24, NC = 8, NR = 4;

  logic clk = 0, rst_n = 0;
  logic [1:0] ttc_ab = 2'b01;
  logic ce40;
  logic roc_reset;
  logic [1:0] roc_token_out, roc_token_in, roc_valid;
  logic [1:0][3:0] roc_nib;
  logic [9:0] tbm_link;
  logic [NF-1:1][39:0] fiber_in = '0;
  logic fed_emu_en = 1;
  logic [3:0] fed_emu_hits = 4'd2;
  logic [4:0] fed_n_rocs = 5'd8;
  logic [9:0] fed_trunc_level = 10'd400;
  logic [9:0] fed_max_hits = 10'd200;
  logic [15:0] fed_timeout_cyc = 16'd3000;
  logic [8:0] fed_l1a_afull_thr = 9'd200;
  logic [9:0] fed_pix_afull_thr = 10'd450;
  logic [3:0] fed_oos_n = 4'd3;
  logic slink_valid, slink_ready = 1;
  logic [63:0] slink_data;
  logic slink_ctrl;
  tts_t tts;
  logic [2:0] tts_state;
  logic [NF-1:0] fed_locked;
  logic [2*NF-1:0][3:0][15:0] fed_err_cnt;
  logic [NF-1:0][15:0] fed_sym_err_cnt;
  logic [23:0] fed_ev_count;
  logic fec_reg_l1a = 0, fec_reg_roc_reset = 0, fec_reg_tbm_reset = 0;
  logic [3:0][31:0] fec_cmd_cnt;
  logic fec_evt_rd = 0;
  logic [23:0] fec_evt_q;
  logic fec_evt_empty;
  logic [NC-1:0] fec_fifo_wr = 0, fec_send = 0, fec_send_mask = 0;
  logic [NC-1:0][7:0] fec_fifo_data = 0;
  logic [NC-1:0][4:0] fec_hub = 0;
  logic [NC-1:0][2:0] fec_port = 0;
  logic [NC-1:0][13:0] fec_nbytes = 0;
  logic [NC-1:0][9:0] fec_tx;
  logic [NC-1:0] fec_rx_bit = 0, fec_done, fec_timeout, fec_rx_err;
  logic tbm_bad_cmd;
  logic [NR-1:0] ring_sel_b = 0, ring_cmd_valid = 0, ring_cmd_read = 0;
  logic [NR-1:0][7:0] ring_cmd_addr = 0, ring_cmd_reg = 0, ring_cmd_data = 0;
  logic [NR-1:0] ring_cmd_ready, ring_cmd_done, ring_cmd_ok;
  logic [NR-1:0][7:0] ring_rd_data;
  logic [NR-1:0] ring_tx_a, ring_tx_b, ring_rx_a, ring_rx_b, ring_ok;
  logic [NR-1:0] ring_broken_a = 0;

  pixel_daq_top dut (.*);

  always #3.125 clk = ~clk;   // 160 MHz
  initial begin #50ms; $display("FAIL watchdog"); failures++; `TB_END end

  // ---------------- sensor module: two ROC groups ----------------
  int roc_hits = 2;
  for (genvar c = 0; c < 2; c++) begin : g_roc
    roc_group_model #(.N_ROCS(8)) u (.clk, .ce40, .token_in(roc_token_out[c]), .hits(roc_hits),
      .gap_every(c == 0 ? 0 : 9), .hold_token(1'b0), .token_out(roc_token_in[c]),
      .valid(roc_valid[c]), .nib(roc_nib[c]));
  end

  // ---------------- fibers 1..23: skewed copies of the TBM link ----------------
  logic [79:0] samp_hist = '0;
  always @(posedge clk) if (ce40) begin
    logic [39:0] s;
    logic [79:0] h;
    for (int j = 0; j < 10; j++) s[4 * j +: 4] = {4{tbm_link[j]}};
    h = {samp_hist[39:0], s};
    samp_hist <= h;
    for (int f = 1; f < NF; f++) fiber_in[f] <= h[79 - ((f * 7) % 40) -: 40];
  end

  // ---------------- control rings ----------------
  for (genvar r = 0; r < NR; r++) begin : g_ring
    ccu_ring_model #(.DELAY(50 + 10 * r), .N_CCU(4)) ra (.clk, .broken(ring_broken_a[r]),
      .din(ring_tx_a[r]), .dout(ring_rx_a[r]));
    ccu_ring_model #(.DELAY(80 + 10 * r), .N_CCU(4)) rb (.clk, .broken(1'b0),
      .din(ring_tx_b[r]), .dout(ring_rx_b[r]));
  end

  // ---------------- Pixel FEC channel 0 module model ----------------
  int fec_answered = 0;
  initial begin
    forever begin
      @(posedge clk iff ce40);
      if (fec_tx[0] == 10'b0011110010 || fec_tx[0] == 10'b1100001101) begin   // K28.4
        repeat (20) @(posedge clk iff ce40);
        for (int i = 0; i < 16; i++) begin
          fec_rx_bit[0] <= (i < 8) ? 1'b1 : ({fec_hub[0], fec_port[0]} >> (15 - i)) & 1;
          @(posedge clk iff ce40);
        end
        fec_rx_bit[0] <= 1'b0;
        fec_answered++;
      end
    end
  end

  // ---------------- TTC driver ----------------
  logic b_q[$];
  int l1a_req = 0;
  int bxn = 0;
  always @(posedge clk) if (ce40) begin
    bxn++;
    ttc_ab[1] <= l1a_req > 0;
    if (l1a_req > 0) l1a_req--;
    ttc_ab[0] <= (b_q.size() > 0) ? b_q.pop_front() : 1'b1;
  end
  task automatic ttc_cmd(logic [7:0] c);
    logic [15:0] f;
    f = ttc_frame(c);
    for (int i = 15; i >= 0; i--) b_q.push_back(f[i]);
    repeat (4) b_q.push_back(1'b1);
    while (b_q.size() > 0) @(posedge clk iff ce40);
    repeat (4) @(posedge clk iff ce40);
  endtask
  task automatic wait_bx(int n);
    repeat (n) @(posedge clk iff ce40);
  endtask
  task automatic l1a(int spacing);
    l1a_req = 1;
    wait_bx(spacing);
  endtask

  // ---------------- S-Link monitor ----------------
  int in_ev = 0, ev_words = 0, ev_hits = 0, ev_err[32];
  int last_ev = 0, n_events = 0;
  bit clean = 1;
  int expect_hits = 768;
  int m_events_emu = 0, m_events_real = 0, m_trunc = 0, m_to_words = 0, m_mm_words = 0;
  int m_bsy = 0, m_oos = 0, m_resync = 0;
  bit phase_emu = 1;
  always @(posedge clk) if (rst_n && slink_valid && slink_ready) begin
    logic [63:0] w;
    w = slink_data;
    if (!in_ev) begin
      `CHECK(slink_ctrl && w[63:56] == 8'h51, $sformatf("event header expected, got %h", w))
      in_ev = 1; ev_words = 1; ev_hits = 0;
      foreach (ev_err[i]) ev_err[i] = 0;
      if (clean) `CHECK(int'(w[55:32]) == last_ev + 1, $sformatf("event number %0d after %0d", w[55:32], last_ev))
      last_ev = int'(w[55:32]);
    end else begin
      ev_words++;
      if (slink_ctrl) begin
        `CHECK(w[63:56] == 8'hA0, "trailer word")
        in_ev = 0; n_events++;
        `CHECK(int'(w[55:32]) == ev_words, $sformatf("event length %0d, counted %0d", w[55:32], ev_words))
        if (clean) begin
          `CHECK(ev_hits == expect_hits, $sformatf("event %0d: %0d hits, expected %0d", last_ev, ev_hits, expect_hits))
          `CHECK(ev_err[29] + ev_err[30] + ev_err[31] == 0, $sformatf("event %0d has error words", last_ev))
          if (phase_emu) m_events_emu++; else m_events_real++;
        end
        if (ev_err[30] > 0) m_trunc++;
        m_to_words += ev_err[29];
        m_mm_words += ev_err[31];
      end else begin
        for (int k = 0; k < 2; k++) begin
          logic [31:0] x;
          x = k ? w[31:0] : w[63:32];
          if (x != 0) begin
            `CHECK(x[31:26] >= 1 && x[31:26] <= 48, $sformatf("link number %0d", x[31:26]))
            if (x[25:21] >= 29) ev_err[x[25:21]]++;
            else begin
              ev_hits++;
              `CHECK(x[25:21] >= 1 && x[25:21] <= 8 && x[20:16] < 26 && x[15:8] < 160, "hit fields in range")
            end
          end
        end
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (tts == TTS_BSY && tts_state inside {3'd1, 3'd2}) m_bsy++;
    if (tts == TTS_OOS) m_oos++;
    if (tts_state == 3'd3) m_resync++;
  end
  int m_roc_reset = 0, m_fec_done = 0, m_fec_to = 0;
  always @(posedge clk) if (rst_n && ce40) begin
    if (roc_reset) m_roc_reset++;
    if (fec_done[0]) m_fec_done++;
    if (fec_timeout[1]) m_fec_to++;
  end

  task automatic wait_events(int n, int limit_bx);
    int t = 0;
    while (n_events < n && t < limit_bx) begin wait_bx(1); t++; end
    `CHECK(n_events >= n, $sformatf("%0d events received, expected %0d", n_events, n))
  endtask

  task automatic ring_cmd(int r, logic rd, logic [7:0] a, logic [7:0] g, logic [7:0] d,
                          output logic ok, output logic [7:0] q);
    int t = 0;
    while (!ring_cmd_ready[r] && t < 20000) begin @(posedge clk); t++; end
    @(negedge clk);
    ring_cmd_valid[r] = 1; ring_cmd_read[r] = rd; ring_cmd_addr[r] = a; ring_cmd_reg[r] = g; ring_cmd_data[r] = d;
    @(negedge clk); ring_cmd_valid[r] = 0;
    t = 0;
    while (!ring_cmd_done[r] && t < 20000) begin @(negedge clk); t++; end
    ok = ring_cmd_ok[r]; q = ring_rd_data[r];
  endtask

  int m_emu_switch = 0, m_ring_ok = 0, m_ring_fail = 0, m_ring_b = 0, m_evt_fifo = 0, m_lock = 0;
  initial begin
    logic ok; logic [7:0] q;
    repeat (10) @(posedge clk); rst_n = 1;
    wait_bx(10);
    ttc_cmd(TTC_BC0);
    // ---- phase 1: emulation mode ----
    wait_bx(100);
    for (int e = 0; e < 6; e++) l1a(400);
    wait_events(6, 4000);
    // ---- phase 2: switch to detector data ----
    wait_bx(1500);
    `CHECK(&fed_locked, $sformatf("all fibers locked (%b)", fed_locked))
    if (&fed_locked) m_lock++;
    fed_emu_en = 0; m_emu_switch++; phase_emu = 0;
    ttc_cmd(TTC_RESYNC);
    ttc_cmd(TTC_TBM_RST);
    wait_bx(200);
    `CHECK(tts == TTS_RDY, "ready after resync")
    last_ev = 0;
    for (int e = 0; e < 8; e++) l1a(400);
    wait_events(14, 4000);
    `CHECK(fed_ev_count == 24'd8, $sformatf("FED event counter %0d", fed_ev_count))
    // ---- phase 3: truncation ----
    clean = 0;
    fed_max_hits = 10'd5;
    l1a(400); l1a(400);
    wait_events(16, 4000);
    `CHECK(m_trunc == 2, $sformatf("%0d truncated events", m_trunc))
    fed_max_hits = 10'd200;
    last_ev = 10;
    clean = 1;
    // ---- phase 4: back-pressure -> BSY ----
    fed_l1a_afull_thr = 9'd6;
    slink_ready = 0;
    for (int e = 0; e < 8; e++) l1a(150);
    `CHECK(tts == TTS_BSY, "BSY while the S-Link is stopped")
    wait_bx(1500);
    slink_ready = 1;
    wait_events(24, 6000);
    wait_bx(50);
    `CHECK(tts == TTS_RDY, "ready after the S-Link resumed")
    fed_l1a_afull_thr = 9'd200;
    // ---- phase 5: channel timeouts -> OOS, recovery by resync ----
    clean = 0;
    fed_timeout_cyc = 16'd8;
    for (int e = 0; e < 4; e++) l1a(400);
    wait_bx(2000);
    `CHECK(tts == TTS_OOS, "out of sync after repeated timeouts")
    fed_timeout_cyc = 16'd3000;
    ttc_cmd(TTC_RESYNC);
    ttc_cmd(TTC_TBM_RST);
    wait_bx(300);
    `CHECK(tts == TTS_RDY, "ready after the resync")
    last_ev = 0; clean = 1;
    begin
      int n0; n0 = n_events;
      for (int e = 0; e < 3; e++) l1a(400);
      wait_events(n0 + 3, 4000);
    end
    // ---- phase 6: Pixel FEC programming via TTC Send Data ----
    @(negedge clk);
    fec_hub[0] = 5'd5; fec_port[0] = 3'd2; fec_nbytes[0] = 14'd20;
    fec_hub[1] = 5'd9; fec_port[1] = 3'd1; fec_nbytes[1] = 14'd20;
    for (int i = 0; i < 20; i++) begin
      fec_fifo_wr = 2'b11; fec_fifo_data[0] = 8'(i); fec_fifo_data[1] = 8'(100 + i); @(negedge clk);
    end
    fec_fifo_wr = 0;
    fec_send_mask = 8'b0000_0011;
    ttc_cmd(TTC_SEND_DATA);
    wait_bx(300);
    `CHECK(m_fec_done == 1 && fec_answered == 1, "FEC channel 0 programmed and echoed")
    `CHECK(m_fec_to == 1, "FEC channel 1 timed out")
    // ---- ROC reset and FEC command counters ----
    ttc_cmd(TTC_ROC_RST);
    wait_bx(20);
    `CHECK(m_roc_reset == 1, "ROC reset reached the module")
    `CHECK(fec_cmd_cnt[0] == 1 && fec_cmd_cnt[1] == 2 && fec_cmd_cnt[3] == 2,
           $sformatf("FEC command counters %0d %0d %0d %0d", fec_cmd_cnt[0], fec_cmd_cnt[1], fec_cmd_cnt[2], fec_cmd_cnt[3]))
    // ---- TTC event FIFO ----
    begin
      int nl = 0, nc = 0;
      while (!fec_evt_empty) begin
        if (fec_evt_q[11]) nl++;
        if (fec_evt_q[10]) nc++;
        @(negedge clk); fec_evt_rd = 1; @(negedge clk); fec_evt_rd = 0;
      end
      `CHECK(nl == 31, $sformatf("%0d L1As in the TTC event FIFO", nl))
      `CHECK(nc == 7, $sformatf("%0d commands in the TTC event FIFO", nc))
      if (nl > 0) m_evt_fifo++;
    end
    // ---- control rings ----
    for (int r = 0; r < NR; r++) begin
      ring_cmd(r, 0, 8'd1 + 8'(r), 8'd4, 8'h30 + 8'(r), ok, q);
      `CHECK(ok, $sformatf("ring %0d write", r))
      ring_cmd(r, 1, 8'd1 + 8'(r), 8'd4, 8'h00, ok, q);
      `CHECK(ok && q == 8'h30 + 8'(r), $sformatf("ring %0d read back %h", r, q))
      if (ok) m_ring_ok++;
    end
    ring_broken_a[1] = 1;
    ring_cmd(1, 0, 8'd2, 8'd1, 8'h11, ok, q);
    `CHECK(!ok && !ring_ok[1], "broken ring A detected by the token check")
    if (!ok) m_ring_fail++;
    ring_sel_b[1] = 1;
    ring_cmd(1, 0, 8'd2, 8'd1, 8'h22, ok, q);
    ring_cmd(1, 1, 8'd2, 8'd1, 8'h00, ok, q);
    `CHECK(ok && q == 8'h22 && ring_ok[1], "ring B bypass works")
    if (ok) m_ring_b++;
    // ---- mechanism summary ----
    $display("mechanisms: emu_events=%0d mode_switch=%0d real_events=%0d fibers_locked=%0d truncated=%0d bsy=%0d oos=%0d resync=%0d timeout_words=%0d mismatch_words=%0d fec_done=%0d fec_timeout=%0d roc_reset=%0d ttc_evt_fifo=%0d ring_ok=%0d ring_fail=%0d ring_b=%0d",
             m_events_emu, m_emu_switch, m_events_real, m_lock, m_trunc, m_bsy, m_oos, m_resync,
             m_to_words, m_mm_words, m_fec_done, m_fec_to, m_roc_reset, m_evt_fifo, m_ring_ok, m_ring_fail, m_ring_b);
    `CHECK(m_events_emu > 0, "mechanism: emulation-mode events")
    `CHECK(m_emu_switch > 0, "mechanism: mode switch")
    `CHECK(m_events_real > 0, "mechanism: detector events")
    `CHECK(m_lock > 0, "mechanism: phase finding and link lock")
    `CHECK(m_trunc > 0, "mechanism: truncation")
    `CHECK(m_bsy > 0, "mechanism: BSY")
    `CHECK(m_oos > 0, "mechanism: OOS")
    `CHECK(m_resync > 0, "mechanism: resync flush")
    `CHECK(m_to_words > 0, "mechanism: timeout error words")
    `CHECK(m_fec_done > 0, "mechanism: FEC programming")
    `CHECK(m_fec_to > 0, "mechanism: FEC 100-BX timeout")
    `CHECK(m_roc_reset > 0, "mechanism: ROC reset")
    `CHECK(m_evt_fifo > 0, "mechanism: TTC event FIFO")
    `CHECK(m_ring_ok > 0, "mechanism: ring commands")
    `CHECK(m_ring_fail > 0, "mechanism: ring failure detection")
    `CHECK(m_ring_b > 0, "mechanism: ring B bypass")
    `TB_END
  end
endmodule
