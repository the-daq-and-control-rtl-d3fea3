// Testbench for fed_decode_channel (one FED fiber). The testbench builds
// two TBM core packet streams, merges them into a 4b/5b + NRZI link (its own
// tables), oversamples each bit four times with a skew of 3 samples, and
// reads both TBM FIFOs, comparing every word with the expected FIFO words.
// Then: a packet with the wrong ROC count (ROC-count error counter), an
// invalid symbol on the line (symbol error counter), emulation mode (the
// internal emulator's packets appear in the FIFOs with the configured
// number of hits) and counter clear.
`include "tb_check.svh"
module tb_fed_decode_channel;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ce40 = 0;
  logic [39:0] samples = '0;
  logic emu_en = 0, emu_trig = 0, emu_ec0 = 0, cnt_clr = 0;
  logic [3:0] emu_hits = 4'd1;
  logic [4:0] n_rocs = 5'd3;
  logic [9:0] trunc_level = 10'd400, max_hits = 10'd100;
  logic [1:0] rd_en = 0;
  logic [1:0][35:0] rd_data;
  logic [1:0] empty;
  logic [1:0][9:0] level;
  logic locked;
  logic [1:0][3:0][15:0] err_cnt;
  logic [15:0] sym_err_cnt;
  fed_decode_channel #(.FIFO_DEPTH(512), .N_ROCS_EMU(8)) dut (.*);
  always #5 clk = ~clk;
  int ph = 0;
  always @(posedge clk) begin ph = (ph + 1) % 4; ce40 <= (ph == 3); end
  initial begin #50000000; failures++; `TB_END end

  // line generator
  logic [3:0] qa[$], qb[$];
  logic lvl = 0, bad_sym = 0;
  logic [79:0] hist = '0;
  always @(posedge clk) if (ce40) begin
    logic [9:0] raw; logic [39:0] s; logic [79:0] h;
    raw[9:5] = qa.size() ? ref_5b(qa.pop_front()) : 5'b11111;
    raw[4:0] = qb.size() ? ref_5b(qb.pop_front()) : 5'b11000;
    if (bad_sym) raw[9:5] = 5'b00000;
    for (int j = 9; j >= 0; j--) begin lvl = lvl ^ raw[j]; s[4 * j +: 4] = {4{lvl}}; end
    h = {hist[39:0], s};
    hist <= h;
    samples <= h[79 - 3 -: 40];
  end

  // FIFO reader
  logic [35:0] got[2][$];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (rd_en[c]) got[c].push_back(rd_data[c]);
    rd_en <= ~empty & ~rd_en;
  end

  logic [35:0] exp_w[2][$];
  task automatic packet(int c, int ev, int rocs, int hits);
    nib_q_t q;
    push_packet(q, ev, 0, rocs, hits, 16'h0004);
    foreach (q[i]) if (c == 0) qa.push_back(q[i]); else qb.push_back(q[i]);
    exp_w[c].push_back({4'h1, 16'h0, 8'(ev), 8'h0});
    for (int r = 1; r <= rocs; r++) begin
      exp_w[c].push_back({4'h2, 22'h0, 2'b00, 3'b0, 5'(r)});
      for (int k = 0; k < hits; k++)
        exp_w[c].push_back({4'h3, 3'b0, 5'(r),
          ref_hit((r + k) % 26, (ev + 3 * k) % 160, (ev & 255) ^ (((r & 15) << 4) | (k & 15)))});
    end
    exp_w[c].push_back({4'h4, (rocs != int'(n_rocs)) ? 8'h40 : 8'h00, 8'h0, 16'h0004});
  endtask
  task automatic compare(string what);
    for (int c = 0; c < 2; c++) begin
      `CHECK(got[c].size() == exp_w[c].size(), $sformatf("%s core %0d: %0d words, expected %0d", what, c, got[c].size(), exp_w[c].size()))
      for (int i = 0; i < got[c].size() && i < exp_w[c].size(); i++)
        `CHECK(got[c][i] == exp_w[c][i], $sformatf("%s core %0d word %0d: %h expected %h", what, c, i, got[c][i], exp_w[c][i]))
      got[c].delete(); exp_w[c].delete();
    end
  endtask

  initial begin
    repeat (8) @(posedge clk); rst_n = 1;
    repeat (800 * 4) @(posedge clk);       // two phase windows, then lock
    `CHECK(locked, "link locked")
    for (int e = 1; e <= 5; e++) begin
      packet(0, e, 3, $urandom_range(0, 4));
      packet(1, e, 3, $urandom_range(0, 4));
    end
    repeat (600 * 4) @(posedge clk);
    compare("fiber packets");
    `CHECK(err_cnt == '0 && sym_err_cnt == 0, "no errors counted")
    packet(0, 6, 2, 1);
    repeat (200 * 4) @(posedge clk);
    compare("roc count packet");
    `CHECK(err_cnt[0][1] == 1, "ROC count error counted")
    @(posedge clk iff ce40); bad_sym <= 1; @(posedge clk iff ce40); bad_sym <= 0;
    repeat (20 * 4) @(posedge clk);
    `CHECK(sym_err_cnt >= 1, "symbol error counted")
    // emulation mode
    emu_en = 1; emu_hits = 4'd2; n_rocs = 5'd8;
    @(posedge clk iff ce40); emu_trig <= 1; @(posedge clk iff ce40); emu_trig <= 0;
    repeat (400 * 4) @(posedge clk);
    for (int c = 0; c < 2; c++) begin
      int nh, nr;
      nh = 0; nr = 0;
      foreach (got[c][i]) begin
        if (got[c][i][35:32] == 4'h3) nh++;
        if (got[c][i][35:32] == 4'h2) nr++;
      end
      `CHECK(got[c].size() > 0 && got[c][0][35:32] == 4'h1 && got[c][got[c].size() - 1][35:32] == 4'h4, "emulated packet framed")
      `CHECK(nr == 8 && nh == 16, $sformatf("emulated core %0d: %0d ROC headers %0d hits", c, nr, nh))
      `CHECK(got[c].size() > 0 && got[c][got[c].size() - 1][31:24] == 8'h00, "emulated packet has no error")
      got[c].delete();
    end
    cnt_clr = 1; @(posedge clk); cnt_clr = 0; @(posedge clk);
    `CHECK(err_cnt == '0 && sym_err_cnt == 0, "counters cleared")
    `TB_END
  end
endmodule
