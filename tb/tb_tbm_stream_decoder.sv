// Testbench for tbm_stream_decoder. Nibble streams are built with the
// reference packet builder and fed with random gaps. The FIFO words are
// compared with the expected word list built independently here. Covered:
// good packets, a ROC count mismatch, a header not followed by a marker
// (discarded), truncation by max_hits and by FIFO level, a packet with no
// trailer (closed after TRL_WINDOW BX, checked against the window length),
// and a new header arriving before the trailer.
`include "tb_check.svh"
module tb_tbm_stream_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int TRLW = 400;
  logic clk = 0, rst_n = 0, ce40 = 1;
  logic in_valid = 0;
  logic [3:0] in_nib = 0;
  logic [4:0] n_rocs = 3;
  logic [9:0] fifo_level = 0, trunc_level = 10'd1000, max_hits = 10'd100;
  logic wr_en, pkt_done;
  logic [35:0] wr_data;
  pix_pkg::dec_err_t err;
  tbm_stream_decoder #(.ROC_WINDOW(200), .TRL_WINDOW(TRLW), .LVW(10)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; `TB_END end

  logic [35:0] got[$], exp_q[$];
  int n_done = 0, n_seq = 0, n_roc = 0, n_ovf = 0, n_notrl = 0;
  int bx = 0, done_bx = 0;
  always @(posedge clk) if (rst_n) begin
    bx++;
    if (wr_en) got.push_back(wr_data);
    if (pkt_done) begin n_done++; done_bx = bx; end
    if (err.seq_err) n_seq++;
    if (err.roc_count) n_roc++;
    if (err.overflow) n_ovf++;
    if (err.no_trailer) n_notrl++;
  end

  task automatic send(nib_q_t q, int gap_pct);
    foreach (q[i]) begin
      while ($urandom_range(0, 99) < gap_pct) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_nib = q[i]; @(negedge clk);
    end
    in_valid = 0;
  endtask

  // expected words of a packet; nhit_max limits the hits written
  function automatic void expect_packet(int ev, int field, int rocs, int hits, int status,
                                        logic [7:0] flags, int nhit_max);
    int taken = 0; bit tr = 0;
    exp_q.push_back({4'h1, 16'h0, 8'(ev), 8'(field)});
    for (int r = 1; r <= rocs; r++) begin
      if (!tr) exp_q.push_back({4'h2, 22'h0, 2'b00, 3'b0, 5'(r)});
      for (int k = 0; k < hits; k++) begin
        if (taken >= nhit_max) tr = 1;
        if (!tr) begin
          exp_q.push_back({4'h3, 3'b0, 5'(r),
                           ref_hit((r + k) % 26, (ev + 3 * k) % 160, (ev & 255) ^ (((r & 15) << 4) | (k & 15)))});
          taken++;
        end
      end
    end
    exp_q.push_back({4'h4, flags, 8'h00, 16'(status)});
  endfunction

  task automatic compare(string what);
    `CHECK(got.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", what, got.size(), exp_q.size()))
    for (int i = 0; i < got.size() && i < exp_q.size(); i++)
      `CHECK(got[i] == exp_q[i], $sformatf("%s word %0d: %h expected %h", what, i, got[i], exp_q[i]))
    got.delete(); exp_q.delete();
  endtask

  initial begin
    nib_q_t q;
    int ev;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    // good packets
    for (int p = 0; p < 20; p++) begin
      int h, st;
      q.delete(); ev = $urandom_range(0, 255); h = $urandom_range(0, 4); st = $urandom_range(0, 65535);
      push_packet(q, ev, p % 7, 3, h, st);
      send(q, 30);
      repeat (3) @(negedge clk);
      expect_packet(ev, p % 7, 3, h, st, 8'h00, 1000);
    end
    compare("good packets");
    `CHECK(n_done == 20 && n_seq == 0 && n_roc == 0 && n_ovf == 0, "good packets flagged no error")
    // ROC count mismatch
    q.delete(); push_packet(q, 5, 0, 2, 1, 16'h0002); send(q, 0); repeat (3) @(negedge clk);
    expect_packet(5, 0, 2, 1, 16'h0002, 8'h40, 1000);
    compare("roc count");
    `CHECK(n_roc == 1, "roc count error pulse")
    // header followed by a non-marker: discarded
    q.delete(); push12(q, 12'h7FC); push12(q, 12'h123); push12(q, 12'h456); push12(q, 12'h789);
    send(q, 0); repeat (3) @(negedge clk);
    `CHECK(got.size() == 0, "bad header discarded")
    `CHECK(n_seq == 1, "sequence error pulse")
    // truncation by max_hits
    max_hits = 10'd4;
    q.delete(); push_packet(q, 9, 1, 3, 3, 16'h0011); send(q, 10); repeat (3) @(negedge clk);
    expect_packet(9, 1, 3, 3, 16'h0011, 8'h80, 4);
    compare("max_hits truncation");
    `CHECK(n_ovf == 1, "overflow pulse")
    max_hits = 10'd100;
    // truncation by FIFO level
    fifo_level = 10'd500; trunc_level = 10'd500;
    q.delete(); push_packet(q, 10, 1, 3, 2, 16'h0000); send(q, 10); repeat (3) @(negedge clk);
    expect_packet(10, 1, 3, 2, 16'h0000, 8'h80, 0);
    compare("fifo level truncation");
    fifo_level = 0; trunc_level = 10'd1000;
    // missing trailer: closed TRLW BX after the header
    q.delete(); push_packet(q, 11, 0, 3, 1, 0);
    q = q[0 : q.size() - 8];
    begin
      int t0;
      t0 = bx;
      send(q, 0);
      repeat (TRLW + 10) @(negedge clk);
      `CHECK(done_bx - t0 >= TRLW && done_bx - t0 <= TRLW + 10,
             $sformatf("no-trailer close after %0d BX (window %0d)", done_bx - t0, TRLW))
    end
    expect_packet(11, 0, 3, 1, 0, 8'h10, 1000);
    exp_q[exp_q.size() - 1] = {4'h4, 8'h10, 24'h0};
    compare("missing trailer");
    `CHECK(n_notrl == 1, "no-trailer pulse")
    // new header before the trailer, then a good packet
    q.delete(); push_packet(q, 12, 0, 3, 1, 0); q = q[0 : q.size() - 8];
    push_packet(q, 13, 1, 3, 1, 16'h0003);
    send(q, 20); repeat (3) @(negedge clk);
    expect_packet(12, 0, 3, 1, 0, 8'h30, 1000);
    exp_q[exp_q.size() - 1] = {4'h4, 8'h30, 24'h0};
    expect_packet(13, 1, 3, 1, 16'h0003, 8'h00, 1000);
    compare("header before trailer");
    `TB_END
  end
endmodule
