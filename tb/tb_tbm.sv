// Testbench for the tbm (TBM08) with two behavioural ROC groups. The
// testbench encodes module-clock commands itself (start BX '00', then three
// code BX where a '1' is a suppressed high phase), decodes the 400 Mb/s
// link with its own NRZI and 4b/5b tables, splits the core A and core B
// streams and compares every packet with the reference packet of the
// event (event number, ROC headers, hits). Covers single triggers, a burst
// of triggers queued in the L1A stacks, ROC reset forwarding, TBM reset
// (event counter restarts) and a bad command.
`include "tb_check.svh"
module tb_tbm;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0, ce40 = 0;
  logic [1:0] mclk_pat = 2'b10;
  logic roc_reset, bad_cmd;
  logic [1:0] token_out, token_in, roc_valid;
  logic [1:0][3:0] roc_nib;
  logic [9:0] link;
  int hits = 2;
  tbm dut (.*);
  for (genvar c = 0; c < 2; c++) begin : g_roc
    roc_group_model #(.N_ROCS(NR)) u (.clk, .ce40, .token_in(token_out[c]), .hits(hits),
      .gap_every(c == 0 ? 0 : 5), .hold_token(1'b0), .token_out(token_in[c]),
      .valid(roc_valid[c]), .nib(roc_nib[c]));
  end
  always #5 clk = ~clk;
  int ph = 0;
  always @(posedge clk) begin ph = (ph + 1) % 4; ce40 <= (ph == 3); end
  initial begin #20000000; failures++; `TB_END end

  // link decode (one BX = one ce40 clock)
  logic lvl = 0;
  logic [3:0] sa[$], sb[$];
  int n_rr = 0, n_bad = 0;
  always @(posedge clk) if (rst_n && ce40) begin
    logic [9:0] d; int x, y;
    for (int j = 9; j >= 0; j--) begin d[j] = link[j] ^ lvl; lvl = link[j]; end
    x = ref_4b(d[9:5]); y = ref_4b(d[4:0]);
    if (x >= 0) sa.push_back(4'(x));
    if (y >= 0) sb.push_back(4'(y));
    if (roc_reset) n_rr++;
    if (bad_cmd) n_bad++;
  end

  task automatic bxs(logic [1:0] p);
    mclk_pat = p;
    @(posedge clk iff ce40);
  endtask
  task automatic mcmd(logic [2:0] code);
    bxs(2'b00);
    for (int i = 2; i >= 0; i--) bxs(code[i] ? 2'b00 : 2'b10);
    bxs(2'b10);
  endtask

  // extract packets from a nibble stream and compare
  task automatic check_stream(ref logic [3:0] s[$], input int ev0, input int nev, string core);
    int i = 0, ev = ev0;
    int got = 0;
    while (i + 3 <= s.size()) begin
      if ({s[i], s[i + 1], s[i + 2]} == 12'h7FC) begin
        nib_q_t e;
        int evn, fld, st, len;
        evn = {s[i + 3], s[i + 4]}; fld = {s[i + 5], s[i + 6]};
        push_packet(e, ev, fld, NR, hits, 0);
        len = e.size();
        st = {s[i + len - 4], s[i + len - 3], s[i + len - 2], s[i + len - 1]};
        e.delete(); push_packet(e, ev, fld, NR, hits, st);
        `CHECK(evn == (ev & 255), $sformatf("%s event %0d expected %0d", core, evn, ev))
        for (int k = 0; k < len; k++) `CHECK(s[i + k] == e[k], $sformatf("%s ev %0d nibble %0d", core, ev, k))
        `CHECK(st[15:14] == 0, $sformatf("%s trailer status %h", core, st))
        i += len; ev++; got++;
      end else i++;
    end
    `CHECK(got == nev, $sformatf("%s: %0d packets, expected %0d", core, got, nev))
    s.delete();
  endtask

  initial begin
    repeat (8) @(posedge clk); rst_n = 1;
    repeat (10) bxs(2'b10);
    for (int e = 0; e < 5; e++) begin
      mcmd(3'b100);
      repeat (400) bxs(2'b10);
    end
    check_stream(sa, 1, 5, "core A");
    check_stream(sb, 1, 5, "core B");
    // burst of four triggers
    hits = 3;
    repeat (4) mcmd(3'b100);
    repeat (1500) bxs(2'b10);
    check_stream(sa, 6, 4, "core A burst");
    check_stream(sb, 6, 4, "core B burst");
    mcmd(3'b110);
    repeat (5) bxs(2'b10);
    `CHECK(n_rr == 1, "ROC reset forwarded")
    mcmd(3'b111);
    repeat (5) bxs(2'b10);
    `CHECK(n_bad == 1, "bad command flagged")
    // TBM reset restarts the event counter (the ROC models keep counting,
    // so compare only the TBM event numbers here)
    mcmd(3'b101);
    repeat (5) bxs(2'b10);
    sa.delete(); sb.delete();
    hits = 1;
    mcmd(3'b100);
    repeat (400) bxs(2'b10);
    `CHECK(sa.size() > 7 && {sa[3], sa[4]} == 8'd1, "event number 1 after TBM reset")
    `TB_END
  end
endmodule
