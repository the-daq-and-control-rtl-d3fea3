// Testbench for fed_tts_fsm: drives the almost-full, event summary, resync
// and FIFO-empty inputs through a directed sequence and then randomly, and
// compares state and TTS code every clock with a reference model written
// here. Directed part: BSY1 and BSY2 entry/exit, OOS after oos_n timeouts
// or mismatches in a row (not when interrupted by a good event), resync
// from OOS to BSY3 with flush until the FIFOs are empty.
`include "tb_check.svh"
module tb_fed_tts_fsm;
  import pix_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic l1a_afull = 0, pix_afull = 0, ev_done = 0, ev_timeout = 0, ev_mismatch = 0;
  logic resync = 0, fifos_empty = 1;
  logic [3:0] oos_n = 4'd3;
  tts_t tts;
  logic flush;
  logic [2:0] state_id;
  fed_tts_fsm dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; `TB_END end

  int m_st = 0, m_to = 0, m_mm = 0;
  int visits[5];
  always @(posedge clk) if (rst_n) begin
    int ns;
    bit hit;
    ns = m_st;
    hit = ev_done && ((ev_timeout && m_to + 1 >= oos_n) || (ev_mismatch && m_mm + 1 >= oos_n));
    if (ev_done) begin
      m_to = ev_timeout ? (m_to < 15 ? m_to + 1 : 15) : 0;
      m_mm = ev_mismatch ? (m_mm < 15 ? m_mm + 1 : 15) : 0;
    end
    if (resync) begin ns = 3; m_to = 0; m_mm = 0; end
    else if (hit && m_st != 3) ns = 4;
    else case (m_st)
      0: ns = l1a_afull ? 1 : pix_afull ? 2 : 0;
      1: ns = l1a_afull ? 1 : pix_afull ? 2 : 0;
      2: ns = l1a_afull ? 1 : pix_afull ? 2 : 0;
      3: ns = fifos_empty ? 0 : 3;
      default: ns = 4;
    endcase
    m_st = ns;
  end
  always @(negedge clk) if (rst_n) begin
    visits[state_id]++;
    `CHECK(int'(state_id) == m_st, $sformatf("state %0d expected %0d", state_id, m_st))
    `CHECK(tts == (m_st == 0 ? TTS_RDY : m_st == 4 ? TTS_OOS : TTS_BSY), "tts code")
    `CHECK(flush == (m_st == 3), "flush")
  end
  task automatic ev(logic t, logic m);
    ev_done = 1; ev_timeout = t; ev_mismatch = m; @(negedge clk);
    ev_done = 0; ev_timeout = 0; ev_mismatch = 0; @(negedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    `CHECK(tts == TTS_RDY, "RDY after reset")
    l1a_afull = 1; repeat (3) @(negedge clk); `CHECK(state_id == 1 && tts == TTS_BSY, "BSY1")
    l1a_afull = 0; @(negedge clk); `CHECK(state_id == 0, "back to RDY")
    pix_afull = 1; repeat (3) @(negedge clk); `CHECK(state_id == 2, "BSY2")
    pix_afull = 0; @(negedge clk);
    ev(1, 0); ev(1, 0); ev(0, 0); ev(1, 0); ev(1, 0);
    `CHECK(tts == TTS_RDY, "no OOS when the timeouts are not consecutive")
    ev(1, 0); `CHECK(tts == TTS_OOS, "OOS after three timeouts in a row")
    l1a_afull = 1; repeat (3) @(negedge clk); `CHECK(tts == TTS_OOS, "OOS is sticky")
    l1a_afull = 0;
    fifos_empty = 0; resync = 1; @(negedge clk); resync = 0;
    repeat (5) @(negedge clk); `CHECK(state_id == 3 && flush, "BSY3 flush during resync")
    fifos_empty = 1; repeat (2) @(negedge clk); `CHECK(tts == TTS_RDY, "RDY after resync")
    ev(0, 1); ev(0, 1); ev(0, 1); `CHECK(tts == TTS_OOS, "OOS after three mismatches")
    resync = 1; @(negedge clk); resync = 0; repeat (2) @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      l1a_afull = $urandom_range(0, 9) == 0; pix_afull = $urandom_range(0, 7) == 0;
      ev_done = $urandom_range(0, 3) == 0; ev_timeout = $urandom_range(0, 2) == 0;
      ev_mismatch = $urandom_range(0, 2) == 0; resync = $urandom_range(0, 60) == 0;
      fifos_empty = $urandom_range(0, 2) != 0; oos_n = 4'($urandom_range(1, 4));
      @(negedge clk);
    end
    foreach (visits[s]) `CHECK(visits[s] > 0, $sformatf("state %0d visited", s))
    `TB_END
  end
endmodule
