// pixel_fed: Phase-1 pixel FED firmware (DECODE + BUILD).
//
// N_FIBERS optical inputs, each carrying one 400 Mb/s TBM link with two TBM
// core streams, i.e. 2*N_FIBERS TBM FIFOs (48 for 24 fibers). Each input is
// handled by fed_decode_channel (sampling phase finding, NRZI/4b5b decoding,
// packet checks, truncation, TBM FIFOs, error counters). The BUILD part is
// fed_readout (L1A FIFO, parallel draining, event building, S-Link output)
// and fed_tts_fsm (RDY/BSY/OOS back-pressure towards the trigger system).
// TTC arrives as two bits per BX (ttc_ab) and is decoded by ttc_decoder:
// L1A, BC0 (clears the BX counter), EC0 (clears the event counter), global
// resync (flush + EC0) and private resync (flush only).
// Timing: one clock clk (160 MHz in the intended use) with a BX enable ce40
// every fourth clock; decoding runs on ce40, the BUILD side and the FIFO
// read ports on every clock. The 64-bit S-Link port then carries up to
// 10.24 Gb/s. Configuration registers are plain input ports here (their
// Ethernet/IPBus access is not part of this design). With emu_en the FED
// generates its own data (fixed-size emulation) and runs without a detector.
module pixel_fed
  import pix_pkg::*;
#(
  parameter int N_FIBERS   = 24,
  parameter int FIFO_DEPTH = 512,
  parameter int L1A_DEPTH  = 256,
  localparam int N_CH = 2 * N_FIBERS,
  localparam int LVW  = $clog2(FIFO_DEPTH) + 1,
  localparam int LAW  = $clog2(L1A_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic [N_FIBERS-1:0][39:0] fiber,
  input  logic [1:0]  ttc_ab,
  // configuration
  input  logic        emu_en,
  input  logic [3:0]  emu_hits,
  input  logic [4:0]  n_rocs,
  input  logic [LVW-1:0] trunc_level,
  input  logic [9:0]  max_hits,
  input  logic [15:0] timeout_cyc,
  input  logic [LAW-1:0] l1a_afull_thr,
  input  logic [LVW-1:0] pix_afull_thr,
  input  logic [3:0]  oos_n,
  input  logic        cnt_clr,
  // S-Link Express
  output logic        slink_valid,
  output logic [63:0] slink_data,
  output logic        slink_ctrl,
  input  logic        slink_ready,
  // TTS and status
  output tts_t        tts,
  output logic [2:0]  tts_state,
  output logic [N_FIBERS-1:0] locked,
  output logic [N_CH-1:0][3:0][15:0] err_cnt,
  output logic [N_FIBERS-1:0][15:0]  sym_err_cnt,
  output logic [23:0] ev_count,
  output logic        ev_done
);
  logic l1a, cmd_valid, ham_err, corrected;
  logic [7:0] cmd;
  logic [11:0] bx;
  logic resync, ec0, flush;
  logic [N_CH-1:0] ch_empty, ch_rd;
  logic [N_CH-1:0][35:0] ch_data;
  logic [N_CH-1:0][LVW-1:0] ch_level;
  logic [LAW-1:0] l1a_level;
  logic l1a_empty, ev_to, ev_mm, pix_afull;

  ttc_decoder u_ttc (
    .clk, .rst_n, .ce40, .ttc_ab, .l1a, .cmd_valid, .cmd, .ham_err, .corrected
  );

  // one-clock command pulses
  assign resync = ce40 && cmd_valid && (cmd == TTC_RESYNC || cmd == TTC_RESYNC_PRV);
  assign ec0    = ce40 && cmd_valid && (cmd == TTC_RESYNC || cmd == TTC_EC0);

  always_ff @(posedge clk) begin
    if (!rst_n) bx <= '0;
    else if (ce40) bx <= (cmd_valid && cmd == TTC_BC0) ? 12'd0 : bx + 12'd1;
  end

  for (genvar f = 0; f < N_FIBERS; f++) begin : g_fib
    fed_decode_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_dec (
      .clk, .rst_n, .ce40, .samples(fiber[f]),
      .emu_en, .emu_trig(l1a && !flush), .emu_ec0(ec0), .emu_hits, .n_rocs, .trunc_level, .max_hits, .cnt_clr,
      .rd_en(ch_rd[2*f +: 2]), .rd_data(ch_data[2*f +: 2]), .empty(ch_empty[2*f +: 2]),
      .level(ch_level[2*f +: 2]), .locked(locked[f]),
      .err_cnt(err_cnt[2*f +: 2]), .sym_err_cnt(sym_err_cnt[f])
    );
  end

  fed_readout #(.N_CH(N_CH), .L1A_DEPTH(L1A_DEPTH)) u_ro (
    .clk, .rst_n, .l1a(ce40 && l1a), .bx, .ec0, .flush, .timeout_cyc,
    .ch_empty, .ch_data, .ch_rd, .slink_valid, .slink_data, .slink_ctrl, .slink_ready,
    .l1a_level, .l1a_empty, .ev_done, .ev_timeout(ev_to), .ev_mismatch(ev_mm), .ev_count
  );

  always_comb begin
    pix_afull = 1'b0;
    for (int c = 0; c < N_CH; c++)
      if (ch_level[c] >= pix_afull_thr) pix_afull = 1'b1;
  end

  fed_tts_fsm u_tts (
    .clk, .rst_n, .l1a_afull(l1a_level >= l1a_afull_thr), .pix_afull,
    .ev_done, .ev_timeout(ev_to), .ev_mismatch(ev_mm), .resync,
    .fifos_empty(l1a_empty && (&ch_empty)), .oos_n, .tts, .flush, .state_id(tts_state)
  );
endmodule
