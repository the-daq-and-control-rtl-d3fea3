// pixel_daq_top: the pixel DAQ and control chain in one design.
//
//   TTC ──┬──> pixel_fec ──module clock──> tbm (sensor module) ──400 Mb/s──┐
//         │        └─ N programming channels (8b/10b) <-> ports            │
//         └──────────────────────────────> pixel_fed <── fiber 0 ─────────┘
//                                            │   <── fibers 1..N-1 (ports)
//                                            └──> S-Link (64 bit), TTS
//   tracker_fec: four CCU control rings (ports)
//
// One clock clk (160 MHz) and a BX enable ce40 generated here (every fourth
// clock). The TTC input (two bits per BX) feeds both the Pixel FEC and the
// FED, as the crate backplane does. The Pixel FEC's module clock with its
// encoded commands drives one TBM08 sensor module; the module's ROCs are
// outside this design (mixed-signal chips) and connect through the roc_*
// ports. The TBM's link reaches FED fiber 0 through an ideal optical path
// (each line bit seen by all four sampling phases); the other fibers and
// the remaining programming channels, whose optical parts are also outside
// this design, are ports. FED, FEC and Tracker FEC configuration registers
// are ports too.
module pixel_daq_top
  import pix_pkg::*;
#(
  parameter int N_FIBERS  = 24,
  parameter int FED_FIFO  = 512,
  parameter int N_FEC_CH  = 8,
  parameter int TX_BYTES  = 16384,
  parameter int N_RINGS   = 4,
  localparam int LVW = $clog2(FED_FIFO) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ttc_ab,
  output logic        ce40,
  // sensor module: ROC side of the TBM
  output logic        roc_reset,
  output logic [1:0]  roc_token_out,
  input  logic [1:0]  roc_token_in,
  input  logic [1:0]  roc_valid,
  input  logic [1:0][3:0] roc_nib,
  output logic [9:0]  tbm_link,
  // other FED fibers (4 samples per bit, 10 bits per BX)
  input  logic [N_FIBERS-1:1][39:0] fiber_in,
  // FED configuration and outputs
  input  logic        fed_emu_en,
  input  logic [3:0]  fed_emu_hits,
  input  logic [4:0]  fed_n_rocs,
  input  logic [LVW-1:0] fed_trunc_level,
  input  logic [9:0]  fed_max_hits,
  input  logic [15:0] fed_timeout_cyc,
  input  logic [8:0]  fed_l1a_afull_thr,
  input  logic [LVW-1:0] fed_pix_afull_thr,
  input  logic [3:0]  fed_oos_n,
  output logic        slink_valid,
  output logic [63:0] slink_data,
  output logic        slink_ctrl,
  input  logic        slink_ready,
  output tts_t        tts,
  output logic [2:0]  tts_state,
  output logic [N_FIBERS-1:0] fed_locked,
  output logic [2*N_FIBERS-1:0][3:0][15:0] fed_err_cnt,
  output logic [N_FIBERS-1:0][15:0] fed_sym_err_cnt,
  output logic [23:0] fed_ev_count,
  // Pixel FEC
  input  logic        fec_reg_l1a,
  input  logic        fec_reg_roc_reset,
  input  logic        fec_reg_tbm_reset,
  output logic [3:0][31:0] fec_cmd_cnt,
  input  logic        fec_evt_rd,
  output logic [23:0] fec_evt_q,
  output logic        fec_evt_empty,
  input  logic [N_FEC_CH-1:0]       fec_fifo_wr,
  input  logic [N_FEC_CH-1:0][7:0]  fec_fifo_data,
  input  logic [N_FEC_CH-1:0]       fec_send,
  input  logic [N_FEC_CH-1:0]       fec_send_mask,
  input  logic [N_FEC_CH-1:0][4:0]  fec_hub,
  input  logic [N_FEC_CH-1:0][2:0]  fec_port,
  input  logic [N_FEC_CH-1:0][13:0] fec_nbytes,
  output logic [N_FEC_CH-1:0][9:0]  fec_tx,
  input  logic [N_FEC_CH-1:0]       fec_rx_bit,
  output logic [N_FEC_CH-1:0]       fec_done,
  output logic [N_FEC_CH-1:0]       fec_timeout,
  output logic [N_FEC_CH-1:0]       fec_rx_err,
  output logic        tbm_bad_cmd,
  // Tracker FEC
  input  logic [N_RINGS-1:0]       ring_sel_b,
  input  logic [N_RINGS-1:0]       ring_cmd_valid,
  input  logic [N_RINGS-1:0]       ring_cmd_read,
  input  logic [N_RINGS-1:0][7:0]  ring_cmd_addr,
  input  logic [N_RINGS-1:0][7:0]  ring_cmd_reg,
  input  logic [N_RINGS-1:0][7:0]  ring_cmd_data,
  output logic [N_RINGS-1:0]       ring_cmd_ready,
  output logic [N_RINGS-1:0]       ring_cmd_done,
  output logic [N_RINGS-1:0]       ring_cmd_ok,
  output logic [N_RINGS-1:0][7:0]  ring_rd_data,
  output logic [N_RINGS-1:0]       ring_tx_a,
  output logic [N_RINGS-1:0]       ring_tx_b,
  input  logic [N_RINGS-1:0]       ring_rx_a,
  input  logic [N_RINGS-1:0]       ring_rx_b,
  output logic [N_RINGS-1:0]       ring_ok
);
  logic [1:0] div;
  logic [1:0] mclk_pat;
  logic [N_FIBERS-1:0][39:0] fiber;

  always_ff @(posedge clk) begin
    if (!rst_n) div <= '0;
    else        div <= div + 2'd1;
  end
  assign ce40 = (div == 2'd3);

  pixel_fec #(.N_CH(N_FEC_CH), .TX_BYTES(TX_BYTES)) u_fec (
    .clk, .rst_n, .ce40, .ttc_ab,
    .reg_l1a(fec_reg_l1a), .reg_roc_reset(fec_reg_roc_reset), .reg_tbm_reset(fec_reg_tbm_reset),
    .mclk_pat, .cmd_cnt(fec_cmd_cnt), .evt_rd(fec_evt_rd), .evt_q(fec_evt_q), .evt_empty(fec_evt_empty),
    .fifo_wr(fec_fifo_wr), .fifo_data(fec_fifo_data), .reg_send(fec_send), .send_mask(fec_send_mask),
    .hub(fec_hub), .port(fec_port), .nbytes(fec_nbytes), .tx(fec_tx), .rx_bit(fec_rx_bit),
    .busy(), .done(fec_done), .timeout(fec_timeout), .rx_err(fec_rx_err)
  );

  tbm u_tbm (
    .clk, .rst_n, .ce40, .mclk_pat, .roc_reset,
    .token_out(roc_token_out), .token_in(roc_token_in), .roc_valid, .roc_nib,
    .link(tbm_link), .bad_cmd(tbm_bad_cmd)
  );

  always_comb begin
    for (int j = 0; j < 10; j++) fiber[0][4*j +: 4] = {4{tbm_link[j]}};
    for (int f = 1; f < N_FIBERS; f++) fiber[f] = fiber_in[f];
  end

  pixel_fed #(.N_FIBERS(N_FIBERS), .FIFO_DEPTH(FED_FIFO)) u_fed (
    .clk, .rst_n, .ce40, .fiber, .ttc_ab,
    .emu_en(fed_emu_en), .emu_hits(fed_emu_hits), .n_rocs(fed_n_rocs),
    .trunc_level(fed_trunc_level), .max_hits(fed_max_hits), .timeout_cyc(fed_timeout_cyc),
    .l1a_afull_thr(fed_l1a_afull_thr), .pix_afull_thr(fed_pix_afull_thr), .oos_n(fed_oos_n),
    .cnt_clr(1'b0), .slink_valid, .slink_data, .slink_ctrl, .slink_ready, .tts, .tts_state,
    .locked(fed_locked), .err_cnt(fed_err_cnt), .sym_err_cnt(fed_sym_err_cnt),
    .ev_count(fed_ev_count), .ev_done()
  );

  tracker_fec #(.N_RINGS(N_RINGS)) u_tkfec (
    .clk, .rst_n, .sel_b(ring_sel_b), .cmd_valid(ring_cmd_valid), .cmd_read(ring_cmd_read),
    .cmd_addr(ring_cmd_addr), .cmd_reg(ring_cmd_reg), .cmd_data(ring_cmd_data),
    .cmd_ready(ring_cmd_ready), .cmd_done(ring_cmd_done), .cmd_ok(ring_cmd_ok), .rd_data(ring_rd_data),
    .tx_a(ring_tx_a), .tx_b(ring_tx_b), .rx_a(ring_rx_a), .rx_b(ring_rx_b),
    .ring_ok(ring_ok), .token_good(), .token_bad()
  );
endmodule
