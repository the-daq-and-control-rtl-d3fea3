// pixel_fec: Phase-1 Pixel FEC firmware.
//
// Receives TTC (two bits per BX, see ttc_decoder) and turns it into
//  * the module clock with encoded L1A / ROC reset / TBM reset
//    (pfec_trigger_fsm), the three commands also being available as
//    register bits (reg_l1a, reg_roc_reset, reg_tbm_reset, one-clock pulses);
//  * counters of the pixel-related fast commands (ROC reset, TBM reset,
//    EC0, resync), cmd_cnt[0..3];
//  * a TTC event FIFO (EVT_DEPTH words) capturing every L1A and fast command
//    as {bx[11:0], l1a, cmd_valid, 2'b0, cmd[7:0]}, read via evt_rd/evt_q (the two
//    spare bits read 0);
//  * the TTC Send Data command, which starts all channels enabled in
//    send_mask, just like their Send Data register bits (reg_send).
// N_CH programming channels (pfec_channel) each have a 16 kB transmit FIFO,
// an 8b/10b transmit FSM and a receive FSM with the 100-BX timeout. The
// per-channel hub/port/byte-count registers are inputs. One clock with a BX
// enable ce40, as in the rest of this design; the PLL of the board is not
// part of it. The overall structure follows the Pixel FEC description.
module pixel_fec
  import pix_pkg::*;
#(
  parameter int N_CH      = 8,
  parameter int TX_BYTES  = 16384,
  parameter int EVT_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic [1:0]  ttc_ab,
  input  logic        reg_l1a,
  input  logic        reg_roc_reset,
  input  logic        reg_tbm_reset,
  output logic [1:0]  mclk_pat,
  output logic [3:0][31:0] cmd_cnt,
  input  logic        evt_rd,
  output logic [23:0] evt_q,
  output logic        evt_empty,
  // channels
  input  logic [N_CH-1:0]       fifo_wr,
  input  logic [N_CH-1:0][7:0]  fifo_data,
  input  logic [N_CH-1:0]       reg_send,
  input  logic [N_CH-1:0]       send_mask,
  input  logic [N_CH-1:0][4:0]  hub,
  input  logic [N_CH-1:0][2:0]  port,
  input  logic [N_CH-1:0][13:0] nbytes,
  output logic [N_CH-1:0][9:0]  tx,
  input  logic [N_CH-1:0]       rx_bit,
  output logic [N_CH-1:0]       busy,
  output logic [N_CH-1:0]       done,
  output logic [N_CH-1:0]       timeout,
  output logic [N_CH-1:0]       rx_err
);
  logic l1a, cmd_valid, ham_err, corrected;
  logic [7:0] cmd;
  logic [11:0] bx;
  logic roc_rst, tbm_rst, ttc_send;

  ttc_decoder u_ttc (.clk, .rst_n, .ce40, .ttc_ab, .l1a, .cmd_valid, .cmd, .ham_err, .corrected);

  assign roc_rst  = cmd_valid && cmd == TTC_ROC_RST;
  assign tbm_rst  = cmd_valid && cmd == TTC_TBM_RST;
  assign ttc_send = ce40 && cmd_valid && cmd == TTC_SEND_DATA;

  // register requests are held until the next BX enable
  logic r_l1a, r_roc, r_tbm;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_l1a <= 1'b0; r_roc <= 1'b0; r_tbm <= 1'b0;
    end else begin
      r_l1a <= (r_l1a || reg_l1a) && !ce40;
      r_roc <= (r_roc || reg_roc_reset) && !ce40;
      r_tbm <= (r_tbm || reg_tbm_reset) && !ce40;
    end
  end

  pfec_trigger_fsm u_trig (
    .clk, .rst_n, .ce40,
    .l1a(l1a || r_l1a || reg_l1a), .roc_reset(roc_rst || r_roc || reg_roc_reset),
    .tbm_reset(tbm_rst || r_tbm || reg_tbm_reset),
    .mclk_pat, .busy(), .l1a_pending()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd_cnt <= '0; bx <= '0;
    end else if (ce40) begin
      bx <= (cmd_valid && cmd == TTC_BC0) ? 12'd0 : bx + 12'd1;
      if (cmd_valid) begin
        if (cmd == TTC_ROC_RST) cmd_cnt[0] <= cmd_cnt[0] + 32'd1;
        if (cmd == TTC_TBM_RST) cmd_cnt[1] <= cmd_cnt[1] + 32'd1;
        if (cmd == TTC_EC0)     cmd_cnt[2] <= cmd_cnt[2] + 32'd1;
        if (cmd == TTC_RESYNC || cmd == TTC_RESYNC_PRV) cmd_cnt[3] <= cmd_cnt[3] + 32'd1;
      end
    end
  end

  sync_fifo #(.WIDTH(24), .DEPTH(EVT_DEPTH)) u_evt (
    .clk, .rst_n, .wr_en(ce40 && (l1a || cmd_valid)), .wr_data({bx, l1a, cmd_valid, 2'b00, cmd}),
    .rd_en(evt_rd), .rd_data(evt_q), .empty(evt_empty), .full(), .level()
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    pfec_channel #(.TX_BYTES(TX_BYTES)) u_ch (
      .clk, .rst_n, .ce40, .fifo_wr(fifo_wr[c]), .fifo_data(fifo_data[c]),
      .send(reg_send[c] || (ttc_send && send_mask[c])),
      .hub(hub[c]), .port(port[c]), .nbytes(nbytes[c]), .tx(tx[c]), .rx_bit(rx_bit[c]),
      .busy(busy[c]), .done(done[c]), .timeout(timeout[c]), .rx_err(rx_err[c]), .fifo_level()
    );
  end
endmodule
