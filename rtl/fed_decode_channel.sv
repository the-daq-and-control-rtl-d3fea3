// fed_decode_channel: FED DECODE logic of one fiber (two TBM core streams).
//
// Chain: phase_finder (sampling point of the 400 Mb/s input) ->
// fed_link_decoder (NRZI, symbol lock, 4b/5b, split into core A and core
// B) -> one tbm_stream_decoder per core -> one TBM FIFO (sync_fifo, 36-bit
// words) per core, read by the BUILD side through rd_en/rd_data/empty.
// With emu_en set, the two stream decoders are fed instead by internal
// tbm_stream_emulator instances, triggered by emu_trig, so the FED can run
// without a detector. Error counters (16 bit, saturating, cleared by
// cnt_clr) count per core stream: sequence errors, ROC-count errors,
// truncations (overflow) and packets without trailer, and per fiber the
// invalid 5b symbols. FIFO levels are exported for the TTS logic.
// n_rocs, trunc_level and max_hits are configuration registers. All stages
// run on the BX clock enable; the FIFOs are read at the full clock rate.
module fed_decode_channel
  import pix_pkg::*;
#(
  parameter int FIFO_DEPTH = 512,
  parameter int N_ROCS_EMU = 8,
  localparam int LVW = $clog2(FIFO_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic [39:0] samples,
  input  logic        emu_en,
  input  logic        emu_trig,
  input  logic        emu_ec0,
  input  logic [3:0]  emu_hits,
  input  logic [4:0]  n_rocs,
  input  logic [LVW-1:0] trunc_level,
  input  logic [9:0]  max_hits,
  input  logic        cnt_clr,
  input  logic [1:0]  rd_en,
  output logic [1:0][35:0] rd_data,
  output logic [1:0]  empty,
  output logic [1:0][LVW-1:0] level,
  output logic        locked,
  output logic [1:0][3:0][15:0] err_cnt,   // [core][seq, roc_count, overflow, no_trailer]
  output logic [15:0] sym_err_cnt
);
  logic [9:0] bits;
  logic [1:0] lv, ev, sv;
  logic [1:0][3:0] ln, en, sn;
  logic sym_err;
  logic [1:0] wr_en;
  logic [1:0][35:0] wr_data;
  dec_err_t err [2];

  phase_finder u_pf (
    .clk, .rst_n, .ce40, .samples, .bits, .phase(), .phase_changed()
  );

  fed_link_decoder u_ld (
    .clk, .rst_n, .ce40, .bits, .locked,
    .a_valid(lv[0]), .a_nib(ln[0]), .b_valid(lv[1]), .b_nib(ln[1]), .sym_err
  );

  for (genvar c = 0; c < 2; c++) begin : g_core
    tbm_stream_emulator #(.N_ROCS(N_ROCS_EMU)) u_emu (
      .clk, .rst_n, .ce40, .trig(emu_trig && emu_en), .ec0(emu_ec0), .hits_per_roc(emu_hits),
      .out_valid(ev[c]), .out_nib(en[c]), .busy()
    );

    assign sv[c] = emu_en ? ev[c] : lv[c];
    assign sn[c] = emu_en ? en[c] : ln[c];

    tbm_stream_decoder #(.LVW(LVW)) u_dec (
      .clk, .rst_n, .ce40, .in_valid(sv[c]), .in_nib(sn[c]), .n_rocs,
      .fifo_level(level[c]), .trunc_level, .max_hits,
      .wr_en(wr_en[c]), .wr_data(wr_data[c]), .err(err[c]), .pkt_done()
    );

    sync_fifo #(.WIDTH(36), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .wr_en(wr_en[c]), .wr_data(wr_data[c]), .rd_en(rd_en[c]),
      .rd_data(rd_data[c]), .empty(empty[c]), .full(), .level(level[c])
    );

    always_ff @(posedge clk) begin
      if (!rst_n || cnt_clr) begin
        err_cnt[c] <= '0;
      end else begin
        if (err[c].seq_err    && err_cnt[c][0] != 16'hFFFF) err_cnt[c][0] <= err_cnt[c][0] + 16'd1;
        if (err[c].roc_count  && err_cnt[c][1] != 16'hFFFF) err_cnt[c][1] <= err_cnt[c][1] + 16'd1;
        if (err[c].overflow   && err_cnt[c][2] != 16'hFFFF) err_cnt[c][2] <= err_cnt[c][2] + 16'd1;
        if (err[c].no_trailer && err_cnt[c][3] != 16'hFFFF) err_cnt[c][3] <= err_cnt[c][3] + 16'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || cnt_clr) sym_err_cnt <= '0;
    else if (ce40 && sym_err && sym_err_cnt != 16'hFFFF) sym_err_cnt <= sym_err_cnt + 16'd1;
  end
endmodule
