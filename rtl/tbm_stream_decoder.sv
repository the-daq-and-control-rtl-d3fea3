// tbm_stream_decoder: FED packet parser for one TBM core data stream.
//
// Input: decoded 160 Mb/s nibbles (one per BX at most, gaps allowed).
// The parser looks for the TBM header marker 0x7FC, takes the 8-bit event
// number and the 8-bit header field, and accepts the header only if the
// next item starts with a marker (0x7F), as a ROC header or trailer must;
// otherwise the packet is discarded as a sequence error. It then splits the
// stream into ROC headers (0x7F8..0x7FB), 24-bit hits (six nibbles) and the
// TBM trailer (0x7FE + 16 status bits), writing one 36-bit word per item to
// the TBM FIFO: {qualifier[3:0], payload[31:0]} (pix_pkg qual_t).
//   Q_TBM_HDR payload: {16'b0, event[7:0], header field[7:0]}
//   Q_ROC_HDR payload: {22'b0, status[1:0], 3'b0, roc[4:0]}
//   Q_HIT     payload: {3'b0, roc[4:0], hit[23:0]}
//   Q_TBM_TRL payload: {dec_err_t[7:0], 8'b0, status[15:0]}
// Checks: a ROC header later than ROC_WINDOW BX after the TBM header, a hit
// before any ROC header, or a new TBM header before the trailer is a
// sequence error; the ROC count is compared with n_rocs at the trailer; a
// packet without trailer after TRL_WINDOW BX is closed with no_trailer. To
// bound the event size, hits are no longer written (payload truncated,
// overflow flag) once the FIFO holds trunc_level words or max_hits hits were
// taken. Every accepted header is followed by exactly one trailer word, so
// the FIFO always holds complete packets. err pulses one BX per event for the
// error counters (its four reserved bits are always 0).
// Header validation by the following marker, ROC counting,
// arrival windows, truncation and qualifier marking follow the FED DECODE
// description; word layouts and window values are this design's choices.
module tbm_stream_decoder
  import pix_pkg::*;
#(
  parameter int ROC_WINDOW = 2048,
  parameter int TRL_WINDOW = 4096,
  parameter int LVW = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce40,
  input  logic           in_valid,
  input  logic [3:0]     in_nib,
  input  logic [4:0]     n_rocs,
  input  logic [LVW-1:0] fifo_level,
  input  logic [LVW-1:0] trunc_level,
  input  logic [9:0]     max_hits,
  output logic           wr_en,
  output logic [35:0]    wr_data,
  output dec_err_t       err,
  output logic           pkt_done
);
  typedef enum logic [2:0] {S_SEARCH, S_HDR, S_CHK, S_ITEM, S_TRL} state_t;
  state_t st;
  logic [7:0]  sr;          // last two nibbles while searching
  logic [19:0] acc;
  logic [2:0]  nc;
  logic [15:0] hdr;         // event number and header field
  logic [4:0]  roc_cnt;
  logic [9:0]  hit_cnt;
  logic [12:0] age;         // BX since TBM header
  dec_err_t    flags;
  logic        trunc;
  logic [23:0] acc_n;

  assign acc_n = {acc[19:0], in_nib};

  task automatic put(input qual_t q, input logic [31:0] p);
    wr_en   <= 1'b1;
    wr_data <= {q, p};
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_SEARCH; sr <= '0; acc <= '0; nc <= '0; hdr <= '0;
      roc_cnt <= '0; hit_cnt <= '0; age <= '0; flags <= '0; trunc <= 1'b0;
      wr_en <= 1'b0; wr_data <= '0; err <= '0; pkt_done <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      err <= '0;
      pkt_done <= 1'b0;
      if (ce40) begin
        if (st != S_SEARCH) age <= age + 1'b1;
        // packet never closed: write a trailer carrying the error
        if ((st == S_ITEM || st == S_TRL) && age == 13'(TRL_WINDOW)) begin
          put(Q_TBM_TRL, {flags | 8'b0001_0000, 24'h0});
          err.no_trailer <= 1'b1;
          pkt_done <= 1'b1;
          st <= S_SEARCH;
          sr <= '0;
        end else if ((st == S_HDR || st == S_CHK) && age == 13'(TRL_WINDOW)) begin
          st <= S_SEARCH;
          sr <= '0;
        end else if (in_valid) begin
          case (st)
            S_SEARCH: begin
              sr <= {sr[3:0], in_nib};
              if ({sr, in_nib} == {MARK_PREFIX, MARK_TBM_HDR}) begin
                st <= S_HDR; nc <= '0; age <= '0;
              end
            end
            S_HDR: begin
              hdr <= {hdr[11:0], in_nib};
              nc  <= nc + 3'd1;
              if (nc == 3'd3) begin st <= S_CHK; nc <= '0; acc <= '0; end
            end
            S_CHK: begin          // the next item must begin with a marker
              acc <= acc_n[19:0];
              nc  <= nc + 3'd1;
              if (nc == 3'd1) begin
                if (acc_n[7:0] == MARK_PREFIX) begin
                  put(Q_TBM_HDR, {16'h0, hdr});
                  st <= S_ITEM;
                  roc_cnt <= '0; hit_cnt <= '0; flags <= '0; trunc <= 1'b0;
                end else begin
                  err.seq_err <= 1'b1;
                  st <= S_SEARCH;
                  sr <= '0;
                end
              end
            end
            S_ITEM: begin
              acc <= acc_n[19:0];
              nc  <= nc + 3'd1;
              if (nc == 3'd2 && acc[7:0] == MARK_PREFIX) begin
                // third nibble of a marker: its type
                nc <= '0;
                if (in_nib[3:2] == 2'b10) begin
                  roc_cnt <= roc_cnt + 5'd1;
                  if (age > 13'(ROC_WINDOW)) begin
                    flags.seq_err <= 1'b1; err.seq_err <= 1'b1;
                  end
                  if (!trunc) put(Q_ROC_HDR, {22'h0, in_nib[1:0], 3'b0, roc_cnt + 5'd1});
                end else if (in_nib == MARK_TBM_TRL) begin
                  st <= S_TRL;
                  acc <= '0;
                end else begin
                  // new header or unknown marker before the trailer
                  put(Q_TBM_TRL, {flags | 8'b0011_0000, 24'h0});
                  err.seq_err <= 1'b1;
                  err.no_trailer <= 1'b1;
                  pkt_done <= 1'b1;
                  if (in_nib == MARK_TBM_HDR) begin
                    st <= S_HDR; age <= '0;
                  end else begin
                    st <= S_SEARCH; sr <= '0;
                  end
                end
              end else if (nc == 3'd5) begin
                nc <= '0;
                if (roc_cnt == 0) begin
                  flags.seq_err <= 1'b1; err.seq_err <= 1'b1;
                end else if (trunc || fifo_level >= trunc_level || hit_cnt >= max_hits) begin
                  if (!trunc) err.overflow <= 1'b1;
                  trunc <= 1'b1;
                  flags.overflow <= 1'b1;
                end else begin
                  put(Q_HIT, {3'b0, roc_cnt, acc_n});
                  hit_cnt <= hit_cnt + 10'd1;
                end
              end
            end
            S_TRL: begin
              acc <= acc_n[19:0];
              nc  <= nc + 3'd1;
              if (nc == 3'd3) begin
                put(Q_TBM_TRL, {flags | ((roc_cnt != n_rocs) ? 8'b0100_0000 : 8'h00),
                                8'h00, acc_n[15:0]});
                if (roc_cnt != n_rocs) err.roc_count <= 1'b1;
                pkt_done <= 1'b1;
                st <= S_SEARCH;
                sr <= '0;
              end
            end
            default: st <= S_SEARCH;
          endcase
        end
      end
    end
  end
endmodule
