// fed_readout: READOUT block of the FED BUILD firmware.
//
// Builds one output event per L1A from the N_CH TBM FIFOs and sends it as
// 64-bit words over the S-Link Express interface (valid/ready).
//  * Every L1A stores {event number[23:0], bx[11:0]} in the L1A FIFO
//    (L1A_DEPTH words), separate from the pixel data FIFOs.
//  * For the oldest L1A the block sends a header word
//    {4'h5, 4'h1, event[23:0], bx[11:0], source id[11:0], 8'h00},
//    then drains the TBM FIFOs with two drainers working in parallel, one on
//    channels 0..N_CH/2-1 and one on the rest, each taking its channels in
//    order, one packet per channel and one FIFO word per clock.
//  * Each drainer checks the TBM header's event number against the low 8
//    bits of the event number (mismatch -> error word, code 31), waits at
//    most timeout_cyc clocks for data (timeout -> error word, code 29, the
//    channel is skipped), turns hits into 32-bit words
//    {link[5:0], roc[4:0], dcol[4:0], pixel[7:0], adc[7:0]} (link = channel+1)
//    and turns a trailer with error flags into an error word (code 30).
//    Error words are {link, code, 13'b0, detail[7:0]}.
//  * 32-bit words of both drainers are paired into 64-bit words; an odd
//    word at the end of the event is padded with an all-zero filler word.
//  * The event ends with {4'hA, 4'h0, length[23:0], 32'h0}, the length
//    counting 64-bit words including header and trailer.
//  * slink_ctrl marks the header and trailer words (the S-Link control-word
//    flag), since a data word may begin with the same bits.
// ev_done pulses once per event with summary flags for the TTS logic.
// flush (resync) empties the L1A and TBM FIFOs and aborts the event;
// ec0 clears the event counter. Separate L1A/pixel FIFOs, parallel draining
// and exception marking follow the BUILD description; the word formats, error
// codes and pairing are this design's choices (no CRC is computed).
module fed_readout
  import pix_pkg::*;
#(
  parameter int N_CH      = 48,
  parameter int L1A_DEPTH = 256,
  parameter logic [11:0] SOURCE_ID = 12'd1200,
  localparam int HALF = N_CH / 2,
  localparam int CW   = $clog2(HALF + 1),
  localparam int LAW  = $clog2(L1A_DEPTH) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  l1a,
  input  logic [11:0]           bx,
  input  logic                  ec0,
  input  logic                  flush,
  input  logic [15:0]           timeout_cyc,
  input  logic [N_CH-1:0]       ch_empty,
  input  logic [N_CH-1:0][35:0] ch_data,
  output logic [N_CH-1:0]       ch_rd,
  output logic                  slink_valid,
  output logic [63:0]           slink_data,
  output logic                  slink_ctrl,
  input  logic                  slink_ready,
  output logic [LAW-1:0]        l1a_level,
  output logic                  l1a_empty,
  output logic                  ev_done,
  output logic                  ev_timeout,
  output logic                  ev_mismatch,
  output logic [23:0]           ev_count
);
  // ---------------- L1A FIFO ----------------
  logic [35:0] l1a_head;
  logic        l1a_pop;
  sync_fifo #(.WIDTH(36), .DEPTH(L1A_DEPTH)) u_l1a (
    .clk, .rst_n, .wr_en(l1a && !flush), .wr_data({ev_count + 24'd1, bx}),
    .rd_en(l1a_pop || (flush && !l1a_empty)), .rd_data(l1a_head),
    .empty(l1a_empty), .full(), .level(l1a_level)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || ec0) ev_count <= '0;
    else if (l1a && !flush) ev_count <= ev_count + 24'd1;
  end

  // ---------------- drainers ----------------
  typedef enum logic [1:0] {D_IDLE, D_HDR, D_BODY, D_DONE} dstate_t;
  dstate_t     ds [2];
  logic [CW-1:0] dch [2];          // channel within the half
  logic [15:0] dto [2];            // wait counter
  logic        dv [2];             // drainer output word valid
  logic [31:0] dw [2];
  logic        take [2];           // packer consumes dw this cycle
  logic        d_to [2], d_mm [2]; // event summary flags
  logic        start;              // begin draining (from control)
  logic [7:0]  exp_ev;

  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DRAIN, R_TRL} rstate_t;
  rstate_t rs;

  assign exp_ev = l1a_head[19:12];

  for (genvar h = 0; h < 2; h++) begin : g_drain
    logic [35:0] hw;
    logic        he;
    logic [5:0]  link;
    logic        can_out;
    int unsigned chi;

    assign chi     = h * HALF + int'(dch[h]);
    assign hw      = ch_data[chi];
    assign he      = ch_empty[chi];
    assign link    = 6'(chi + 1);
    assign can_out = !dv[h] || take[h];

    logic [HALF-1:0] rd_h;
    always_comb begin
      rd_h = '0;
      if (flush)
        rd_h = ~ch_empty[h*HALF +: HALF];
      else if ((ds[h] == D_HDR || ds[h] == D_BODY) && !he && can_out)
        rd_h[dch[h]] = 1'b1;
    end
    assign ch_rd[h*HALF +: HALF] = rd_h;

    always_ff @(posedge clk) begin
      if (!rst_n || flush) begin
        ds[h] <= D_IDLE; dch[h] <= '0; dto[h] <= '0;
        dv[h] <= 1'b0; dw[h] <= '0; d_to[h] <= 1'b0; d_mm[h] <= 1'b0;
      end else begin
        if (take[h]) dv[h] <= 1'b0;
        case (ds[h])
          D_IDLE: if (start) begin
            ds[h] <= D_HDR; dch[h] <= '0; dto[h] <= '0;
            d_to[h] <= 1'b0; d_mm[h] <= 1'b0;
          end
          D_HDR, D_BODY: begin
            if (he) begin
              dto[h] <= dto[h] + 16'd1;
              if (dto[h] >= timeout_cyc && can_out) begin
                dv[h] <= 1'b1;
                dw[h] <= {link, ERR_TIMEOUT, 21'h0};
                d_to[h] <= 1'b1;
                dto[h] <= '0;
                ds[h] <= D_HDR;
                if (int'(dch[h]) == HALF - 1) ds[h] <= D_DONE;
                else dch[h] <= dch[h] + 1'b1;
              end
            end else if (can_out) begin
              dto[h] <= '0;
              if (ds[h] == D_HDR) begin
                if (hw[35:32] == Q_TBM_HDR) begin
                  ds[h] <= D_BODY;
                  if (hw[15:8] != exp_ev) begin
                    dv[h] <= 1'b1;
                    dw[h] <= {link, ERR_EVNUM, 13'h0, hw[15:8]};
                    d_mm[h] <= 1'b1;
                  end
                end
                // anything else before a header is dropped
              end else begin
                case (hw[35:32])
                  Q_ROC_HDR: ;  // the ROC number travels in each hit word
                  Q_HIT: begin
                    dv[h] <= 1'b1;
                    dw[h] <= {link, hw[28:24], hw[22:18], hw[16:9], hw[8:5], hw[3:0]};
                  end
                  Q_TBM_TRL: begin
                    if (hw[31:24] != 8'h00 || hw[15:14] != 2'b00) begin
                      dv[h] <= 1'b1;
                      dw[h] <= {link, ERR_TRAILER, 13'h0, hw[31:24] | {6'h0, hw[15:14]}};
                    end
                    ds[h] <= D_HDR;
                    if (int'(dch[h]) == HALF - 1) ds[h] <= D_DONE;
                    else dch[h] <= dch[h] + 1'b1;
                  end
                  default: ;
                endcase
              end
            end
          end
          D_DONE: if (rs == R_TRL) ds[h] <= D_IDLE;
          default: ds[h] <= D_IDLE;
        endcase
      end
    end
  end

  // ---------------- control and packing ----------------
  logic        ov;        // output register valid
  logic [63:0] od;
  logic        oc;        // output word is a control word
  logic        o_free;
  logic        half_v;
  logic [31:0] half_w;
  logic [23:0] nwords;
  logic        both_done;

  assign o_free      = !ov || slink_ready;
  assign slink_valid = ov;
  assign slink_data  = od;
  assign slink_ctrl  = oc;
  assign both_done   = (ds[0] == D_DONE) && (ds[1] == D_DONE) && !dv[0] && !dv[1];
  assign start       = (rs == R_HDR) && o_free;
  assign l1a_pop     = (rs == R_TRL) && o_free && !flush;

  always_comb begin
    take[0] = 1'b0;
    take[1] = 1'b0;
    if (rs == R_DRAIN && o_free) begin
      if (half_v) begin
        if (dv[0]) take[0] = 1'b1;
        else if (dv[1]) take[1] = 1'b1;
      end else if (dv[0] && dv[1]) begin
        take[0] = 1'b1; take[1] = 1'b1;
      end else begin
        // a single word is parked in the half register (no output needed)
        take[0] = dv[0];
        take[1] = dv[1] && !dv[0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      rs <= R_IDLE; ov <= 1'b0; od <= '0; oc <= 1'b0; half_v <= 1'b0; half_w <= '0; nwords <= '0;
      ev_done <= 1'b0; ev_timeout <= 1'b0; ev_mismatch <= 1'b0;
    end else begin
      ev_done <= 1'b0;
      if (slink_ready) ov <= 1'b0;
      case (rs)
        R_IDLE: if (!l1a_empty) rs <= R_HDR;
        R_HDR: if (o_free) begin
          ov <= 1'b1;
          od <= {4'h5, 4'h1, l1a_head[35:12], l1a_head[11:0], SOURCE_ID, 8'h00};
          oc <= 1'b1;
          nwords <= 24'd1;
          rs <= R_DRAIN;
        end
        R_DRAIN: if (o_free) begin
          if (half_v && (take[0] || take[1])) begin
            ov <= 1'b1;
            od <= {half_w, take[0] ? dw[0] : dw[1]};
            oc <= 1'b0;
            nwords <= nwords + 24'd1;
            half_v <= 1'b0;
          end else if (take[0] && take[1]) begin
            ov <= 1'b1;
            od <= {dw[0], dw[1]};
            oc <= 1'b0;
            nwords <= nwords + 24'd1;
          end else if (take[0] || take[1]) begin
            half_v <= 1'b1;
            half_w <= take[0] ? dw[0] : dw[1];
          end else if (both_done) begin
            if (half_v) begin
              ov <= 1'b1;
              od <= {half_w, 32'h0};
              oc <= 1'b0;
              nwords <= nwords + 24'd1;
              half_v <= 1'b0;
            end else begin
              rs <= R_TRL;
            end
          end
        end
        R_TRL: if (o_free) begin
          ov <= 1'b1;
          od <= {4'hA, 4'h0, nwords + 24'd1, 32'h0};
          oc <= 1'b1;
          ev_done <= 1'b1;
          ev_timeout  <= d_to[0] || d_to[1];
          ev_mismatch <= d_mm[0] || d_mm[1];
          rs <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end
endmodule
