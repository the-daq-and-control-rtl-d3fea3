// fed_tts_fsm: trigger-throttling (TTS) state machine of the FED.
//
// States and their 4-bit TTS codes: RDY (ready), BSY1/BSY2/BSY3 (all send
// BSY) and OOS (out of sync). After reset (configuration) the state is RDY.
//   BSY1: the L1A FIFO is almost full; back to RDY when it is not.
//   BSY2: a TBM FIFO is almost full; back to RDY when none is.
//   BSY3: a resync command is being executed: flush is asserted until all
//         FIFOs are empty, then RDY.
//   OOS : oos_n consecutive events with a channel timeout, or oos_n
//         consecutive events with an event-number mismatch. Entered from any
//         state; only a resync leaves it.
// A resync (global or private, the caller decides whether event counters
// are reset) is accepted in every state and leads to BSY3. Back-pressure is
// not instant: triggers already on their way are still accepted by the
// FIFOs, which is why the almost-full thresholds sit below the depth.
// The RDY/BSY/OOS states and the entry conditions follow the FED BUILD
// description; the meaning of the three BSY nodes is this design's reading.
module fed_tts_fsm
  import pix_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       l1a_afull,
  input  logic       pix_afull,
  input  logic       ev_done,       // one event built
  input  logic       ev_timeout,    // ... with at least one channel timeout
  input  logic       ev_mismatch,   // ... with at least one event-number mismatch
  input  logic       resync,
  input  logic       fifos_empty,
  input  logic [3:0] oos_n,
  output tts_t       tts,
  output logic       flush,
  output logic [2:0] state_id      // 0 RDY, 1..3 BSY1..3, 4 OOS
);
  typedef enum logic [2:0] {RDY, BSY1, BSY2, BSY3, OOS} state_t;
  state_t st;
  logic [3:0] n_to, n_mm;
  logic oos_hit;

  assign oos_hit = ev_done && ((ev_timeout && n_to + 4'd1 >= oos_n) ||
                               (ev_mismatch && n_mm + 4'd1 >= oos_n));
  assign flush    = (st == BSY3);
  assign state_id = 3'(st);

  always_comb begin
    case (st)
      RDY:     tts = TTS_RDY;
      OOS:     tts = TTS_OOS;
      default: tts = TTS_BSY;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= RDY; n_to <= '0; n_mm <= '0;
    end else begin
      if (ev_done) begin
        n_to <= ev_timeout  ? ((n_to != 4'hF) ? n_to + 4'd1 : n_to) : 4'd0;
        n_mm <= ev_mismatch ? ((n_mm != 4'hF) ? n_mm + 4'd1 : n_mm) : 4'd0;
      end
      if (resync) begin
        st <= BSY3; n_to <= '0; n_mm <= '0;
      end else if (oos_hit && st != BSY3) begin
        st <= OOS;
      end else begin
        case (st)
          RDY:  if (l1a_afull) st <= BSY1; else if (pix_afull) st <= BSY2;
          BSY1: if (!l1a_afull) st <= pix_afull ? BSY2 : RDY;
          BSY2: if (l1a_afull) st <= BSY1; else if (!pix_afull) st <= RDY;
          BSY3: if (fifos_empty) st <= RDY;
          OOS:  ;
          default: st <= RDY;
        endcase
      end
    end
  end
endmodule
