// fed_link_decoder: FED decoding of one 400 Mb/s TBM link.
//
// Input: 10 re-timed line bits per BX (bits[9] first). The bits are NRZI
// decoded (a change of level is a '1'), then cut into two 5-bit symbols.
// The symbol boundary is unknown after power-up or a phase change: while
// unlocked the decoder looks at all ten bit offsets of the last 20 decoded
// bits for the idle pair of the TBM DataKeeper (core A idle, core B idle);
// the offset at which it appears LOCK_N times in a row is taken. Once
// locked, each BX yields one core A and one core B symbol, which are 4b/5b
// decoded: data symbols become 160 Mb/s nibbles (a_valid/a_nib, b_valid/
// b_nib), idle symbols produce no data, any other symbol raises sym_err.
// A leaky error counter (+1 per BX with an invalid symbol, -1 per clean BX)
// drops the lock when it reaches LOCK_N. Output latency two BX.
// NRZI + 4b/5b decoding and the split into two core streams follow the FED
// DECODE description; the lock procedure is this design's choice.
module fed_link_decoder
  import pix_pkg::*;
#(
  parameter int LOCK_N = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic [9:0] bits,
  output logic       locked,
  output logic       a_valid,
  output logic [3:0] a_nib,
  output logic       b_valid,
  output logic [3:0] b_nib,
  output logic       sym_err
);
  localparam int LW = $clog2(LOCK_N + 1);
  logic        last_bit;
  logic [9:0]  dec, prev_dec;
  logic [19:0] hist;
  logic [3:0]  off, cand, match_off;
  logic        match;
  logic [LW-1:0] good, bad;
  logic [9:0]  w;
  sym_t        sa, sb;

  always_comb begin
    logic l;
    l = last_bit;
    for (int i = 9; i >= 0; i--) begin
      dec[i] = bits[i] ^ l;
      l = bits[i];
    end
  end

  assign hist = {prev_dec, dec};

  always_comb begin
    match = 1'b0;
    match_off = '0;
    for (int o = 9; o >= 0; o--)
      if (hist[19-o -: 10] == {IDLE_A, IDLE_B}) begin
        match = 1'b1;
        match_off = 4'(o);
      end
  end

  assign w  = hist[19 - off -: 10];
  assign sa = dec4b5b(w[9:5]);
  assign sb = dec4b5b(w[4:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_bit <= 1'b0; prev_dec <= '0; off <= '0; cand <= '0;
      good <= '0; bad <= '0; locked <= 1'b0;
      a_valid <= 1'b0; b_valid <= 1'b0; a_nib <= '0; b_nib <= '0; sym_err <= 1'b0;
    end else if (ce40) begin
      last_bit <= bits[0];
      prev_dec <= dec;
      a_valid <= 1'b0; b_valid <= 1'b0; sym_err <= 1'b0;
      if (!locked) begin
        if (match) begin
          cand <= match_off;
          good <= (match_off == cand) ? good + 1'b1 : LW'(1);
          if (match_off == cand && good == LW'(LOCK_N - 1)) begin
            locked <= 1'b1;
            off    <= cand;
            bad    <= '0;
          end
        end else begin
          good <= '0;
        end
      end else begin
        a_valid <= sa.data;  a_nib <= sa.nib;
        b_valid <= sb.data;  b_nib <= sb.nib;
        if (!(sa.data || sa.idle) || !(sb.data || sb.idle)) begin
          sym_err <= 1'b1;
          bad <= bad + 1'b1;
          if (bad == LW'(LOCK_N - 1)) begin
            locked <= 1'b0;
            good   <= '0;
          end
        end else if (bad != '0) begin
          bad <= bad - 1'b1;
        end
      end
    end
  end
endmodule
