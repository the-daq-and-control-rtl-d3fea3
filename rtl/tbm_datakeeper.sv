// tbm_datakeeper: TBM output multiplexer and line encoder.
//
// Takes the two 160 Mb/s core streams (one nibble per BX each), encodes
// each nibble with the 4b/5b code, and sends per BX the core A symbol
// followed by the core B symbol: 10 bits per 25 ns, i.e. one 400 Mb/s
// stream. A core with no valid nibble sends its own idle symbol (IDLE_A or
// IDLE_B), which lets the receiver find the symbol boundary and tell the
// cores apart. The 10 bits are finally NRZI encoded (a '1' toggles the
// line). link[9] is the first bit on the line. One BX of latency.
// The 4b/5b + NRZI + two-core multiplexing follows the TBM description;
// the code table and the idle symbols are this design's choices.
module tbm_datakeeper
  import pix_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       a_valid,
  input  logic [3:0] a_nib,
  input  logic       b_valid,
  input  logic [3:0] b_nib,
  output logic [9:0] link
);
  logic [9:0] raw, nrz;
  logic       level;

  always_comb begin
    logic l;
    raw = {a_valid ? enc4b5b(a_nib) : IDLE_A, b_valid ? enc4b5b(b_nib) : IDLE_B};
    l = level;
    for (int i = 9; i >= 0; i--) begin
      l = l ^ raw[i];
      nrz[i] = l;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link  <= '0;
      level <= 1'b0;
    end else if (ce40) begin
      link  <= nrz;
      level <= nrz[0];
    end
  end
endmodule
