// phase_finder: automatic sampling-phase selection for one 400 Mb/s input.
//
// The FED samples each fiber input with a copy of the signal at OVS=4
// phases per bit. samples holds one BX of these, time ordered with
// samples[39] first: bit slot j (9 = first) has phase p at samples[4*j+3-p].
// The block counts, over a window of WIN bunch crossings, how often the
// signal changes between each pair of neighbouring phases; the boundary with
// the most changes is where the bit edges lie, and the chosen phase is the
// one half a bit away from it (three phases later). A new phase is adopted
// only if it wins two windows in a row, so that a noisy window does not
// move the sampling point while data are flowing; the search runs
// continuously. bits is the stream sampled at the current phase, one BX
// after the samples. Continuous phase finding from a copy of the input
// follows the FED DECODE description; the edge-histogram method, the window
// and the hysteresis are this design's choices.
module phase_finder #(
  parameter int WIN = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce40,
  input  logic [39:0] samples,
  output logic [9:0]  bits,
  output logic [1:0]  phase,
  output logic        phase_changed
);
  localparam int CW = $clog2(WIN * 10 + 1);
  logic [CW-1:0] edges [4];
  logic [$clog2(WIN)-1:0] wcnt;
  logic last_s;
  logic [1:0] cand;
  logic [2:0] e_now [4];   // edges at each boundary in this BX (0..10)
  logic [1:0] best;

  // edges of the current BX, boundary b lies between phase b and phase b+1
  always_comb begin
    logic prev;
    for (int b = 0; b < 4; b++) e_now[b] = '0;
    prev = last_s;
    for (int t = 39; t >= 0; t--) begin
      // sample t has phase p = (39 - t) % 4; the boundary before it is p-1
      if (samples[t] != prev) e_now[(39 - t + 3) % 4] = e_now[(39 - t + 3) % 4] + 3'd1;
      prev = samples[t];
    end
  end

  always_comb begin
    best = 2'd0;
    for (int b = 1; b < 4; b++)
      if (edges[b] > edges[best]) best = 2'(b);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) edges[b] <= '0;
      wcnt <= '0; last_s <= 1'b0; cand <= 2'd2; phase <= 2'd2;
      bits <= '0; phase_changed <= 1'b0;
    end else if (ce40) begin
      last_s <= samples[0];
      phase_changed <= 1'b0;
      for (int j = 0; j < 10; j++) bits[j] <= samples[4*j + 3 - int'(phase)];
      wcnt <= wcnt + 1'b1;
      if (wcnt == $clog2(WIN)'(WIN - 1)) begin
        for (int b = 0; b < 4; b++) edges[b] <= CW'(e_now[b]);
        if (edges[best] != 0) begin
          cand <= best + 2'd3;
          if (cand == best + 2'd3 && phase != cand) begin
            phase <= cand;
            phase_changed <= 1'b1;
          end
        end
      end else begin
        for (int b = 0; b < 4; b++) edges[b] <= edges[b] + CW'(e_now[b]);
      end
    end
  end
endmodule
