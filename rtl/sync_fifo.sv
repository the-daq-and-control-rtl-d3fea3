// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used wherever the pixel back end buffers words inside one clock domain:
// the FED TBM FIFOs (one per TBM core stream, 36-bit words), the FED L1A
// FIFO, the Pixel FEC transmit FIFO and TTC event FIFO.
// rd_data always shows the oldest word while empty is low; rd_en pops it.
// A write when full and a read when empty are ignored. level counts the
// stored words and is what the FED compares with its truncation and
// almost-full thresholds. Write-to-read latency is one clock.
// Depth must be a power of two. Storage is a plain array (maps to block RAM).
module sync_fifo #(
  parameter int WIDTH = 36,
  parameter int DEPTH = 512,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign level = wp - rp;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end
endmodule
