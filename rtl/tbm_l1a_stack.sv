// tbm_l1a_stack: the 32-deep store of pending triggers inside a TBM core.
//
// Every L1A seen by the TBM increments the core's 8-bit event number and is
// pushed here; the core pops one entry each time it starts a readout (token
// pass). Entries leave in arrival order (a trigger queue, although the TBM
// calls it a stack). count is the stack count that the core reports in its
// header. The depth of 32 follows the TBM description; dropping the trigger
// and raising a sticky overflow flag when full is this design's choice.
// Both push and pop act only on BX clock enables (ce40); head is valid while
// count > 0. On reset (TBM reset) the store is cleared and the event number
// restarts at 1 for the first trigger.
module tbm_l1a_stack #(
  parameter int DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic       clr,        // TBM reset command
  input  logic       push,
  input  logic       pop,
  output logic [7:0] head,
  output logic [$clog2(DEPTH):0] count,
  output logic       overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [7:0] evn;
  logic do_push, do_pop;

  assign do_pop  = ce40 && pop && (count != 0);
  assign do_push = ce40 && push && (count != DEPTH[AW:0] || do_pop);
  assign head    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= evn + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wp <= '0; rp <= '0; count <= '0; evn <= '0; overflow <= 1'b0;
    end else if (ce40) begin
      if (push) evn <= evn + 8'd1;
      if (push && !do_push) overflow <= 1'b1;
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
