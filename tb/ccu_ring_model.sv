// ccu_ring_model: behavioural model of one CCU token ring path used by the
// ring testbenches (not synthesisable). The ring delays every bit by DELAY
// clocks. Frames (flag 0x7E + 32 bits) travelling round the ring are
// watched: a write (type 0x02) or read (0x03) to a CCU address 1..N_CCU is
// answered in place by rewriting the frame into the reply (type | 0x80, the
// read data from the CCU register file); token frames and frames to unknown
// addresses pass unchanged. With broken set the path outputs a constant 0,
// as a failed DOH or CCU would.
module ccu_ring_model #(
  parameter int DELAY = 64,
  parameter int N_CCU = 4
) (
  input  logic clk,
  input  logic broken,
  input  logic din,
  output logic dout
);
  logic line[$];
  logic [7:0] regs[int];
  int n_cmd = 0;
  initial for (int i = 0; i < DELAY; i++) line.push_back(1'b0);
  always @(posedge clk) begin
    logic [39:0] f;
    int n;
    line.push_back(din);
    n = line.size();
    for (int i = 0; i < 40; i++) f[39 - i] = line[n - 40 + i];
    if (f[39:32] == 8'h7E && (f[31:24] == 8'h02 || f[31:24] == 8'h03) &&
        f[23:16] >= 1 && f[23:16] <= N_CCU) begin
      logic [39:0] r;
      int key;
      key = {f[23:16], f[15:8]};
      if (f[31:24] == 8'h02) regs[key] = f[7:0];
      r = {8'h7E, f[31:24] | 8'h80, f[23:16], f[15:8],
           regs.exists(key) ? regs[key] : 8'h00};
      for (int i = 0; i < 40; i++) line[n - 40 + i] = r[39 - i];
      n_cmd++;
    end
    dout <= broken ? 1'b0 : line.pop_front();
  end
endmodule
