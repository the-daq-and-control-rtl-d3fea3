// tracker_fec: Tracker FEC firmware with N_RINGS independent CTRL_RING
// blocks, one per CCU control ring (four per board). Each ring has its own
// command port, A/B transmit and receive lines, ring selection and status;
// the rings share nothing but the clock and reset. Register access over
// Ethernet/IPBus is represented by the plain command ports.
module tracker_fec #(
  parameter int N_RINGS = 4,
  parameter int TIMEOUT = 4096
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_RINGS-1:0]      sel_b,
  input  logic [N_RINGS-1:0]      cmd_valid,
  input  logic [N_RINGS-1:0]      cmd_read,
  input  logic [N_RINGS-1:0][7:0] cmd_addr,
  input  logic [N_RINGS-1:0][7:0] cmd_reg,
  input  logic [N_RINGS-1:0][7:0] cmd_data,
  output logic [N_RINGS-1:0]      cmd_ready,
  output logic [N_RINGS-1:0]      cmd_done,
  output logic [N_RINGS-1:0]      cmd_ok,
  output logic [N_RINGS-1:0][7:0] rd_data,
  output logic [N_RINGS-1:0]      tx_a,
  output logic [N_RINGS-1:0]      tx_b,
  input  logic [N_RINGS-1:0]      rx_a,
  input  logic [N_RINGS-1:0]      rx_b,
  output logic [N_RINGS-1:0]      ring_ok,
  output logic [N_RINGS-1:0][15:0] token_good,
  output logic [N_RINGS-1:0][15:0] token_bad
);
  for (genvar r = 0; r < N_RINGS; r++) begin : g_ring
    ctrl_ring #(.TIMEOUT(TIMEOUT)) u_ring (
      .clk, .rst_n, .sel_b(sel_b[r]), .cmd_valid(cmd_valid[r]), .cmd_read(cmd_read[r]),
      .cmd_addr(cmd_addr[r]), .cmd_reg(cmd_reg[r]), .cmd_data(cmd_data[r]),
      .cmd_ready(cmd_ready[r]), .cmd_done(cmd_done[r]), .cmd_ok(cmd_ok[r]), .rd_data(rd_data[r]),
      .tx_a(tx_a[r]), .tx_b(tx_b[r]), .rx_a(rx_a[r]), .rx_b(rx_b[r]),
      .ring_ok(ring_ok[r]), .token_good(token_good[r]), .token_bad(token_bad[r])
    );
  end
endmodule
